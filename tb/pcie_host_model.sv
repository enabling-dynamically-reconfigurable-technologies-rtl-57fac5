// pcie_host_model: behavioural stand-in for the host side of the link (CPU,
// root complex and DMA-able memory) at the transaction layer.
//
// It drives the device's receive stream and consumes its transmit stream in
// the 64-bit beat format of pcie_rp_pkg (first DWORD in [63:32]).
//   * Memory: MEM_DW 32-bit words at byte address 0; tests fill it through
//     the mem[] array.  MWr TLPs from the device are written into it.
//   * MRd requests from the device are answered after CPL_LAT cycles with
//     CplD packets, split into 64-byte completions when SPLIT is set.
//   * pio_write / pio_read issue single-DWORD memory writes and reads to
//     BAR0 (register offsets), the way a driver does programmed I/O.
//   * When BACKPRESSURE is set, tx_ready is low on random cycles.
//   * Driver-level tasks: service_irq / wait_event take interrupts, read and
//     clear the status register and count every event bit; dma runs one DMA
//     to completion; reconfigure loads a bitstream chunk by chunk whenever
//     the reconfiguration controller asks for data.
// Counters: n_mwr, n_mrd, n_cpld (device traffic), words_written, ev_count[].
module pcie_host_model
  import pcie_rp_pkg::*;
#(
  parameter int unsigned MEM_DW       = 1 << 20,
  parameter int unsigned CPL_LAT      = 16,
  parameter bit          SPLIT        = 1'b0,
  parameter bit          BACKPRESSURE = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  output tlp_beat_t rx_beat,
  output logic      rx_valid,
  input  logic      rx_ready,
  input  tlp_beat_t tx_beat,
  input  logic      tx_valid,
  output logic      tx_ready,
  input  logic      cfg_interrupt,
  output logic      cfg_interrupt_rdy
);

  logic [31:0] mem [MEM_DW];

  tlp_beat_t   rxq[$];
  logic [31:0] txdw[$];
  longint      cycle = 0;
  int          n_mwr = 0, n_mrd = 0, n_cpld = 0;
  int          words_written = 0;
  int          malformed = 0;

  typedef struct { longint due; logic [31:0] addr; int ndw; logic [7:0] tag; logic [15:0] rid; } pend_t;
  pend_t       pend[$];

  logic        pio_rsp_v = 1'b0;
  logic [31:0] pio_rsp_d;

  // Queue a packet given as DWORDs.
  task automatic push_packet(input logic [31:0] dws[$]);
    int n = dws.size();
    for (int i = 0; i < n; i += 2) begin
      tlp_beat_t b;
      b.sof  = (i == 0);
      b.eof  = (i + 2 >= n);
      b.half = (i + 1 == n);
      b.data = {dws[i], (i + 1 < n) ? dws[i+1] : 32'h0};
      rxq.push_back(b);
    end
  endtask

  task automatic pio_write(input logic [7:0] addr, input logic [31:0] data);
    logic [31:0] p[$];
    p = '{{FT_MWR32, 8'h00, 16'h0001}, 32'h0000_000F, {24'h0, addr}, data};
    push_packet(p);
  endtask

  task automatic pio_read(input logic [7:0] addr, output logic [31:0] data);
    logic [31:0] p[$];
    p = '{{FT_MRD32, 8'h00, 16'h0001}, 32'h0000_A50F, {24'h0, addr}};
    pio_rsp_v = 1'b0;
    push_packet(p);
    while (!pio_rsp_v) @(posedge clk);
    data = pio_rsp_d;
  endtask

  // ---------------------------------------------------------------------
  // Driver-level tasks
  // ---------------------------------------------------------------------
  int          ev_count[32];
  logic [31:0] ev_seen = '0;
  int          n_irq = 0;

  initial cfg_interrupt_rdy = 1'b0;

  task automatic service_irq();
    logic [31:0] st;
    while (!cfg_interrupt) @(posedge clk);
    cfg_interrupt_rdy <= 1'b1;
    @(posedge clk);
    cfg_interrupt_rdy <= 1'b0;
    n_irq++;
    pio_read(A_IRQ_STATUS, st);
    if (st != 0) pio_write(A_IRQ_STATUS, st);
    for (int i = 0; i < 32; i++) if (st[i]) ev_count[i]++;
    ev_seen = ev_seen | st;
  endtask

  // Wait until event 'bit' has been reported, then forget it.
  task automatic wait_event(input int unsigned bitn);
    while (!ev_seen[bitn]) service_irq();
    ev_seen[bitn] = 1'b0;
  endtask

  task automatic dma(input logic [31:0] addr, input int ntlp, input bit to_host, input logic [2:0] tgt);
    pio_write(A_DMA_ADDR, addr);
    pio_write(A_DMA_NTLP, ntlp);
    pio_write(A_DMA_CTRL, {25'h0, tgt, 2'b00, to_host, 1'b1});
    wait_event(EV_DMA_DONE);
  endtask

  // Load 'bytes' of bitstream from host address 'addr' into PRR 'prr',
  // in DMAs of at most chunk_bytes.
  task automatic reconfigure(input logic [31:0] addr, input int bytes, input logic [2:0] prr,
                             input int chunk_bytes);
    int sent = 0;
    pio_write(A_RCFG_LEN, bytes);
    pio_write(A_RCFG_CTRL, {25'h0, prr, 3'b000, 1'b1});
    while (sent < bytes) begin
      int n;
      wait_event(EV_RCFG_NEED);
      n = (bytes - sent < chunk_bytes) ? bytes - sent : chunk_bytes;
      dma(addr + sent, (n + TLP_BYTES - 1) / TLP_BYTES, 1'b0, 3'd0);
      sent += n;
    end
    wait_event(EV_RCFG_DONE);
  endtask

  // Receive-stream driver.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_beat  <= '0;
    end else begin
      if (rx_valid && rx_ready) void'(rxq.pop_front());
      // completions that are due
      while (pend.size() > 0 && pend[0].due <= cycle) begin
        logic [31:0] p[$];
        pend_t r;
        r = pend.pop_front();
        p = '{{FT_CPLD, 8'h00, 6'h0, 10'(r.ndw)}, {16'h0100, 4'h0, 12'(r.ndw * 4)},
              {r.rid, r.tag, 1'b0, r.addr[6:0]}};
        for (int i = 0; i < r.ndw; i++) p.push_back(mem[(r.addr >> 2) + i]);
        push_packet(p);
        n_cpld++;
      end
      rx_valid <= rxq.size() > 0;
      if (rxq.size() > 0) rx_beat <= rxq[0];
    end
  end

  // Transmit-stream monitor.
  always @(posedge clk) begin
    if (!rst_n) begin
      tx_ready <= 1'b0;
    end else begin
      tx_ready <= BACKPRESSURE ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (tx_valid && tx_ready) begin
        if (tx_beat.sof && txdw.size() != 0) malformed++;
        if (tx_beat.sof) txdw.delete();
        txdw.push_back(tx_beat.data[63:32]);
        if (!tx_beat.half) txdw.push_back(tx_beat.data[31:0]);
        if (tx_beat.eof) begin
          logic [7:0]  ft;
          int          len;
          logic [31:0] a;
          ft  = txdw[0][31:24];
          len = int'(txdw[0][9:0]);
          a   = txdw.size() > 2 ? txdw[2] : 32'h0;
          if (ft == FT_MWR32) begin
            if (txdw.size() != 3 + len) malformed++;
            for (int i = 0; i < len; i++) mem[(a >> 2) + i] = txdw[3+i];
            n_mwr++;
            words_written += len / 2;
          end else if (ft == FT_MRD32) begin
            if (txdw.size() != 3) malformed++;
            n_mrd++;
            if (SPLIT && len > 16) begin
              pend.push_back('{cycle + longint'(CPL_LAT), a, 16, txdw[1][15:8], txdw[1][31:16]});
              pend.push_back('{cycle + longint'(CPL_LAT) + 1, a + 64, len - 16, txdw[1][15:8], txdw[1][31:16]});
            end else begin
              pend.push_back('{cycle + longint'(CPL_LAT), a, len, txdw[1][15:8], txdw[1][31:16]});
            end
          end else if (ft == FT_CPLD) begin
            pio_rsp_d = txdw[3];
            pio_rsp_v = 1'b1;
          end else begin
            malformed++;
          end
          txdw.delete();
        end
      end
    end
  end

endmodule
