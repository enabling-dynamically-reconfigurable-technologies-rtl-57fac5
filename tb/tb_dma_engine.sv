// tb_dma_engine: the transaction-layer engine with its two FIFOs (32 words,
// so only two read requests fit in flight), a register array behind the PIO
// port and the host model answering read requests with split completions.
// Checks: PIO writes and reads; a host-to-FPGA DMA of 8 TLPs delivers every
// word in order while the READ FIFO is drained slowly (the request credit
// must keep it from overflowing); an FPGA-to-host DMA of 8 TLPs writes the
// right host memory, 18 cycles per TLP once data is waiting; TLP counts and
// done/busy signalling.
module tb_dma_engine;
  import pcie_rp_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 1'b0, rst_n = 1'b1;
  always #4 clk = ~clk;
  initial #1 rst_n = 1'b0;

  tlp_beat_t rx_beat, tx_beat;
  logic rx_valid, rx_ready, tx_valid, tx_ready, cfg_irq_rdy;
  dma_cmd_t dma_cmd = '0;
  logic dma_busy, dma_done;
  logic [15:0] dma_tlps_done;
  logic reg_wr_en;
  logic [7:0] reg_wr_addr, reg_rd_addr;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic rdf_wr_en, wrf_rd_en, rdf_rd_en = 1'b0, rdf_empty, wrf_wr_en = 1'b0, wrf_full;
  logic [63:0] rdf_wr_data, wrf_rd_data, rdf_rd_data, wrf_wr_data = '0;
  logic [5:0] rdf_level, wrf_level;

  dma_engine #(.FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .completer_id(16'h0100), .rx_beat, .rx_valid, .rx_ready,
    .tx_beat, .tx_valid, .tx_ready, .dma_cmd, .dma_busy, .dma_done, .dma_tlps_done,
    .reg_wr_en, .reg_wr_addr, .reg_wr_data, .reg_rd_addr, .reg_rd_data,
    .rdf_wr_en, .rdf_wr_data, .rdf_level, .wrf_rd_en, .wrf_rd_data, .wrf_level);

  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_rdf (.clk, .rst_n, .wr_en(rdf_wr_en), .wr_data(rdf_wr_data),
    .full(), .rd_en(rdf_rd_en), .rd_data(rdf_rd_data), .empty(rdf_empty), .level(rdf_level));
  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_wrf (.clk, .rst_n, .wr_en(wrf_wr_en), .wr_data(wrf_wr_data),
    .full(wrf_full), .rd_en(wrf_rd_en), .rd_data(wrf_rd_data), .empty(), .level(wrf_level));

  pcie_host_model #(.MEM_DW(1 << 16), .CPL_LAT(12), .SPLIT(1'b1)) host (
    .clk, .rst_n, .rx_beat, .rx_valid, .rx_ready, .tx_beat, .tx_valid, .tx_ready,
    .cfg_interrupt(1'b0), .cfg_interrupt_rdy(cfg_irq_rdy));

  logic [31:0] regs[64];
  always @(posedge clk) if (reg_wr_en) regs[reg_wr_addr[7:2]] <= reg_wr_data;
  assign reg_rd_data = regs[reg_rd_addr[7:2]];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic start(input logic [31:0] a, input int ntlp, input bit to_host);
    @(negedge clk) begin
      dma_cmd.start = 1'b1; dma_cmd.addr = a; dma_cmd.ntlp = 16'(ntlp);
      dma_cmd.dir = dma_dir_e'(to_host); dma_cmd.target = 3'd1;
    end
    @(negedge clk) dma_cmd.start = 1'b0;
  endtask

  // slow drain of the READ FIFO
  logic [63:0] got[$];
  always @(negedge clk) rdf_rd_en <= !rdf_empty && ($urandom_range(0, 3) == 0);
  always @(posedge clk) if (rdf_rd_en) got.push_back(rdf_rd_data);
  int n_done = 0;
  always @(posedge clk) if (dma_done) n_done++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after 50000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    for (int i = 0; i < 64; i++) regs[i] = 32'h0;
    for (int i = 0; i < 512; i++) host.mem[1024 + i] = 32'h1000_0000 + 32'(i);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // programmed I/O
    host.pio_write(8'h24, 32'hFEED_0024);
    host.pio_write(8'h40, 32'h0000_4040);
    host.pio_read(8'h24, v);
    check(v == 32'hFEED_0024, "PIO read-back 0x24");
    host.pio_read(8'h40, v);
    check(v == 32'h0000_4040, "PIO read-back 0x40");
    // host-to-FPGA, 8 TLPs from byte address 4096
    start(32'd4096, 8, 1'b0);
    check(dma_busy, "busy after start");
    while (!dma_done) @(posedge clk);
    repeat (100) @(posedge clk);
    begin
      automatic bit ok = got.size() == 128;
      for (int i = 0; i < 128 && ok; i++)
        ok = got[i] == {32'h1000_0000 + 32'(2 * i), 32'h1000_0000 + 32'(2 * i + 1)};
      check(ok, $sformatf("DMA read data in order (%0d words)", got.size()));
    end
    check(host.n_mrd == 8 && host.n_cpld == 16, "8 requests, 16 split completions");
    check(dma_tlps_done == 8 && !dma_busy && n_done == 1, "DMA read done");
    // FPGA-to-host, 8 TLPs: prefill 16 words, then stream the rest
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      while (wrf_full) @(negedge clk);
      wrf_wr_en = 1'b1;
      wrf_wr_data = {32'hA000_0000 + 32'(2 * i), 32'hA000_0000 + 32'(2 * i + 1)};
      if (i == 15) begin
        @(negedge clk) wrf_wr_en = 1'b0;
        fork start(32'h0000_8000, 8, 1'b1); join_none
      end
    end
    @(negedge clk) wrf_wr_en = 1'b0;
    begin
      automatic int t = 0;
      while (!dma_done) begin @(posedge clk); t++; end
      check(t <= 8 * 18 + 8, $sformatf("FPGA-to-host DMA took %0d cycles", t));
    end
    repeat (5) @(posedge clk);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 256; i++) if (host.mem[(32'h8000 >> 2) + i] != 32'hA000_0000 + 32'(i)) bad++;
      check(bad == 0, $sformatf("%0d host words wrong", bad));
    end
    check(host.n_mwr == 8 && host.malformed == 0, "8 well-formed MWr TLPs");
    check(dma_tlps_done == 8 && n_done == 2, "DMA write done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
