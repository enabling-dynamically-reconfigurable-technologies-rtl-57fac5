// tb_pcie_rp_full: the co-processor at its full size (three PRRs, 32 KB
// buffers) running the two measured operations:
//   * partial reconfiguration of PRR 3 with a 1.7 MB bitstream, loaded in
//     16 KB DMAs whenever the controller asks for data (double buffering);
//     the ICAP must see every word in order, and the rate from the first to
//     the last ICAP word must reach at least 95 % of the port's one word per
//     cycle (500 MB/s at 125 MHz);
//   * one 32 KB DMA into the accelerator of PRR 1 and one 32 KB DMA of its
//     results back to host memory, every word checked; the FPGA-to-host DMA
//     must take no more than 18 cycles per 128-byte TLP plus 64 cycles, and
//     the host-to-FPGA DMA (18-beat completions) no more than 18 cycles per
//     TLP plus the host's read latency and 64 cycles.
module tb_pcie_rp_full;
  import pcie_rp_pkg::*;

  localparam int unsigned BS_BYTES = 1_700_000;
  localparam int unsigned NW       = 4096;         // one 32 KB buffer
  localparam logic [31:0] IN_ADDR  = 32'h0020_0000;
  localparam logic [31:0] OUT_ADDR = 32'h0030_0000;
  localparam logic [31:0] K        = 32'h0BAD_0001;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous resets
  always #4 clk = ~clk;   // 125 MHz

  tlp_beat_t rx_beat, tx_beat;
  logic rx_valid, rx_ready, tx_valid, tx_ready, cfg_interrupt, cfg_interrupt_rdy;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i;

  pcie_rp_top dut (
    .clk, .rst_n, .completer_id(16'h0300),
    .rx_beat, .rx_valid, .rx_ready, .tx_beat, .tx_valid, .tx_ready,
    .cfg_interrupt, .cfg_interrupt_rdy,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy
  );

  pcie_host_model #(.MEM_DW(1 << 20), .CPL_LAT(CPL_LAT)) host (
    .clk, .rst_n, .rx_beat, .rx_valid, .rx_ready, .tx_beat, .tx_valid, .tx_ready,
    .cfg_interrupt, .cfg_interrupt_rdy
  );

  icap_model icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i_data(icap_i), .busy(icap_busy)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] bs_word(input int i);
    return 32'hAA99_5566 ^ (32'(i) * 32'h9E37_79B1);
  endfunction
  function automatic logic [31:0] in_word(input int i);
    return 32'(i) * 32'h0001_0003 + 32'd11;
  endfunction

  // cycles the FPGA-to-host DMA is busy
  localparam int CPL_LAT = 40;
  int wr_busy_cycles = 0, rd_busy_cycles = 0;
  bit measuring = 1'b0, measuring_rd = 1'b0;
  always @(posedge clk) begin
    if (measuring && dut.dma_busy) wr_busy_cycles++;
    if (measuring_rd && dut.dma_busy) rd_busy_cycles++;
  end

  initial begin
    automatic int limit = 3_000_000;
    repeat (limit) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, exp_ck;
    real         rate;
    int          bad;
    for (int i = 0; i < BS_BYTES / 4; i++) host.mem[i] = bs_word(i);
    for (int i = 0; i < 2 * NW; i++) host.mem[(IN_ADDR >> 2) + i] = in_word(i);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    host.pio_write(A_IRQ_MASK, 32'hFFFF_FFFF);

    // partial reconfiguration, 1.7 MB, 16 KB chunks
    host.reconfigure(32'h0, BS_BYTES, 3'd3, 16384);
    exp_ck = '0;
    for (int i = 0; i < BS_BYTES / 4; i++) exp_ck = exp_ck + bs_word(i) * 32'(i + 1);
    check(icap.n_words == int'(BS_BYTES / 4), $sformatf("ICAP words %0d", icap.n_words));
    check(icap.checksum == exp_ck, "ICAP checksum");
    rate = real'(icap.n_words) / real'(icap.last_cyc - icap.first_cyc + 1);
    $display("reconfiguration: %0d words in %0d cycles, %.1f MB/s at 125 MHz",
             icap.n_words, icap.last_cyc - icap.first_cyc + 1, rate * 500.0);
    check(rate >= 0.95, "ICAP feed rate");
    check(host.ev_count[EV_RCFG_NEED] == (BS_BYTES + 16383) / 16384, "one data request per chunk");
    host.pio_read(A_PRR_BASE + 8'h2C, v);
    check(v == 32'd3, "bitstream ID of PRR 3");

    // one 32 KB buffer through the accelerator of PRR 1
    host.pio_write(A_PRR_BASE + 8'h00, K);
    host.pio_write(A_PRR_BASE + 8'h04, NW);
    host.pio_write(A_PRR_RUN, 32'h2);
    measuring_rd = 1'b1;
    host.dma(IN_ADDR, NW * 8 / TLP_BYTES, 1'b0, 3'd1);
    measuring_rd = 1'b0;
    $display("32 KB host-to-FPGA DMA: %0d cycles busy, %.1f MB/s at 125 MHz",
             rd_busy_cycles, 32768.0 / (real'(rd_busy_cycles) * 8.0e-3));
    check(rd_busy_cycles <= (NW / TLP_WORDS) * 18 + CPL_LAT + 64, "host-to-FPGA DMA cycle count");
    host.wait_event(EV_ACC_RESULTS);
    measuring = 1'b1;
    host.dma(OUT_ADDR, NW * 8 / TLP_BYTES, 1'b1, 3'd1);
    measuring = 1'b0;
    bad = 0;
    for (int i = 0; i < 2 * NW; i++)
      if (host.mem[(OUT_ADDR >> 2) + i] !== in_word(i) + K) bad++;
    check(bad == 0, $sformatf("%0d result words wrong", bad));
    $display("32 KB FPGA-to-host DMA: %0d cycles busy, %.1f MB/s at 125 MHz",
             wr_busy_cycles, 32768.0 / (real'(wr_busy_cycles) * 8.0e-3));
    check(wr_busy_cycles <= (NW / TLP_WORDS) * 18 + 64, "FPGA-to-host DMA cycle count");
    check(host.malformed == 0, "well-formed TLPs");
    host.pio_read(A_PRR_STATUS, v);
    check(v[1] == 1'b1, "PRR 1 complete");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
