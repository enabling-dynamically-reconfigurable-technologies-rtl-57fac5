// tb_pcie_rp_seven: the co-processor built with its largest number of
// regions, seven, and small (64-word) buffers.  It exercises the top end of
// every per-region field: the 3-bit DMA target, the register blocks up to
// offset 0xA0, and the event bits 14, 22 and 30 of region 7.
//   1. reads the bitstream ID of all seven regions and writes/reads back the
//      registers of region 7,
//   2. reconfigures region 6 with a 1000-byte bitstream and checks the ICAP
//      word count and checksum,
//   3. streams 128 words through the accelerator of region 7 in two DMAs
//      each way and checks every result word, the result register and the
//      region's needs-data, results and complete events.
module tb_pcie_rp_seven;
  import pcie_rp_pkg::*;

  localparam int unsigned DEPTH    = 64;
  localparam int unsigned BS_BYTES = 1000;
  localparam int unsigned NW       = 128;
  localparam logic [31:0] IN_ADDR  = 32'h0001_0000;
  localparam logic [31:0] OUT_ADDR = 32'h0002_0000;
  localparam logic [31:0] K        = 32'h7000_0007;
  localparam logic [7:0]  R7       = A_PRR_BASE + 8'h60;   // register block of region 7

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous resets
  always #4 clk = ~clk;

  tlp_beat_t rx_beat, tx_beat;
  logic rx_valid, rx_ready, tx_valid, tx_ready, cfg_interrupt, cfg_interrupt_rdy;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i;

  pcie_rp_top #(.NUM_PRR(7), .FIFO_DEPTH(DEPTH), .RESULT_WORDS(DEPTH)) dut (
    .clk, .rst_n, .completer_id(16'h0700),
    .rx_beat, .rx_valid, .rx_ready, .tx_beat, .tx_valid, .tx_ready,
    .cfg_interrupt, .cfg_interrupt_rdy,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy
  );

  pcie_host_model #(.MEM_DW(1 << 16), .CPL_LAT(12)) host (
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
    return 32'h5A00_0000 + 32'(i) * 32'h0000_1001;
  endfunction
  function automatic logic [31:0] in_word(input int i);
    return 32'(i) * 32'd13 + 32'd1;
  endfunction

  initial begin
    automatic int limit = 200_000;
    repeat (limit) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, exp_ck, exp_res, e;
    automatic int bad = 0;
    for (int i = 0; i < BS_BYTES / 4; i++) host.mem[i] = bs_word(i);
    for (int i = 0; i < 2 * NW; i++) host.mem[(IN_ADDR >> 2) + i] = in_word(i);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    host.pio_write(A_IRQ_MASK, 32'hFFFF_FFFF);

    // 1. registers of all seven regions
    for (int p = 1; p <= 7; p++) begin
      host.pio_read(A_PRR_BASE + 8'(16 * (p - 1)) + 8'h0C, v);
      check(v == 32'(p), $sformatf("bitstream ID of region %0d", p));
    end
    host.pio_write(R7 + 8'h00, K);
    host.pio_write(R7 + 8'h04, NW);
    host.pio_read(R7 + 8'h00, v);
    check(v == K, "region 7 reg1 read-back");
    host.pio_read(R7 + 8'h04, v);
    check(v == NW, "region 7 reg2 read-back");

    // 2. reconfigure region 6
    host.reconfigure(32'h0, BS_BYTES, 3'd6, DEPTH / 2 * 8);
    exp_ck = '0;
    for (int i = 0; i < BS_BYTES / 4; i++) exp_ck = exp_ck + bs_word(i) * 32'(i + 1);
    check(icap.n_words == int'(BS_BYTES / 4) && icap.checksum == exp_ck, "region 6 bitstream at the ICAP");

    // 3. accelerator of region 7
    host.pio_write(A_PRR_RUN, 32'h80);
    for (int c = 0; c < NW / DEPTH; c++) begin
      host.dma(IN_ADDR + 32'(c * DEPTH * 8), DEPTH * 8 / TLP_BYTES, 1'b0, 3'd7);
      host.wait_event(EV_ACC_RESULTS + 6);
      host.dma(OUT_ADDR + 32'(c * DEPTH * 8), DEPTH * 8 / TLP_BYTES, 1'b1, 3'd7);
    end
    while (!host.ev_seen[EV_ACC_DONE + 6] && host.ev_count[EV_ACC_DONE + 6] == 0) host.service_irq();
    exp_res = '0;
    for (int i = 0; i < 2 * NW; i++) begin
      e = in_word(i) + K;
      exp_res = exp_res + e;
      if (host.mem[(OUT_ADDR >> 2) + i] !== e) bad++;
    end
    check(bad == 0, $sformatf("region 7: %0d result words wrong", bad));
    host.pio_read(R7 + 8'h08, v);
    check(v == exp_res, "region 7 result register");
    host.pio_read(A_PRR_STATUS, v);
    check(v[7] == 1'b1, "region 7 complete in the status register");
    check(host.ev_count[EV_ACC_NEED + 6] > 0, "region 7 needs-data event (bit 14)");
    check(host.ev_count[EV_ACC_RESULTS + 6] > 0, "region 7 results event (bit 22)");
    check(host.ev_count[EV_ACC_DONE + 6] > 0, "region 7 complete event (bit 30)");
    check(host.malformed == 0, "well-formed TLPs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
