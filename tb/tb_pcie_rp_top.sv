// tb_pcie_rp_top: end-to-end test of the co-processor, with small buffers
// (256 words) so that every flow-control path is hit quickly.
//
// A host model (memory, root complex, driver) and an ICAP model surround the
// design.  The test
//   1. checks programmed I/O (register write and read-back),
//   2. starts the accelerators of PRR 1 and PRR 3 with their first input
//      and, while they run, reconfigures PRR 2 with a 3076-byte bitstream
//      (an odd number of 32-bit words) in chunks requested by the
//      reconfiguration controller, then compares word count and checksum
//      seen by the ICAP with the bitstream in host memory and reads the new
//      bitstream ID,
//   3. streams the rest of 768 words through each of the two accelerators,
//      in DMAs of 2 KB each way per region, interleaved between the regions
//      and overlapping input and output so that the accelerators stall on
//      both empty input and full output, and compares every result word and
//      both result registers with values computed here.
// Link backpressure, split completions and ICAP busy cycles are on.  Each
// mechanism is counted and must occur at least once.
module tb_pcie_rp_top;
  import pcie_rp_pkg::*;

  localparam int unsigned DEPTH   = 256;
  localparam int unsigned BS_BYTES = 3076;
  localparam int unsigned NW      = 768;          // accelerator words
  localparam int unsigned CHUNK_W = DEPTH;         // words per data DMA
  localparam logic [31:0] IN_ADDR  = 32'h0010_0000;
  localparam logic [31:0] OUT_ADDR = 32'h0020_0000;
  localparam logic [31:0] K        = 32'h0000_1111;
  localparam logic [31:0] K3       = 32'h0300_0000;
  localparam logic [31:0] OUT3_ADDR = 32'h0030_0000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous resets
  always #4 clk = ~clk;

  tlp_beat_t rx_beat, tx_beat;
  logic rx_valid, rx_ready, tx_valid, tx_ready, cfg_interrupt, cfg_interrupt_rdy;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i;

  pcie_rp_top #(.NUM_PRR(3), .FIFO_DEPTH(DEPTH), .RESULT_WORDS(DEPTH)) dut (
    .clk, .rst_n, .completer_id(16'h0200),
    .rx_beat, .rx_valid, .rx_ready, .tx_beat, .tx_valid, .tx_ready,
    .cfg_interrupt, .cfg_interrupt_rdy,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy
  );

  pcie_host_model #(.MEM_DW(1 << 20), .CPL_LAT(20), .SPLIT(1'b1), .BACKPRESSURE(1'b1)) host (
    .clk, .rst_n, .rx_beat, .rx_valid, .rx_ready, .tx_beat, .tx_valid, .tx_ready,
    .cfg_interrupt, .cfg_interrupt_rdy
  );

  icap_model #(.RANDOM_BUSY(1'b1)) icap (
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
    return 32'hB000_0000 ^ (32'(i) * 32'h0100_0193);
  endfunction
  function automatic logic [31:0] in_word(input int i);
    return 32'(i) * 32'd7 + 32'd3;
  endfunction

  // mechanism monitors
  int n_stall_full = 0, n_stall_empty = 0, n_hold = 0, n_tx_bp = 0, n_icap_pause = 0, n_both = 0, n_run_rcfg = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_prr[0].u_slot.u_acc.out_v && dut.g_prr[0].u_slot.out_full) n_stall_full++;
    if (dut.g_prr[0].u_slot.acc_rst_n && dut.g_prr[0].u_slot.in_empty
        && !dut.g_prr[0].u_slot.complete) n_stall_empty++;
    if (dut.hold_prr == 3'd2 && !dut.g_prr[1].u_slot.acc_rst_n) n_hold++;
    if (tx_valid && !tx_ready) n_tx_bp++;
    if (icap_busy && dut.rcfg_busy) n_icap_pause++;
    if (dut.g_prr[0].u_slot.acc_rst_n && !dut.g_prr[0].u_slot.complete
        && dut.g_prr[2].u_slot.acc_rst_n && !dut.g_prr[2].u_slot.complete) n_both++;
    if (dut.g_prr[0].u_slot.acc_rst_n && !dut.g_prr[0].u_slot.complete && dut.rcfg_busy) n_run_rcfg++;
  end

  initial begin
    automatic int limit = 2_000_000;
    repeat (limit) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, exp_ck, exp_res;
    for (int i = 0; i < BS_BYTES / 4; i++) host.mem[i] = bs_word(i);
    for (int i = 0; i < 2 * NW; i++) host.mem[(IN_ADDR >> 2) + i] = in_word(i);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. programmed I/O
    host.pio_write(A_IRQ_MASK, 32'hFFFF_FFFF);
    host.pio_write(A_PRR_BASE + 8'h14, 32'hCAFE_0002);   // PRR 2 reg2
    host.pio_read(A_PRR_BASE + 8'h14, v);
    check(v == 32'hCAFE_0002, "register read-back");
    host.pio_read(A_IRQ_MASK, v);
    check(v == 32'hFFFF_FFFF, "interrupt mask read-back");

    // 2. start the accelerators of PRR 1 and PRR 3 with their first input,
    //    then reconfigure PRR 2 while they run
    host.pio_write(A_PRR_BASE + 8'h00, K);
    host.pio_write(A_PRR_BASE + 8'h04, NW);
    host.pio_write(A_PRR_BASE + 8'h20, K3);
    host.pio_write(A_PRR_BASE + 8'h24, NW);
    host.pio_write(A_PRR_RUN, 32'h0A);
    host.dma(IN_ADDR, CHUNK_W * 8 / TLP_BYTES, 1'b0, 3'd1);
    host.dma(IN_ADDR, CHUNK_W * 8 / TLP_BYTES, 1'b0, 3'd3);
    host.reconfigure(32'h0, BS_BYTES, 3'd2, DEPTH / 2 * 8);
    exp_ck = '0;
    for (int i = 0; i < BS_BYTES / 4; i++) exp_ck = exp_ck + bs_word(i) * 32'(i + 1);
    check(icap.n_words == int'(BS_BYTES / 4), $sformatf("ICAP words %0d", icap.n_words));
    check(icap.checksum == exp_ck, "ICAP checksum");
    host.pio_read(A_RCFG_COUNT, v);
    check(v == BS_BYTES / 4, "reconfiguration word count register");
    host.pio_read(A_RCFG_CTRL, v);
    check(v[2] == 1'b1 && v[3] == 1'b0, "reconfiguration done / not busy");
    host.pio_read(A_PRR_BASE + 8'h1C, v);
    check(v == 32'd2, "bitstream ID of PRR 2");
    repeat (20) @(posedge clk);
    check(dut.u_icap_recv_fifo.empty, "padding discarded");

    // 3. the rest of the data for PRR 1 and PRR 3, DMAs interleaved
    for (int c = 0; c < NW / CHUNK_W; c++) begin
      if (c + 1 < NW / CHUNK_W) begin
        host.dma(IN_ADDR + 32'((c + 1) * CHUNK_W * 8), CHUNK_W * 8 / TLP_BYTES, 1'b0, 3'd1);
        host.dma(IN_ADDR + 32'((c + 1) * CHUNK_W * 8), CHUNK_W * 8 / TLP_BYTES, 1'b0, 3'd3);
      end
      host.wait_event(EV_ACC_RESULTS);
      host.dma(OUT_ADDR + 32'(c * CHUNK_W * 8), CHUNK_W * 8 / TLP_BYTES, 1'b1, 3'd1);
      host.wait_event(EV_ACC_RESULTS + 2);
      host.dma(OUT3_ADDR + 32'(c * CHUNK_W * 8), CHUNK_W * 8 / TLP_BYTES, 1'b1, 3'd3);
    end
    while (!host.ev_seen[EV_ACC_DONE] && host.ev_count[EV_ACC_DONE] == 0) host.service_irq();
    while (!host.ev_seen[EV_ACC_DONE + 2] && host.ev_count[EV_ACC_DONE + 2] == 0) host.service_irq();

    begin
      automatic int bad = 0, bad3 = 0;
      logic [31:0] exp3;
      exp_res = '0;
      exp3    = '0;
      for (int i = 0; i < 2 * NW; i++) begin
        logic [31:0] e;
        e = in_word(i) + K;
        exp_res = exp_res + e;
        if (host.mem[(OUT_ADDR >> 2) + i] !== e) bad++;
        e = in_word(i) + K3;
        exp3 = exp3 + e;
        if (host.mem[(OUT3_ADDR >> 2) + i] !== e) bad3++;
      end
      check(bad == 0, $sformatf("PRR 1: %0d result words wrong", bad));
      check(bad3 == 0, $sformatf("PRR 3: %0d result words wrong", bad3));
      host.pio_read(A_PRR_BASE + 8'h28, v);
      check(v == exp3, "PRR 3 result register (checksum)");
    end
    host.pio_read(A_PRR_BASE + 8'h08, v);
    check(v == exp_res, "PRR 1 result register (checksum)");
    host.pio_read(A_PRR_STATUS, v);
    check(v[1] == 1'b1 && v[3] == 1'b1, "PRR 1 and PRR 3 complete");
    host.pio_read(A_PRR_BASE + 8'h0C, v);
    check(v == 32'd1, "bitstream ID of PRR 1");
    host.pio_read(A_PRR_BASE + 8'h2C, v);
    check(v == 32'd3, "bitstream ID of PRR 3");
    check(host.malformed == 0, "well-formed TLPs");
    check(host.words_written == int'(2 * NW), "words written to host");

    // mechanisms
    check(host.ev_count[EV_DMA_DONE]  > 0, "DMA complete events");
    check(host.ev_count[EV_RCFG_NEED] > 1, "reconfiguration needs-data events");
    check(host.ev_count[EV_RCFG_DONE] > 0, "reconfiguration complete event");
    check(host.ev_count[EV_ACC_NEED]  > 0, "accelerator needs-data event");
    check(host.ev_count[EV_ACC_RESULTS] > 0, "accelerator results event");
    check(host.ev_count[EV_ACC_DONE]  > 0, "accelerator complete event");
    check(host.ev_count[EV_ACC_RESULTS + 2] > 0 && host.ev_count[EV_ACC_DONE + 2] > 0,
          "PRR 3 results and complete events");
    check(n_both > 0, "two accelerators running at the same time");
    check(n_run_rcfg > 0, "accelerator running while another region is reconfigured");
    check(n_stall_full  > 0, "accelerator stalled on full output");
    check(n_stall_empty > 0, "accelerator stalled on empty input");
    check(n_hold > 0, "PRR held in reset while reconfigured");
    check(n_tx_bp > 0, "transmit backpressure");
    check(n_icap_pause > 0, "ICAP busy pause");
    check(host.n_cpld > host.n_mrd, "split completions");
    $display("mechanisms: dma_done=%0d rcfg_need=%0d rcfg_done=%0d acc_need=%0d acc_results=%0d acc_done=%0d",
             host.ev_count[EV_DMA_DONE], host.ev_count[EV_RCFG_NEED], host.ev_count[EV_RCFG_DONE],
             host.ev_count[EV_ACC_NEED], host.ev_count[EV_ACC_RESULTS], host.ev_count[EV_ACC_DONE]);
    $display("           both_running=%0d run_during_reconfig=%0d stall_full=%0d stall_empty=%0d hold=%0d tx_backpressure=%0d icap_pause=%0d irqs=%0d mwr=%0d mrd=%0d cpld=%0d",
             n_both, n_run_rcfg, n_stall_full, n_stall_empty, n_hold, n_tx_bp, n_icap_pause, host.n_irq,
             host.n_mwr, host.n_mrd, host.n_cpld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
