// tb_reconfig_ctrl: the reconfiguration controller with a 64-word ICAP
// Recv FIFO.  A software model answers every data request with one chunk of
// the bitstream (an odd number of 32-bit words, so the last FIFO word
// carries a padding half).  Checks: words reach the ICAP in order and
// complete, one word per cycle while data is buffered, one request per
// chunk, the PRR is held while busy, the padding is discarded, done and its
// event, and that ICAP busy pauses the feed.
module tb_reconfig_ctrl;
  import pcie_rp_pkg::*;
  localparam int unsigned DEPTH = 64, CHUNK = 32, NDW = 301;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  rcfg_cmd_t   rcfg_cmd = '0;
  logic        push = 1'b0, fifo_rd_en, fifo_empty, fifo_full;
  logic [63:0] push_data = '0, fifo_rd_data;
  logic [6:0]  fifo_level;
  logic        icap_ce_n, icap_write_n, icap_busy = 1'b0;
  logic [31:0] icap_i, count;
  logic        busy, done, need_data, ev_need, ev_done;
  logic [2:0]  hold_prr;

  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data(push_data), .full(fifo_full),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(fifo_empty), .level(fifo_level));

  reconfig_ctrl #(.FIFO_DEPTH(DEPTH), .CHUNK_WORDS(CHUNK)) dut (
    .clk, .rst_n, .rcfg_cmd, .fifo_push(push), .fifo_rd_en, .fifo_rd_data, .fifo_empty,
    .fifo_level, .icap_ce_n, .icap_write_n, .icap_i, .icap_busy,
    .busy, .done, .need_data, .count, .hold_prr, .ev_need, .ev_done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] bs(input int i);
    return 32'hC0DE_0000 + 32'(i) * 32'h0003_0007;
  endfunction

  int n_icap = 0, bad = 0, n_req = 0, n_done = 0, run = 0, max_run = 0, hold_cycles = 0;
  int n_busy_pause = 0;
  always @(posedge clk) begin
    if (!icap_ce_n && !icap_write_n) begin
      if (icap_i !== bs(n_icap)) bad++;
      n_icap++;
      run++;
      if (run > max_run) max_run = run;
    end else run = 0;
    if (ev_need) n_req++;
    if (ev_done) n_done++;
    if (busy && hold_prr == 3'd2) hold_cycles++;
  end

  // software: one chunk per request (64-bit words, upper half first)
  int sent = 0;
  always @(posedge clk) begin
    if (ev_need) begin
      fork
        begin
          automatic int base = sent;
          sent += 2 * CHUNK;
          repeat (6) @(negedge clk);
          for (int w = 0; w < CHUNK && base + 2 * w < NDW; w++) begin
            @(negedge clk);
            while (fifo_full) @(negedge clk);
            push = 1'b1;
            push_data = {bs(base + 2 * w), bs(base + 2 * w + 1)};
            @(negedge clk) push = 1'b0;
          end
          // the DMA moves whole TLPs: one word of padding beyond the end
          if (base + 2 * CHUNK >= NDW) begin
            @(negedge clk) begin push = 1'b1; push_data = 64'hDEAD_BEEF_DEAD_BEEF; end
            @(negedge clk) push = 1'b0;
          end
        end
      join_none
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after 20000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) begin rcfg_cmd.start = 1'b1; rcfg_cmd.prr = 3'd2; rcfg_cmd.len_bytes = NDW * 4; end
    @(negedge clk) rcfg_cmd.start = 1'b0;
    while (!done) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_icap == NDW, $sformatf("ICAP words %0d", n_icap));
    check(bad == 0, $sformatf("%0d ICAP words wrong", bad));
    check(count == NDW, "count register");
    check(n_req == (NDW + 2 * CHUNK - 1) / (2 * CHUNK), $sformatf("data requests %0d", n_req));
    check(n_done == 1 && !busy, "one completion event");
    check(hold_cycles > 0 && hold_prr == 3'd0, "PRR held while busy, released after");
    check(max_run >= 2 * CHUNK - 2, $sformatf("one word per cycle, longest run %0d", max_run));
    check(fifo_empty, "padding discarded");
    // ICAP busy pauses the feed
    sent = 0; n_icap = 0; bad = 0;
    @(negedge clk) begin rcfg_cmd.start = 1'b1; rcfg_cmd.len_bytes = 64 * 4; end
    @(negedge clk) rcfg_cmd.start = 1'b0;
    repeat (30) @(negedge clk);
    icap_busy = 1'b1;
    begin
      automatic int c0 = n_icap;
      repeat (10) @(negedge clk);
      check(n_icap - c0 <= 1, "no words while ICAP busy");
    end
    icap_busy = 1'b0;
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_icap == 64 && bad == 0, "second bitstream complete after pause");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
