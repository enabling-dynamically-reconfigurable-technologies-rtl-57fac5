// tb_prr_slot: a PRR slot with 16-word buffers.  Data is pushed into the
// Recv FIFO whenever it has room and results are drained from the Send FIFO
// in bursts.  Checks: nothing runs while the slot is held for
// reconfiguration or its run bit is clear; all results arrive in order; the
// needs-data, results and complete events fire; the bitstream ID appears.
module tb_prr_slot;
  localparam int DEPTH = 16, NW = 40;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic run = 1'b0, hold = 1'b1;
  logic recv_wr_en = 1'b0, recv_full, recv_empty, send_rd_en = 1'b0, send_empty;
  logic [63:0] recv_wr_data = '0, send_rd_data;
  logic [4:0]  send_level;
  logic [31:0] reg1 = 32'd5, reg2 = NW, ressreg, bitstream_id;
  logic complete, send_ready, ev_need, ev_results, ev_done;

  prr_slot #(.FIFO_DEPTH(DEPTH), .RESULT_WORDS(DEPTH), .BITSTREAM_ID(32'h0000_0007)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_need = 0, n_res = 0, n_done = 0, n_out = 0, bad = 0;
  always @(posedge clk) begin
    if (ev_need) n_need++;
    if (ev_results) n_res++;
    if (ev_done) n_done++;
    if (send_rd_en) begin
      if (send_rd_data !== {32'(n_out) + 32'd5, 32'(n_out) * 3 + 32'd5}) bad++;
      n_out++;
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
    automatic int n_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill while held: nothing may be consumed
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) begin recv_wr_en = 1'b1; recv_wr_data = {32'(n_in), 32'(n_in) * 3}; n_in++; end
    end
    @(negedge clk) recv_wr_en = 1'b0;
    run = 1'b1;
    repeat (10) @(negedge clk);
    check(send_empty, "held slot does not run");
    hold = 1'b0;
    // feed the rest, drain results only when a full buffer is ready
    while (n_out < NW) begin
      @(negedge clk);
      recv_wr_en = (n_in < NW) && !recv_full && ($urandom_range(0, 1) != 0);
      recv_wr_data = {32'(n_in), 32'(n_in) * 3};
      if (recv_wr_en) n_in++;
      send_rd_en = !send_empty && (send_ready || complete || send_rd_en);
    end
    @(negedge clk) begin recv_wr_en = 1'b0; send_rd_en = 1'b0; end
    repeat (5) @(negedge clk);
    check(bad == 0 && n_out == NW, $sformatf("%0d results, %0d wrong", n_out, bad));
    check(complete && n_done == 1, "complete event");
    check(n_res >= 2, $sformatf("results events %0d", n_res));
    check(n_need >= 1, "needs-data event");
    check(bitstream_id == 32'h7, "bitstream ID");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
