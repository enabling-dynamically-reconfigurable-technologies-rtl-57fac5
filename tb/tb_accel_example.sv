// tb_accel_example: the example accelerator between a random-empty input
// stream and a random-full output stream.  Every output word must be the
// input word with reg1 added to both halves, in order; ressreg must be the
// sum of all output halves; 'complete' must rise after reg2 words and the
// accelerator must have stalled on empty input and on full output.  With
// both streams always ready it must move one word per cycle.
module tb_accel_example;
  logic clk = 1'b0, resetN = 1'b1;
  always #5 clk = ~clk;
  initial #1 resetN = 1'b0;

  logic [63:0] incomingData, outgoingData;
  logic        incomingRen, incomingEmpty, outgoingWen, outgoingFull;
  logic [31:0] reg1 = 32'h0000_0101, reg2 = 32'd500, ressreg, bitstreamID;
  logic        complete;

  accel_example #(.BITSTREAM_ID(32'h0000_0042)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] src(input int i);
    return {32'(i) * 32'h0001_0001, ~32'(i)};
  endfunction

  int  n_in = 0, n_out = 0, bad = 0, st_empty = 0, st_full = 0;
  bit  gaps = 1'b1;
  logic [31:0] sum = '0;
  logic [63:0] e;
  assign incomingData = src(n_in);

  always @(posedge clk) begin
    if (incomingRen) n_in <= n_in + 1;
    if (outgoingWen) begin
      e = src(n_out);
      e = {e[63:32] + reg1, e[31:0] + reg1};
      if (outgoingData !== e) bad++;
      sum = sum + e[63:32] + e[31:0];
      n_out <= n_out + 1;
    end
    if (resetN && !complete && incomingEmpty && n_in < int'(reg2)) st_empty++;
    if (resetN && outgoingFull && dut.out_v) st_full++;
  end

  // random stream conditions, driven between edges
  always @(negedge clk) begin
    incomingEmpty <= gaps ? ($urandom_range(0, 3) == 0) : 1'b0;
    outgoingFull  <= gaps ? ($urandom_range(0, 3) == 0) : 1'b0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after 20000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    resetN = 1'b1;
    while (!complete) @(posedge clk);
    @(negedge clk);
    check(n_out == 500 && n_in == 500, $sformatf("word counts in=%0d out=%0d", n_in, n_out));
    check(bad == 0, $sformatf("%0d wrong output words", bad));
    check(ressreg == sum, "result register checksum");
    check(bitstreamID == 32'h42, "bitstream ID");
    check(st_empty > 0 && st_full > 0, "stalled on empty input and on full output");
    repeat (5) @(posedge clk);
    check(complete && n_out == 500, "stays complete, no extra output");
    // second run, no gaps: one word per cycle
    gaps = 1'b0;
    reg2 = 32'd200;
    @(negedge clk) resetN = 1'b0;
    @(negedge clk) begin resetN = 1'b1; n_in = 0; n_out = 0; sum = '0; end
    t0 = 0;
    while (!complete) begin @(posedge clk); t0++; end
    check(n_out == 200 && bad == 0, "second run words");
    check(t0 <= 200 + 3, $sformatf("one word per cycle: %0d cycles for 200 words", t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
