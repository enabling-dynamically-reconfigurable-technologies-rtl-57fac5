// tb_sync_fifo: random pushes and pops against a queue reference model,
// with a small depth so that full and empty are reached often.  Checks the
// show-ahead data, the flags, the level and simultaneous push/pop when full.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [63:0] wr_data = '0, rd_data;
  logic [3:0]  level;

  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_both_full = 0;
  logic [63:0] model[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after 200000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      // inputs change away from the clock edge
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH)
          || level != 4'(model.size()) || (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL at %0d: size=%0d empty=%b full=%b level=%0d", n, model.size(), empty, full, level);
      end
      if (full) n_full++;
      wr_en   = ($urandom_range(0, 99) < (((n / 500) % 2 != 0) ? 70 : 35));
      rd_en   = !empty && ($urandom_range(0, 99) < 50);
      if (full && !rd_en) wr_en = 1'b0;   // writing a full FIFO is a protocol error
      wr_data = {$urandom, $urandom};
      if (full && wr_en && rd_en) n_both_full++;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en && (model.size() < DEPTH || rd_en)) model.push_back(wr_data);
    end
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
    checks++;
    if (n_full == 0 || n_both_full == 0) begin
      failures++;
      $display("FAIL: full=%0d push+pop when full=%0d", n_full, n_both_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
