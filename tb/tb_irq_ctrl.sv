// tb_irq_ctrl: events set status bits, writes of ones clear them, only
// unmasked events raise the interrupt request, and the request is held
// until accepted.  An event on the accept cycle raises a new request.
module tb_irq_ctrl;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic [31:0] events = '0, irq_clear = '0, irq_mask = '0, irq_status;
  logic        cfg_interrupt, cfg_interrupt_rdy = 1'b0;
  logic [15:0] irq_sent;

  irq_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pulse_event(input logic [31:0] e);
    @(negedge clk) events = e;
    @(negedge clk) events = '0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after 1000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    irq_mask = 32'h0000_0004;
    pulse_event(32'h0000_0001);                       // masked
    @(negedge clk);
    check(irq_status == 32'h1, "masked event recorded");
    check(!cfg_interrupt, "masked event raises no request");
    pulse_event(32'h0000_0004);
    check(cfg_interrupt, "unmasked event raises request");
    repeat (5) @(negedge clk);
    check(cfg_interrupt, "request held until accepted");
    cfg_interrupt_rdy = 1'b1;
    @(negedge clk) cfg_interrupt_rdy = 1'b0;
    check(!cfg_interrupt && irq_sent == 1, "request dropped after accept");
    check(irq_status == 32'h5, "status accumulates");
    irq_clear = 32'h4;
    @(negedge clk) irq_clear = '0;
    @(negedge clk);
    check(irq_status == 32'h1, "write-one-to-clear");
    // event on the accept cycle
    pulse_event(32'h0000_0004);
    @(negedge clk) begin cfg_interrupt_rdy = 1'b1; events = 32'h4; end
    @(negedge clk) begin cfg_interrupt_rdy = 1'b0; events = '0; end
    check(cfg_interrupt, "event during accept re-raises request");
    check(irq_sent == 2, "two interrupts accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
