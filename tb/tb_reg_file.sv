// tb_reg_file: every host-writable register is written and read back, the
// start bits give one-cycle pulses with the stored settings, status inputs
// appear at their documented bit positions and the per-PRR registers map to
// the right regions.
module tb_reg_file;
  import pcie_rp_pkg::*;
  localparam int NUM_PRR = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic        wr_en = 1'b0;
  logic [7:0]  wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  dma_cmd_t    dma_cmd;
  rcfg_cmd_t   rcfg_cmd;
  logic        dma_busy = 1'b1;
  logic [15:0] dma_tlps_done = 16'd77;
  logic [31:0] irq_status = 32'h0102_0304, irq_clear, irq_mask;
  logic        rcfg_need = 1'b1, rcfg_done = 1'b0, rcfg_busy = 1'b1;
  logic [31:0] rcfg_count = 32'd1234;
  logic [NUM_PRR-1:0] prr_run, prr_complete = 3'b101, prr_recv_empty = 3'b010, prr_send_ready = 3'b100;
  logic [31:0] prr_reg1[NUM_PRR], prr_reg2[NUM_PRR], prr_ressreg[NUM_PRR], prr_bitid[NUM_PRR];

  reg_file #(.NUM_PRR(NUM_PRR)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin wr_en = 1'b1; wr_addr = a; wr_data = d; end
    @(negedge clk) wr_en = 1'b0;
    @(negedge clk);
  endtask
  // read: rd_addr is set, the combinational result is sampled 1 ns later
  task automatic rdchk(input logic [7:0] a, input logic [31:0] exp, input string what);
    rd_addr = a;
    #1 check(rd_data == exp, $sformatf("%s: read %h, expected %h", what, rd_data, exp));
  endtask

  int n_dma_start = 0, n_rcfg_start = 0;
  logic [31:0] last_clear = '0;
  always @(posedge clk) begin
    if (dma_cmd.start) n_dma_start++;
    if (rcfg_cmd.start) n_rcfg_start++;
    if (irq_clear != 0) last_clear = irq_clear;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after 1000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NUM_PRR; p++) begin
      prr_ressreg[p] = 32'h5000_0000 + p;
      prr_bitid[p]   = 32'h0000_0100 + p;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(A_DMA_ADDR, 32'h1234_5678);
    wr(A_DMA_NTLP, 32'd256);
    wr(A_DMA_CTRL, 32'h0000_0033);          // start, to host, target 3
    @(negedge clk);
    rdchk(A_DMA_ADDR, 32'h1234_5678, "DMA address");
    rdchk(A_DMA_NTLP, 32'd256, "DMA TLP count");
    check(dma_cmd.addr == 32'h1234_5678 && dma_cmd.ntlp == 256 && dma_cmd.dir == DIR_TO_HOST
          && dma_cmd.target == 3'd3, "DMA command fields");
    check(n_dma_start == 1, "one DMA start pulse");
    rdchk(A_DMA_STATUS, {16'd77, 15'd0, 1'b1}, "DMA status");
    wr(A_IRQ_MASK, 32'h00FF_00F0);
    rdchk(A_IRQ_MASK, 32'h00FF_00F0, "interrupt mask");
    check(irq_mask == 32'h00FF_00F0, "interrupt mask output");
    rdchk(A_IRQ_STATUS, 32'h0102_0304, "interrupt status");
    wr(A_IRQ_STATUS, 32'h0000_0300);
    check(last_clear == 32'h0000_0300 && irq_clear == 0, "clear pulse");
    wr(A_RCFG_LEN, 32'd1_700_000);
    wr(A_RCFG_CTRL, 32'h0000_0021);
    check(rcfg_cmd.len_bytes == 32'd1_700_000 && rcfg_cmd.prr == 3'd2, "reconfiguration command");
    check(n_rcfg_start == 1, "one reconfiguration start pulse");
    rdchk(A_RCFG_CTRL, 32'h0000_002A, "reconfiguration control/status");
    rdchk(A_RCFG_COUNT, 32'd1234, "reconfiguration count");
    wr(A_PRR_RUN, 32'h0000_000A);
    check(prr_run == 3'b101, "run bits");
    rdchk(A_PRR_RUN, 32'hA, "run bits read");
    rdchk(A_PRR_STATUS, ((32'b101 << 1) | (32'b010 << 9) | (32'b100 << 17)), "PRR status");
    for (int p = 0; p < NUM_PRR; p++) begin
      wr(A_PRR_BASE + 8'(16 * p), 32'hA000_0000 + p);
      wr(A_PRR_BASE + 8'(16 * p + 4), 32'hB000_0000 + p);
    end
    for (int p = 0; p < NUM_PRR; p++) begin
      check(prr_reg1[p] == 32'hA000_0000 + p && prr_reg2[p] == 32'hB000_0000 + p, "PRR reg1/reg2 outputs");
      rdchk(A_PRR_BASE + 8'(16 * p), 32'hA000_0000 + p, "PRR reg1 read");
      rdchk(A_PRR_BASE + 8'(16 * p + 4), 32'hB000_0000 + p, "PRR reg2 read");
      rdchk(A_PRR_BASE + 8'(16 * p + 8), 32'h5000_0000 + p, "PRR ressreg read");
      rdchk(A_PRR_BASE + 8'(16 * p + 12), 32'h0000_0100 + p, "PRR bitstream ID read");
    end
    rdchk(8'hF0, 0, "unmapped address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
