// tb_buffer_router: queue models stand for the DMA FIFOs and the region
// buffers, with random 'full' on the destinations.  Checks that words of a
// host-to-FPGA DMA reach only the chosen Recv FIFO (ICAP or a PRR) in order,
// that words for a missing region are dropped, and that an FPGA-to-host DMA
// of N TLPs moves exactly N*16 words from the chosen Send FIFO, in order.
module tb_buffer_router;
  import pcie_rp_pkg::*;
  localparam int NUM_PRR = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  dma_cmd_t    dma_cmd = '0;
  logic        dma_busy = 1'b0;
  logic        rdf_rd_en, rdf_empty = 1'b1;
  logic [63:0] rdf_rd_data = '0;
  logic        recv_wr_en[NUM_PRR+1], recv_full[NUM_PRR+1];
  logic [63:0] recv_wr_data;
  logic        send_rd_en[NUM_PRR], send_empty[NUM_PRR];
  logic [63:0] send_rd_data[NUM_PRR];
  logic        wrf_wr_en, wrf_full = 1'b0;
  logic [63:0] wrf_wr_data;

  buffer_router #(.NUM_PRR(NUM_PRR)) dut (.*);

  logic [63:0] rdfq[$], recvq[NUM_PRR+1][$], sendq[NUM_PRR][$], wrfq[$];

  always @(posedge clk) begin
    if (rdf_rd_en) void'(rdfq.pop_front());
    for (int i = 0; i <= NUM_PRR; i++) if (recv_wr_en[i]) recvq[i].push_back(recv_wr_data);
    for (int i = 0; i < NUM_PRR; i++) if (send_rd_en[i]) void'(sendq[i].pop_front());
    if (wrf_wr_en) wrfq.push_back(wrf_wr_data);
  end
  always @(negedge clk) begin
    rdf_empty   <= rdfq.size() == 0;
    rdf_rd_data <= (rdfq.size() != 0) ? rdfq[0] : '0;
    for (int i = 0; i <= NUM_PRR; i++) recv_full[i] <= $urandom_range(0, 2) == 0;
    for (int i = 0; i < NUM_PRR; i++) begin
      send_empty[i]   <= sendq[i].size() == 0;
      send_rd_data[i] <= (sendq[i].size() != 0) ? sendq[i][0] : '0;
    end
    wrf_full <= $urandom_range(0, 2) == 0;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic start(input bit to_host, input logic [2:0] tgt, input int ntlp);
    @(negedge clk) begin
      dma_cmd.start = 1'b1; dma_cmd.dir = dma_dir_e'(to_host); dma_cmd.target = tgt;
      dma_cmd.ntlp = 16'(ntlp);
    end
    @(negedge clk) dma_cmd.start = 1'b0;
  endtask
  function automatic int total_recv();
    int t = 0;
    for (int i = 0; i <= NUM_PRR; i++) t += recvq[i].size();
    return t;
  endfunction

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
    // host-to-FPGA to each target in turn, including a missing one (5)
    for (int tgt = 0; tgt <= 5; tgt++) begin
      int before_total;
      if (tgt == 4) continue;
      before_total = total_recv();
      start(1'b0, 3'(tgt), 3);
      for (int i = 0; i < 48; i++) rdfq.push_back({32'(tgt), 32'(i)});
      repeat (300) @(posedge clk);
      check(rdfq.size() == 0, "READ FIFO drained");
      if (tgt <= NUM_PRR) begin
        automatic bit ok = recvq[tgt].size() == 48;
        for (int i = 0; i < 48 && ok; i++) ok = recvq[tgt][i] == {32'(tgt), 32'(i)};
        check(ok, $sformatf("target %0d got its 48 words in order", tgt));
        check(total_recv() == before_total + 48, "no words elsewhere");
      end else begin
        check(total_recv() == before_total, "words for a missing region dropped");
      end
    end
    // FPGA-to-host: 2 TLPs (32 words) from PRR 3 with 40 words available
    for (int i = 0; i < 40; i++) sendq[2].push_back(64'hF000_0000_0000_0000 | 64'(i));
    for (int i = 0; i < 10; i++) sendq[0].push_back(64'hE000_0000_0000_0000 | 64'(i));
    start(1'b1, 3'd3, 2);
    repeat (300) @(posedge clk);
    begin
      automatic bit ok = wrfq.size() == 32;
      for (int i = 0; i < 32 && ok; i++) ok = wrfq[i] == (64'hF000_0000_0000_0000 | 64'(i));
      check(ok, $sformatf("32 words moved in order (got %0d)", wrfq.size()));
    end
    check(sendq[2].size() == 8 && sendq[0].size() == 10, "the rest stays in the Send FIFOs");
    // a start while the engine is busy is ignored
    dma_busy = 1'b1;
    start(1'b1, 3'd1, 1);
    repeat (50) @(posedge clk);
    check(sendq[0].size() == 10 && wrfq.size() == 32, "start ignored while busy");
    dma_busy = 1'b0;
    start(1'b1, 3'd1, 1);
    repeat (100) @(posedge clk);
    check(sendq[0].size() == 0 && wrfq.size() == 42, "Send FIFO of PRR 1 drained up to its quota");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
