// buffer_router: moves data between the two DMA FIFOs and the buffers of the
// regions.
//
// Host-to-FPGA: words leaving the DMA READ FIFO go to the Recv FIFO of the
// target chosen when the DMA was started (target 0 is the ICAP Recv FIFO,
// target p the Recv FIFO of PRR p).  Words for a target that does not exist
// are dropped so that the READ FIFO never blocks.  The route stays until the
// next host-to-FPGA DMA starts, so words still in flight reach their buffer.
// FPGA-to-host: while a DMA write of N TLPs is set up, exactly N*16 words are
// moved from the Send FIFO of the target PRR into the DMA WRITE FIFO; further
// results stay in the Send FIFO for the next DMA.
// Each direction moves at most one 64-bit word per cycle, whenever the
// source has data and the destination has room.
//
// The connections follow the data paths of the block diagram of the design;
// the per-DMA routing and the word quota are this design's own choices.
module buffer_router
  import pcie_rp_pkg::*;
#(
  parameter int unsigned NUM_PRR = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dma_cmd_t    dma_cmd,
  input  logic        dma_busy,
  // DMA READ FIFO (read side)
  output logic        rdf_rd_en,
  input  logic [63:0] rdf_rd_data,
  input  logic        rdf_empty,
  // Recv FIFOs: index 0 = ICAP, p = PRR p
  output logic        recv_wr_en  [NUM_PRR+1],
  output logic [63:0] recv_wr_data,
  input  logic        recv_full   [NUM_PRR+1],
  // Send FIFOs: index p-1 = PRR p
  output logic        send_rd_en  [NUM_PRR],
  input  logic [63:0] send_rd_data[NUM_PRR],
  input  logic        send_empty  [NUM_PRR],
  // DMA WRITE FIFO (write side)
  output logic        wrf_wr_en,
  output logic [63:0] wrf_wr_data,
  input  logic        wrf_full
);

  logic [2:0]  rd_tgt_q, wr_tgt_q;
  logic [31:0] wr_quota_q;

  wire rd_tgt_ok = 32'(rd_tgt_q) <= NUM_PRR;
  always_comb begin
    recv_wr_data = rdf_rd_data;
    rdf_rd_en    = !rdf_empty && !rd_tgt_ok;    // no such region: drop
    for (int i = 0; i <= NUM_PRR; i++) begin
      recv_wr_en[i] = !rdf_empty && rd_tgt_q == 3'(i) && !recv_full[i];
      if (recv_wr_en[i]) rdf_rd_en = 1'b1;
    end
  end

  always_comb begin
    wrf_wr_en   = 1'b0;
    wrf_wr_data = '0;
    for (int i = 0; i < NUM_PRR; i++) begin
      send_rd_en[i] = 1'b0;
      if (wr_tgt_q == 3'(i + 1)) begin
        wrf_wr_data = send_rd_data[i];
        if (wr_quota_q != 0 && !send_empty[i] && !wrf_full) begin
          send_rd_en[i] = 1'b1;
          wrf_wr_en     = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_tgt_q   <= '0;
      wr_tgt_q   <= '0;
      wr_quota_q <= '0;
    end else begin
      if (wrf_wr_en) wr_quota_q <= wr_quota_q - 1'b1;
      if (dma_cmd.start && !dma_busy && dma_cmd.ntlp != 0) begin
        if (dma_cmd.dir == DIR_TO_FPGA) begin
          rd_tgt_q <= dma_cmd.target;
        end else begin
          wr_tgt_q   <= dma_cmd.target;
          wr_quota_q <= 32'(dma_cmd.ntlp) * TLP_WORDS;
        end
      end
    end
  end

endmodule
