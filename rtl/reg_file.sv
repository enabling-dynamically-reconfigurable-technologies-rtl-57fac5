// reg_file: the device register file that the host reaches with programmed
// I/O (single-DWORD memory reads and writes to BAR0).
//
// It holds the DMA set-up (host address, number of 128-byte TLPs, direction
// and target buffer), the reconfiguration control register, the interrupt
// mask, the run bits of the PRRs and, for each PRR, the four 32-bit registers
// an accelerator sees: two general-purpose inputs (reg1, reg2) written by the
// host, and the result register (ressreg) and bitstream ID that the
// accelerator drives and the host reads.  Writing bit 0 of DMA_CTRL or
// RCFG_CTRL issues a one-cycle start pulse together with the stored settings.
// Interrupt status bits live in irq_ctrl; a write to IRQ_STATUS is passed on
// as a write-1-to-clear pulse.
//
// Interface: writes take effect on the clock edge where wr_en is high; reads
// are combinational from rd_addr.  Addresses are byte offsets (see
// pcie_rp_pkg); unknown addresses read as zero.
//
// The set of registers follows the design description (DMA initiation
// registers, a reconfiguration control register whose value software polls,
// a status register, four registers per PRR of which the fourth is the
// bitstream ID).  The exact map and bit positions are this design's own.
module reg_file
  import pcie_rp_pkg::*;
#(
  parameter int unsigned NUM_PRR = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // programmed I/O
  input  logic              wr_en,
  input  logic [7:0]        wr_addr,
  input  logic [31:0]       wr_data,
  input  logic [7:0]        rd_addr,
  output logic [31:0]       rd_data,
  // DMA
  output dma_cmd_t          dma_cmd,
  input  logic              dma_busy,
  input  logic [15:0]       dma_tlps_done,
  // interrupts
  input  logic [31:0]       irq_status,
  output logic [31:0]       irq_clear,
  output logic [31:0]       irq_mask,
  // reconfiguration
  output rcfg_cmd_t         rcfg_cmd,
  input  logic              rcfg_need,
  input  logic              rcfg_done,
  input  logic              rcfg_busy,
  input  logic [31:0]       rcfg_count,
  // PRRs (index p-1 for PRR p)
  output logic [NUM_PRR-1:0] prr_run,
  output logic [31:0]       prr_reg1   [NUM_PRR],
  output logic [31:0]       prr_reg2   [NUM_PRR],
  input  logic [31:0]       prr_ressreg[NUM_PRR],
  input  logic [31:0]       prr_bitid  [NUM_PRR],
  input  logic [NUM_PRR-1:0] prr_complete,
  input  logic [NUM_PRR-1:0] prr_recv_empty,
  input  logic [NUM_PRR-1:0] prr_send_ready
);

  logic [31:0] dma_addr_q;
  logic [15:0] dma_ntlp_q;
  logic        dma_dir_q;
  logic [2:0]  dma_tgt_q;
  logic [2:0]  rcfg_prr_q;
  logic [31:0] rcfg_len_q;

  wire wr_prr_area = wr_en && (wr_addr >= A_PRR_BASE) && (wr_addr < A_PRR_BASE + 8'(16*NUM_PRR));
  wire [7:0] wr_prr_off = wr_addr - A_PRR_BASE;
  wire [7:0] rd_prr_off = rd_addr - A_PRR_BASE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_addr_q     <= '0;
      dma_ntlp_q     <= '0;
      dma_dir_q      <= 1'b0;
      dma_tgt_q      <= '0;
      rcfg_prr_q     <= '0;
      rcfg_len_q     <= '0;
      irq_mask       <= '0;
      prr_run        <= '0;
      dma_cmd.start  <= 1'b0;
      rcfg_cmd.start <= 1'b0;
      irq_clear      <= '0;
      for (int p = 0; p < NUM_PRR; p++) begin
        prr_reg1[p] <= '0;
        prr_reg2[p] <= '0;
      end
    end else begin
      dma_cmd.start  <= 1'b0;
      rcfg_cmd.start <= 1'b0;
      irq_clear      <= '0;
      if (wr_en) begin
        unique case (wr_addr)
          A_DMA_ADDR:   dma_addr_q <= {wr_data[31:2], 2'b00};
          A_DMA_NTLP:   dma_ntlp_q <= wr_data[15:0];
          A_DMA_CTRL: begin
            dma_dir_q     <= wr_data[1];
            dma_tgt_q     <= wr_data[6:4];
            dma_cmd.start <= wr_data[0];
          end
          A_IRQ_STATUS: irq_clear <= wr_data;
          A_IRQ_MASK:   irq_mask  <= wr_data;
          A_RCFG_CTRL: begin
            rcfg_prr_q     <= wr_data[6:4];
            rcfg_cmd.start <= wr_data[0];
          end
          A_RCFG_LEN:   rcfg_len_q <= {wr_data[31:2], 2'b00};
          A_PRR_RUN:    prr_run    <= wr_data[NUM_PRR:1];
          default: ;
        endcase
      end
      if (wr_prr_area) begin
        for (int p = 0; p < NUM_PRR; p++) begin
          if (wr_prr_off[7:4] == 4'(p) && wr_prr_off[3:0] == 4'h0) prr_reg1[p] <= wr_data;
          if (wr_prr_off[7:4] == 4'(p) && wr_prr_off[3:0] == 4'h4) prr_reg2[p] <= wr_data;
        end
      end
    end
  end

  always_comb begin
    dma_cmd.dir     = dma_dir_e'(dma_dir_q);
    dma_cmd.target  = dma_tgt_q;
    dma_cmd.addr    = dma_addr_q;
    dma_cmd.ntlp    = dma_ntlp_q;
    rcfg_cmd.prr       = rcfg_prr_q;
    rcfg_cmd.len_bytes = rcfg_len_q;
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_addr)
      A_DMA_ADDR:   rd_data = dma_addr_q;
      A_DMA_NTLP:   rd_data = {16'h0, dma_ntlp_q};
      A_DMA_CTRL:   rd_data = {25'h0, dma_tgt_q, 2'b00, dma_dir_q, 1'b0};
      A_DMA_STATUS: rd_data = {dma_tlps_done, 15'h0, dma_busy};
      A_IRQ_STATUS: rd_data = irq_status;
      A_IRQ_MASK:   rd_data = irq_mask;
      A_RCFG_CTRL:  rd_data = {25'h0, rcfg_prr_q, rcfg_busy, rcfg_done, rcfg_need, 1'b0};
      A_RCFG_LEN:   rd_data = rcfg_len_q;
      A_RCFG_COUNT: rd_data = rcfg_count;
      A_PRR_RUN:    rd_data = 32'(prr_run) << 1;
      A_PRR_STATUS: rd_data = (32'(prr_complete) << 1) | (32'(prr_recv_empty) << 9)
                              | (32'(prr_send_ready) << 17);
      default: begin
        if (rd_addr >= A_PRR_BASE && rd_addr < A_PRR_BASE + 8'(16*NUM_PRR)) begin
          for (int p = 0; p < NUM_PRR; p++) begin
            if (rd_prr_off[7:4] == 4'(p)) begin
              unique case (rd_prr_off[3:2])
                2'd0: rd_data = prr_reg1[p];
                2'd1: rd_data = prr_reg2[p];
                2'd2: rd_data = prr_ressreg[p];
                2'd3: rd_data = prr_bitid[p];
              endcase
            end
          end
        end
      end
    endcase
  end

endmodule
