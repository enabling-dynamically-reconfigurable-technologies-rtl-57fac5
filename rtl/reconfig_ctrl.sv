// reconfig_ctrl: reconfiguration controller feeding a partial bitstream to
// the internal configuration access port (ICAP).
//
// Software writes the bitstream length (bytes) and then the start bit of the
// reconfiguration control register, naming the PRR to be replaced.  The
// controller then waits for the bitstream, which arrives by DMA in the ICAP
// Recv FIFO as 64-bit words, and writes it to the ICAP as 32-bit words, the
// upper half of each FIFO word first, one word per clock cycle.  At 125 MHz
// that is the port's full 500 MB/s.
//
// Flow control towards software (double buffering): the bitstream is asked
// for in chunks of CHUNK_WORDS 64-bit words (half the FIFO; the last chunk
// is the remainder).  A new chunk is asked for when the previous one has
// fully arrived and the FIFO has room for another, so one chunk is written
// to the ICAP while software moves the next.  Each request is a one-cycle
// 'ev_need' pulse ("reconfiguration controller needs data" interrupt event);
// software answers it with one DMA of the chunk.  When the last word has
// been written, 'done' rises with a one-cycle 'ev_done' event ("reconfiguration
// complete").  Padding beyond the bitstream length (DMAs move whole 128-byte
// TLPs) is discarded once the controller is idle again.  While busy, the PRR under reconfiguration is held in reset
// (hold_prr), so that its buffers return to the application only afterwards.
//
// ICAP interface (Virtex-5 style): icap_ce_n and icap_write_n active low,
// 32-bit icap_i, all registered.  icap_busy pauses the feed; it takes effect
// one cycle later, since the outputs are registered.
//
// From the design description: the control register, the 32-bit word
// sequence to the ICAP, the data-needed and completion events, the
// double-buffering, the 1.7 MB bitstreams at 488 of 500 MB/s.  Own choices:
// a half-FIFO chunk, the length register, holding the PRR in reset, no bit
// swapping of the bitstream (software supplies ICAP-ordered words).
module reconfig_ctrl
  import pcie_rp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 4096,
  parameter int unsigned CHUNK_WORDS = FIFO_DEPTH / 2,
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rcfg_cmd_t     rcfg_cmd,
  // ICAP Recv FIFO
  input  logic          fifo_push,     // a word is being written into the FIFO
  output logic          fifo_rd_en,
  input  logic [63:0]   fifo_rd_data,
  input  logic          fifo_empty,
  input  logic [LW-1:0] fifo_level,
  // ICAP
  output logic          icap_ce_n,
  output logic          icap_write_n,
  output logic [31:0]   icap_i,
  input  logic          icap_busy,
  // status and events
  output logic          busy,
  output logic          done,
  output logic          need_data,
  output logic [31:0]   count,         // 32-bit words written to the ICAP
  output logic [2:0]    hold_prr,      // PRR held in reset while busy (0: none)
  output logic          ev_need,
  output logic          ev_done
);

  logic [31:0] total_dw_q;   // bitstream length in 32-bit words
  logic [31:0] recv_dw_q;    // 32-bit words received into the FIFO
  logic        lo_pend_q;    // upper half of the FIFO head already written
  logic [31:0] asked_dw_q;   // 32-bit words asked for so far

  wire [LW-1:0] free = LW'(FIFO_DEPTH) - fifo_level;
  assign need_data = busy && asked_dw_q < total_dw_q && recv_dw_q >= asked_dw_q
                     && (free >= LW'(CHUNK_WORDS));

  wire issue    = busy && !icap_busy && !fifo_empty && (count < total_dw_q);
  wire [31:0] dw = lo_pend_q ? fifo_rd_data[31:0] : fifo_rd_data[63:32];
  wire last_dw  = (count + 1 == total_dw_q);
  // pop after the lower half, or after the upper half when it is the last
  // word (an odd length leaves a padding half).  While idle, words left over
  // from a DMA rounded up to whole TLPs are discarded.
  assign fifo_rd_en = (issue && (lo_pend_q || last_dw)) || (!busy && !fifo_empty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      count        <= '0;
      total_dw_q   <= '0;
      recv_dw_q    <= '0;
      lo_pend_q    <= 1'b0;
      asked_dw_q   <= '0;
      hold_prr     <= '0;
      ev_need      <= 1'b0;
      ev_done      <= 1'b0;
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b1;
      icap_i       <= '0;
    end else begin
      ev_need      <= need_data;
      if (need_data) asked_dw_q <= asked_dw_q + 2 * CHUNK_WORDS;
      ev_done      <= 1'b0;
      icap_ce_n    <= !issue;
      icap_write_n <= !issue;
      if (issue) icap_i <= dw;
      if (busy && fifo_push) recv_dw_q <= recv_dw_q + 2;
      if (!busy) begin
        if (rcfg_cmd.start && rcfg_cmd.len_bytes >= 4) begin
          busy       <= 1'b1;
          done       <= 1'b0;
          count      <= '0;
          total_dw_q <= rcfg_cmd.len_bytes >> 2;
          recv_dw_q  <= '0;
          asked_dw_q <= '0;
          lo_pend_q  <= 1'b0;
          hold_prr   <= rcfg_cmd.prr;
        end
      end else if (issue) begin
        count     <= count + 1'b1;
        lo_pend_q <= !lo_pend_q && !last_dw;
        if (last_dw) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          ev_done  <= 1'b1;
          hold_prr <= '0;
        end
      end
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) fifo_rd_en |-> !fifo_empty);

endmodule
