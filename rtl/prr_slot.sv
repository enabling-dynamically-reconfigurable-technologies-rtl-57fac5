// prr_slot: one partially reconfigurable region (PRR) with its static
// buffers.
//
// The slot holds the region's Recv FIFO (data from the host), its Send FIFO
// (results for the host), both 64 bits wide and 32 KB deep, and the
// accelerator currently loaded, connected through the accelerator port map.
// Here the accelerator is accel_example; in the FPGA this instance is the
// reconfigurable partition and any module with the same ports may take its
// place.  The accelerator is held in reset unless software has set the
// slot's run bit and the slot is not being reconfigured; while it is held,
// its read and write enables are blocked (decoupled) so that a partition in
// reset or being rewritten cannot disturb the buffers.
//
// The slot also derives three interrupt events, each a one-cycle pulse on a
// rising edge:
//   ev_need     the running accelerator has used up its input (Recv FIFO
//               empty, not complete),
//   ev_results  the Send FIFO holds RESULT_WORDS words (one full DMA), or the
//               accelerator has completed with results left in it,
//   ev_done     the accelerator has completed.
//
// Buffer sizes, the port map and the event list follow the design
// description; the run bit, reset while reconfiguring and the event
// conditions are this design's own choices.
module prr_slot #(
  parameter int unsigned FIFO_DEPTH   = 4096,
  parameter int unsigned RESULT_WORDS = FIFO_DEPTH,
  parameter logic [31:0] BITSTREAM_ID = 32'h0000_0001,
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          hold,          // being reconfigured
  // Recv FIFO write side
  input  logic          recv_wr_en,
  input  logic [63:0]   recv_wr_data,
  output logic          recv_full,
  output logic          recv_empty,
  // Send FIFO read side
  input  logic          send_rd_en,
  output logic [63:0]   send_rd_data,
  output logic          send_empty,
  output logic [LW-1:0] send_level,
  // registers
  input  logic [31:0]   reg1,
  input  logic [31:0]   reg2,
  output logic [31:0]   ressreg,
  output logic [31:0]   bitstream_id,
  output logic          complete,
  output logic          send_ready,    // Send FIFO holds a full DMA of results
  // events
  output logic          ev_need,
  output logic          ev_results,
  output logic          ev_done
);

  logic        acc_rst_n;
  logic [63:0] in_data, out_data;
  logic        in_ren, in_empty, out_wen, out_full;
  logic        acc_ren, acc_wen;

  assign acc_rst_n = rst_n && run && !hold;
  // Decoupling: a partition in reset (or half-configured) must not touch the
  // static buffers, whatever its outputs do.
  assign in_ren  = acc_ren && acc_rst_n;
  assign out_wen = acc_wen && acc_rst_n;

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_recv (
    .clk, .rst_n,
    .wr_en(recv_wr_en), .wr_data(recv_wr_data), .full(recv_full),
    .rd_en(in_ren), .rd_data(in_data), .empty(in_empty), .level()
  );

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_send (
    .clk, .rst_n,
    .wr_en(out_wen), .wr_data(out_data), .full(out_full),
    .rd_en(send_rd_en), .rd_data(send_rd_data), .empty(send_empty), .level(send_level)
  );

  // The reconfigurable partition.
  accel_example #(.BITSTREAM_ID(BITSTREAM_ID)) u_acc (
    .clk, .resetN(acc_rst_n),
    .incomingData(in_data), .incomingRen(acc_ren), .incomingEmpty(in_empty),
    .outgoingData(out_data), .outgoingWen(acc_wen), .outgoingFull(out_full),
    .reg1, .reg2, .ressreg, .complete, .bitstreamID(bitstream_id)
  );

  assign recv_empty = in_empty;
  assign send_ready = send_level >= LW'(RESULT_WORDS);

  wire need_c    = acc_rst_n && in_empty && !complete;
  wire results_c = send_ready || (complete && !send_empty);
  logic need_q, results_q, done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      need_q     <= 1'b0;
      results_q  <= 1'b0;
      done_q     <= 1'b0;
      ev_need    <= 1'b0;
      ev_results <= 1'b0;
      ev_done    <= 1'b0;
    end else begin
      need_q     <= need_c;
      results_q  <= results_c;
      done_q     <= complete;
      ev_need    <= need_c && !need_q;
      ev_results <= results_c && !results_q;
      ev_done    <= complete && !done_q;
    end
  end

endmodule
