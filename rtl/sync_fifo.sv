// sync_fifo: single-clock first-in first-out buffer, used for every data
// buffer of the design (DMA READ and DMA WRITE FIFO, the Send and Recv FIFO
// of each PRR and the ICAP Recv FIFO).
//
// The storage is a plain array (one write port, one read port), so synthesis
// maps it to block RAM.  The read side is show-ahead: rd_data is the oldest
// word whenever empty is low, and rd_en pops it.  A push and a pop may happen
// in the same cycle, also when the FIFO is full (the pop makes room).  'level'
// counts the stored words so that producers can check for room for a whole
// packet.  Writing when full or reading when empty is ignored; assertions
// flag it in simulation.
//
// The 64-bit width and 32 KB depth (4096 words) are the buffer size given
// for the design; show-ahead reads and the level output are this design's
// own choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  wire do_rd = rd_en && !empty;
  wire do_wr = wr_en && (!full || do_rd);

  assign empty   = (level == 0);
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
