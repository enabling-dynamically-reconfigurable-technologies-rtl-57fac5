// accel_example: an example accelerator for a partially reconfigurable
// region (PRR), written against the accelerator port map of the design.
//
// Port map (the contract every accelerator loaded into a PRR follows):
//   clk 125 MHz, resetN active low,
//   incomingData/incomingRen/incomingEmpty   64-bit input stream (show-ahead
//                                            FIFO: Ren pops the word shown),
//   outgoingData/outgoingWen/outgoingFull    64-bit output stream,
//   reg1, reg2                               32-bit general-purpose inputs,
//   ressreg                                  32-bit general-purpose output,
//   complete                                 execution finished,
//   bitstreamID                              identifies the loaded bitstream.
//
// What it computes is this design's own example, since the accelerators are
// the user's: each input word is returned with reg1 added to both 32-bit
// halves; reg2 gives the number of words to process; ressreg is the 32-bit
// sum of all output halves (a checksum software can compare).  After reg2
// words have been written out, 'complete' rises and stays high until reset.
//
// The stall state follows the port map rules: the accelerator stalls when
// there is no input or no room for results and resumes when both return.
// Throughput is one word per cycle; latency one cycle (one output register).
// Neither enable is asserted while resetN is low.
module accel_example #(
  parameter logic [31:0] BITSTREAM_ID = 32'h0000_0001
) (
  input  logic        clk,
  input  logic        resetN,
  input  logic [63:0] incomingData,
  output logic        incomingRen,
  input  logic        incomingEmpty,
  output logic [63:0] outgoingData,
  output logic        outgoingWen,
  input  logic        outgoingFull,
  input  logic [31:0] reg1,
  input  logic [31:0] reg2,
  output logic [31:0] ressreg,
  output logic        complete,
  output logic [31:0] bitstreamID
);

  typedef enum logic [1:0] {S_RUN, S_STALL, S_DONE} state_e;
  state_e      state;
  logic        out_v;
  logic [31:0] taken, written;

  wire [63:0] result = {incomingData[63:32] + reg1, incomingData[31:0] + reg1};

  assign outgoingWen = resetN && out_v && !outgoingFull;
  assign incomingRen = resetN && state != S_DONE && !incomingEmpty && taken < reg2
                       && (!out_v || outgoingWen);
  assign bitstreamID = BITSTREAM_ID;
  assign complete    = state == S_DONE;

  always_ff @(posedge clk or negedge resetN) begin
    if (!resetN) begin
      state        <= S_RUN;
      out_v        <= 1'b0;
      outgoingData <= '0;
      taken        <= '0;
      written      <= '0;
      ressreg      <= '0;
    end else begin
      if (incomingRen) begin
        out_v        <= 1'b1;
        outgoingData <= result;
        taken        <= taken + 1'b1;
      end else if (outgoingWen) begin
        out_v <= 1'b0;
      end
      if (outgoingWen) begin
        written <= written + 1'b1;
        ressreg <= ressreg + outgoingData[63:32] + outgoingData[31:0];
      end
      unique case (state)
        S_RUN, S_STALL: begin
          if (written == reg2 && reg2 != 0 && !out_v) state <= S_DONE;
          else if (!incomingRen && !outgoingWen)      state <= S_STALL;
          else                                         state <= S_RUN;
        end
        default: state <= S_DONE;
      endcase
    end
  end

endmodule
