// icap_model: behavioural stand-in for the FPGA's internal configuration
// access port.  Every clock edge with CE and WRITE low (active low) takes
// one 32-bit configuration word; the model counts the words, keeps a running
// checksum (sum of word * (index + 1)) and the cycle of the first and last
// word so that tests can check content and rate.  BUSY can be raised on
// random cycles to exercise the pause of the feeding logic.
module icap_model #(
  parameter bit RANDOM_BUSY = 1'b0
) (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [31:0] i_data,
  output logic        busy
);
  int          n_words   = 0;
  logic [31:0] checksum  = '0;
  longint      cycle     = 0;
  longint      first_cyc = -1, last_cyc = -1;
  int          busy_cycles = 0;

  initial busy = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    busy  <= RANDOM_BUSY ? ($urandom_range(0, 7) == 0) : 1'b0;
    if (busy) busy_cycles++;
    if (!ce_n && !write_n) begin
      checksum = checksum + i_data * 32'(n_words + 1);
      if (first_cyc < 0) first_cyc = cycle;
      last_cyc = cycle;
      n_words++;
    end
  end
endmodule
