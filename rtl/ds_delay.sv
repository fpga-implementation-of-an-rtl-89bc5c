// ds_delay - one-sample delay (z^-1) of a digit-serial word.
//
// A word occupies NDIG consecutive clock cycles, so delaying it by one sample
// period is a shift register NDIG digits deep: the digit that leaves is the
// same digit of the previous word. This is the register of the transposed
// FIR filter; its form as a digit shift register is this design's reading of
// a z^-1 in a digit-serial datapath.
//
// Ports:  clk, rst (synchronous, active high, clears the line), d, q.
// Timing: q is d delayed by NDIG cycles; NDIG*D flip-flops.
module ds_delay #(
  parameter int unsigned D    = 2,
  parameter int unsigned NDIG = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [D-1:0] d,
  output logic [D-1:0] q
);

  logic [D-1:0] line_q [NDIG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NDIG); i++) line_q[i] <= '0;
    end else begin
      line_q[0] <= d;
      for (int i = 1; i < int'(NDIG); i++) line_q[i] <= line_q[i-1];
    end
  end

  assign q = line_q[NDIG-1];

endmodule
