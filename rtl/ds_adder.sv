// ds_adder - digit-serial adder / subtractor.
//
// Adds (or, with SUB = 1, subtracts) two two's-complement words that arrive
// least significant digit first, D bits per clock. D full adders ripple the
// carry across the digit inside one cycle; the carry out of the top adder is
// stored in a single flip-flop and fed back as the carry into the next digit,
// exactly the digit-serial adder of the source design (with D = 1 it is the
// classic bit-serial adder). The sum digit is combinational from the inputs.
//
// Word framing is this design's own addition: while `first` is high (the
// least significant digit of a word) the stored carry is ignored and the
// carry-in is 0 for an adder, 1 for a subtractor (a - b = a + ~b + 1).
// Reset loads the carry that adding (subtracting) zero words leaves behind,
// so a block that leaves reset in the middle of a word still outputs 0.
//
// Ports:  clk, rst (synchronous, active high), first (LSD of a word),
//         a, b (input digits), s (result digit, same cycle).
// Timing: zero latency; one carry flip-flop.
module ds_adder #(
  parameter int unsigned D   = 2,
  parameter bit          SUB = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         first,
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);

  logic         carry_q;
  logic         cin, cout;
  logic [D-1:0] bx;

  // D full adders in a ripple: {cout, s} = a + b' + cin.
  always_comb begin
    bx          = SUB ? ~b : b;
    cin         = first ? SUB : carry_q;
    {cout, s}   = {1'b0, a} + {1'b0, bx} + {{D{1'b0}}, cin};
  end

  always_ff @(posedge clk) begin
    if (rst) carry_q <= SUB;   // the carry of 0 + 0 (or 0 - 0): a zero stream stays zero
    else     carry_q <= cout;
  end

endmodule
