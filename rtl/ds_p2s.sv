// ds_p2s - turns a parallel input sample into a digit-serial word.
//
// At the clock edge where `load` is high the XW-bit two's-complement sample
// is sign-extended to W = NDIG*D bits and stored; from the next cycle on the
// register hands out one D-bit digit per clock, least significant first.
// The source design feeds its filter with a 2-bit digit x[1:0]; the
// converter that produces that digit from a whole sample is this design's
// own.
//
// Ports:  clk, rst (synchronous, active high), load, x_in (signed sample),
//         digit (current digit of the stored word).
// Timing: digit i of a sample loaded at edge t appears in cycle t+1+i.
module ds_p2s #(
  parameter int unsigned D    = 2,
  parameter int unsigned NDIG = 9,
  parameter int unsigned XW   = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [XW-1:0] x_in,
  output logic [D-1:0]  digit
);

  localparam int unsigned W = NDIG * D;

  logic [W-1:0] sreg_q;

  always_ff @(posedge clk) begin
    if (rst)       sreg_q <= '0;
    else if (load) sreg_q <= W'($signed(x_in));
    else           sreg_q <= sreg_q >> D;
  end

  assign digit = sreg_q[D-1:0];

endmodule
