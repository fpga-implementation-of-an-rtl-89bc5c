// mcm_29_43_gb - digit-serial multiplier block for 29x and 43x built by the
// graph-based (GB) shift-add graph.
//
// The graph follows the source design exactly and uses three adders:
//   7x  = (x << 3) - x
//   29x = (7x << 2) + x
//   43x = 29x + (7x << 1)
// Every shift is a ds_shl (a short bit delay) and every adder a ds_adder, so
// all three results leave as digit-serial words in the same cycles as the
// input digits. 7x is brought out too, so that a larger multiplier block can
// reuse it.
//
// Ports:  clk, rst (synchronous, active high), dig (digit index in the word,
//         0 = least significant), x (input digit), p7, p29, p43 (product
//         digits, same cycle).
// Timing: zero latency per digit; the products are exact as long as they fit
//         in the W = NDIG*D bit word.
module mcm_29_43_gb #(
  parameter int unsigned D    = 2,
  parameter int unsigned NDIG = 9
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(NDIG)-1:0] dig,
  input  logic [D-1:0]            x,
  output logic [D-1:0]            p7,
  output logic [D-1:0]            p29,
  output logic [D-1:0]            p43
);

  logic         first;
  logic [D-1:0] x_s3, p7_s2, p7_s1;

  assign first = (dig == '0);

  ds_shl #(.D(D), .NDIG(NDIG), .K(3)) u_x_s3  (.clk, .rst, .dig, .x(x),  .y(x_s3));
  ds_adder #(.D(D), .SUB(1'b1))       u_sub7  (.clk, .rst, .first, .a(x_s3), .b(x), .s(p7));

  ds_shl #(.D(D), .NDIG(NDIG), .K(2)) u_p7_s2 (.clk, .rst, .dig, .x(p7), .y(p7_s2));
  ds_adder #(.D(D), .SUB(1'b0))       u_add29 (.clk, .rst, .first, .a(p7_s2), .b(x), .s(p29));

  ds_shl #(.D(D), .NDIG(NDIG), .K(1)) u_p7_s1 (.clk, .rst, .dig, .x(p7), .y(p7_s1));
  ds_adder #(.D(D), .SUB(1'b0))       u_add43 (.clk, .rst, .first, .a(p29), .b(p7_s1), .s(p43));

endmodule
