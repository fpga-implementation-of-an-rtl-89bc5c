// mcm_29_43_cse - digit-serial multiplier block for 29x and 43x built by the
// common-subexpression (CSE) shift-add graph.
//
// The graph follows the source design and uses four adders, sharing the
// partial products 5x and 3x between both outputs:
//   5x  = (x << 2) + x
//   3x  = (x << 1) + x
//   29x = 5x + (3x << 3)
//   43x = 3x + (5x << 3)
// It is the alternative to mcm_29_43_gb (three adders) and can be selected
// in the filter by a parameter. 3x and 5x are brought out for reuse.
//
// Ports:  clk, rst (synchronous, active high), dig (digit index in the word,
//         0 = least significant), x (input digit), p3, p5, p29, p43 (product
//         digits, same cycle).
// Timing: zero latency per digit.
module mcm_29_43_cse #(
  parameter int unsigned D    = 2,
  parameter int unsigned NDIG = 9
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(NDIG)-1:0] dig,
  input  logic [D-1:0]            x,
  output logic [D-1:0]            p3,
  output logic [D-1:0]            p5,
  output logic [D-1:0]            p29,
  output logic [D-1:0]            p43
);

  logic         first;
  logic [D-1:0] x_s1, x_s2, p3_s3, p5_s3;

  assign first = (dig == '0);

  ds_shl #(.D(D), .NDIG(NDIG), .K(2)) u_x_s2  (.clk, .rst, .dig, .x(x), .y(x_s2));
  ds_adder #(.D(D), .SUB(1'b0))       u_add5  (.clk, .rst, .first, .a(x_s2), .b(x), .s(p5));

  ds_shl #(.D(D), .NDIG(NDIG), .K(1)) u_x_s1  (.clk, .rst, .dig, .x(x), .y(x_s1));
  ds_adder #(.D(D), .SUB(1'b0))       u_add3  (.clk, .rst, .first, .a(x_s1), .b(x), .s(p3));

  ds_shl #(.D(D), .NDIG(NDIG), .K(3)) u_p3_s3 (.clk, .rst, .dig, .x(p3), .y(p3_s3));
  ds_adder #(.D(D), .SUB(1'b0))       u_add29 (.clk, .rst, .first, .a(p5), .b(p3_s3), .s(p29));

  ds_shl #(.D(D), .NDIG(NDIG), .K(3)) u_p5_s3 (.clk, .rst, .dig, .x(p5), .y(p5_s3));
  ds_adder #(.D(D), .SUB(1'b0))       u_add43 (.clk, .rst, .first, .a(p3), .b(p5_s3), .s(p43));

endmodule
