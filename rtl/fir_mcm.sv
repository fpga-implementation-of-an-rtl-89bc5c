// fir_mcm - multiple constant multiplication (MCM) block of the 16-tap filter.
//
// The same input sample x is multiplied by all sixteen filter coefficients
// with shifts and adds only, no multipliers. The products leave as
// digit-serial words (D bits per clock, least significant digit first) in the
// same cycles as the input digits, one stream per tap, ready for the
// transposed adder chain.
//
// The pair 29x, 43x is built by the source design's own graph: the GB graph
// (mcm_29_43_gb, default) or the CSE graph (mcm_29_43_cse) chosen by ALGO.
// The graph for the other coefficients is this design's own choice, a
// minimal one that reuses what the pair block already produces:
//   0 -> constant 0        4, 8, 16, 32, 64, 128 -> shifts of x
//   3x  = x + (x<<1)       (GB; the CSE block supplies 3x)
//   5x  = x + (x<<2)       (GB; the CSE block supplies 5x)
//   9x  = x + (x<<3)       15x = (x<<4) - x        18x = 9x << 1
//   23x = 7x + (x<<4)      (GB, reusing 7x)   or  15x + (x<<3) (CSE)
// With GB the block has 8 adders/subtractors; with CSE it has 8 as well but
// a different mix.
//
// Ports:  clk, rst (synchronous, active high), dig (digit index, 0 = least
//         significant), x (input digit), prod[k] (digit of h[k]*x).
// Timing: zero latency per digit. The coefficient list h[] in fir_pkg must
//         match this graph; the testbench checks it does.
module fir_mcm #(
  parameter int unsigned D    = fir_pkg::D,
  parameter int unsigned NDIG = fir_pkg::NDIG,
  parameter fir_pkg::mcm_algo_e ALGO = fir_pkg::MCM_GB
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [$clog2(NDIG)-1:0]       dig,
  input  logic [D-1:0]                  x,
  output logic [fir_pkg::NTAPS-1:0][D-1:0]       prod
);

  logic         first;
  logic [D-1:0] x_s2, x_s3, x_s4, x_s5, x_s6, x_s7;
  logic [D-1:0] p3, p5, p9, p15, p18, p23, p29, p43;

  assign first = (dig == '0);

  // Shifted copies of x.
  ds_shl #(.D(D), .NDIG(NDIG), .K(2)) u_x_s2 (.clk, .rst, .dig, .x(x), .y(x_s2));
  ds_shl #(.D(D), .NDIG(NDIG), .K(3)) u_x_s3 (.clk, .rst, .dig, .x(x), .y(x_s3));
  ds_shl #(.D(D), .NDIG(NDIG), .K(4)) u_x_s4 (.clk, .rst, .dig, .x(x), .y(x_s4));
  ds_shl #(.D(D), .NDIG(NDIG), .K(5)) u_x_s5 (.clk, .rst, .dig, .x(x), .y(x_s5));
  ds_shl #(.D(D), .NDIG(NDIG), .K(6)) u_x_s6 (.clk, .rst, .dig, .x(x), .y(x_s6));
  ds_shl #(.D(D), .NDIG(NDIG), .K(7)) u_x_s7 (.clk, .rst, .dig, .x(x), .y(x_s7));

  // Fundamentals common to both graphs.
  ds_adder #(.D(D), .SUB(1'b0)) u_add9  (.clk, .rst, .first, .a(x_s3), .b(x), .s(p9));
  ds_adder #(.D(D), .SUB(1'b1)) u_sub15 (.clk, .rst, .first, .a(x_s4), .b(x), .s(p15));
  ds_shl #(.D(D), .NDIG(NDIG), .K(1)) u_p9_s1 (.clk, .rst, .dig, .x(p9), .y(p18));

  if (ALGO == fir_pkg::MCM_GB) begin : g_gb
    logic [D-1:0] p7, x_s1;
    mcm_29_43_gb #(.D(D), .NDIG(NDIG)) u_pair (
      .clk, .rst, .dig, .x, .p7(p7), .p29(p29), .p43(p43)
    );
    ds_shl #(.D(D), .NDIG(NDIG), .K(1)) u_x_s1 (.clk, .rst, .dig, .x(x), .y(x_s1));
    ds_adder #(.D(D), .SUB(1'b0)) u_add3  (.clk, .rst, .first, .a(x_s1), .b(x), .s(p3));
    ds_adder #(.D(D), .SUB(1'b0)) u_add5  (.clk, .rst, .first, .a(x_s2), .b(x), .s(p5));
    ds_adder #(.D(D), .SUB(1'b0)) u_add23 (.clk, .rst, .first, .a(p7), .b(x_s4), .s(p23));
  end else begin : g_cse
    mcm_29_43_cse #(.D(D), .NDIG(NDIG)) u_pair (
      .clk, .rst, .dig, .x, .p3(p3), .p5(p5), .p29(p29), .p43(p43)
    );
    ds_adder #(.D(D), .SUB(1'b0)) u_add23 (.clk, .rst, .first, .a(p15), .b(x_s3), .s(p23));
  end

  // Tap order follows fir_pkg::H = {0,3,4,5,8,9,15,16,18,23,29,32,43,64,128,4}.
  assign prod[0]  = '0;
  assign prod[1]  = p3;
  assign prod[2]  = x_s2;
  assign prod[3]  = p5;
  assign prod[4]  = x_s3;
  assign prod[5]  = p9;
  assign prod[6]  = p15;
  assign prod[7]  = x_s4;
  assign prod[8]  = p18;
  assign prod[9]  = p23;
  assign prod[10] = p29;
  assign prod[11] = x_s5;
  assign prod[12] = p43;
  assign prod[13] = x_s6;
  assign prod[14] = x_s7;
  assign prod[15] = x_s2;

endmodule
