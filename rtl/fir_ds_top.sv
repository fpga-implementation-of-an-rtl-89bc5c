// fir_ds_top - 16-tap digit-serial transposed-form FIR filter whose
// multipliers are replaced by one shared shift-add MCM block.
//
//   x_in --> ds_p2s --digit--> fir_mcm --16 product digits--> fir_ds_chain
//                                                              |
//   y_out <-- ds_s2p <------------------ output digit ---------+
//
// A sample enters as a parallel XW-bit word and is cut into D-bit digits
// (D = 2), least significant first. The MCM block forms all sixteen
// products h[k]*x with shifts and digit-serial adders (the 29x/43x pair by
// the GB graph by default, or the CSE graph with ALGO = MCM_CSE), and the
// transposed chain adds them to the delayed partial sums, one digit per
// clock. The output digits are gathered into a W-bit word.
//
// Interface (fixed rate, one sample every NDIG = W/D clocks):
//   x_take  high for one cycle every NDIG cycles; the sample on x_in is
//           captured at the clock edge that ends that cycle.
//   y_out   y[n] = sum_k h[k] x[n-k], W-bit two's complement, never
//           overflows; y_valid pulses for one cycle when it changes.
// Timing: y[n] appears (y_valid) NDIG clock edges after the edge that
//   captured x[n]. The first x_take comes in the first cycle after reset.
//
// Follows the source design: 16 taps, transposed form, digit size 2, MCM
// by shift-add graphs, the GB graph for 29x/43x, 8-bit input. This design's
// own: word length, converters, word framing, reset style and the graph for
// the coefficients the source design does not draw.
module fir_ds_top
  import fir_pkg::*;
#(
  parameter mcm_algo_e ALGO = MCM_GB
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] x_in,
  output logic          x_take,
  output logic [W-1:0]  y_out,
  output logic          y_valid
);

  logic [$clog2(NDIG)-1:0] dig;
  logic                    done;
  logic [D-1:0]            x_dig, y_dig;
  logic [NTAPS-1:0][D-1:0] prod;

  ds_ctrl #(.NDIG(NDIG)) u_ctrl (.clk, .rst, .dig, .take(x_take), .done);

  ds_p2s #(.D(D), .NDIG(NDIG), .XW(XW)) u_p2s (
    .clk, .rst, .load(x_take), .x_in, .digit(x_dig)
  );

  fir_mcm #(.D(D), .NDIG(NDIG), .ALGO(ALGO)) u_mcm (
    .clk, .rst, .dig, .x(x_dig), .prod
  );

  fir_ds_chain #(.D(D), .NDIG(NDIG)) u_chain (
    .clk, .rst, .dig, .prod, .y(y_dig)
  );

  ds_s2p #(.D(D), .NDIG(NDIG)) u_s2p (
    .clk, .rst, .digit(y_dig), .done, .y_out, .y_valid
  );

endmodule
