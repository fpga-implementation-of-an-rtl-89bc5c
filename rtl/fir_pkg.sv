// fir_pkg - shared sizes and coefficients of the 16-tap digit-serial FIR filter.
//
// The filter works on two's-complement words that travel least significant
// digit first, D bits per clock. A word is W bits long, so one sample takes
// NDIG = W/D clock cycles. The digit size D = 2 and the 16 taps follow the
// source design; the coefficient values are those read off its simulation
// listing (a1..a15, with the middle four and a0 inferred, see README). The
// 8-bit input width matches its 8-bit data port. W = 18 is this design's
// choice: it is the smallest multiple of D that holds sum(|h|) * 2^(XW-1)
// as a signed number, so the filter can never overflow.
package fir_pkg;

  localparam int unsigned NTAPS = 16;   // filter length
  localparam int unsigned D     = 2;    // digit size (bits per clock)
  localparam int unsigned XW    = 8;    // input sample width (signed)
  localparam int unsigned W     = 18;   // digit-serial word length
  localparam int unsigned NDIG  = W / D; // clock cycles per sample

  // Coefficients h[0]..h[15] (y[n] = sum h[k] x[n-k]).
  localparam int H [NTAPS] = '{0, 3, 4, 5, 8, 9, 15, 16, 18, 23, 29, 32, 43, 64, 128, 4};

  // Which shift-add graph builds 29x and 43x.
  typedef enum logic {MCM_GB = 1'b0, MCM_CSE = 1'b1} mcm_algo_e;

  // Sum of |h[k]|, the DC gain of the filter.
  function automatic int coeff_abs_sum();
    int s = 0;
    for (int k = 0; k < int'(NTAPS); k++) s += (H[k] < 0) ? -H[k] : H[k];
    return s;
  endfunction

endpackage
