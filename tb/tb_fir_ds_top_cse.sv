// tb_fir_ds_top_cse - end-to-end test of the filter built with the CSE graph.
//
// The filter is instantiated with the CSE multiplier graph (ALGO = MCM_CSE,
// D = 2, W = 18). The testbench offers a new sample whenever the filter asks
// for one (x_take) and checks every output word against a convolution
// computed here from the coefficient list, and checks that each y[n]
// arrives exactly NDIG clock edges after x[n] was taken.
//
// Phases, each counted and required to happen:
//   dc      constant input 2: once the 16 taps are full the output must be
//           802 (2 * sum of coefficients = 2 * 401)
//   impulse a single 1 among zeros: the outputs replay h[0] .. h[15]
//   max/min 16 samples of +127, then 16 of -128: the largest and the most
//           negative outputs (+50927, -51328) pass without overflow
//   random  signed random samples
module tb_fir_ds_top_cse;
  import fir_pkg::*;

  localparam int NRAND = 600;

  logic          clk = 1'b0, rst = 1'b1;
  logic [XW-1:0] x_in;
  logic          x_take;
  logic [W-1:0]  y_out;
  logic          y_valid;

  always #5 clk = ~clk;

  fir_ds_top #(.ALGO(MCM_CSE)) u_dut (.clk, .rst, .x_in, .x_take, .y_out, .y_valid);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Stimulus schedule and reference.
  int samples [$];
  int take_cyc [$];
  int n_dc = 0, n_impulse = 0, n_max = 0, n_min = 0, n_neg = 0, n_out = 0;

  function automatic int stim(int n);
    if (n < 40)  return 2;                                   // dc
    if (n < 72)  return (n == 56) ? 1 : 0;                   // impulse
    if (n < 88)  return 127;                                 // max
    if (n < 104) return -128;                                // min
    return int'($signed(XW'($urandom)));                     // random
  endfunction

  function automatic int ref_y(int n);
    int acc = 0;
    for (int k = 0; k < int'(NTAPS); k++)
      if (n - k >= 0) acc += H[k] * samples[n - k];
    return acc;
  endfunction

  localparam int NTOTAL = 104 + NRAND;

  initial begin
    repeat (NTOTAL * NDIG + 200) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, exp_y, got;
    x_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    #1;   // the filter asks for its first sample in the first cycle after reset
    while (n_out < NTOTAL) begin
      if (y_valid) begin
        got   = int'($signed(y_out));
        exp_y = ref_y(n_out);
        checks += 2;
        if (got != exp_y) begin
          failures++; $display("y[%0d] = %0d, expected %0d", n_out, got, exp_y);
        end
        if (cyc - take_cyc[n_out] != int'(NDIG)) begin
          failures++; $display("y[%0d] latency %0d edges", n_out, cyc - take_cyc[n_out]);
        end
        if (n_out >= 15 && n_out < 40 && got == 802) n_dc++;
        if (n_out >= 56 && n_out < 72 && got == H[n_out - 56]) n_impulse++;
        if (got == 127 * coeff_abs_sum()) n_max++;
        if (got == -128 * coeff_abs_sum()) n_min++;
        if (got < 0) n_neg++;
        n_out++;
      end
      if (x_take && samples.size() < NTOTAL) begin
        s = stim(samples.size());
        x_in = XW'(s);
        samples.push_back(s);
        take_cyc.push_back(cyc + 1);   // captured at the coming edge
      end else begin
        x_in = XW'($urandom);          // ignored by the filter
      end
      @(negedge clk);
    end
    checks += 5;
    if (n_dc != 25)      begin failures++; $display("dc outputs of 802: %0d of 25", n_dc); end
    if (n_impulse != 16) begin failures++; $display("impulse taps matched: %0d of 16", n_impulse); end
    if (n_max < 1)       begin failures++; $display("maximum output never reached"); end
    if (n_min < 1)       begin failures++; $display("minimum output never reached"); end
    if (n_neg < 1)       begin failures++; $display("no negative output"); end
    $display("outputs=%0d dc802=%0d impulse=%0d max=%0d min=%0d negative=%0d",
             n_out, n_dc, n_impulse, n_max, n_min, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
