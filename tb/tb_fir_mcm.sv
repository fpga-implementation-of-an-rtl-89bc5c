// tb_fir_mcm - self-checking test of the 16-coefficient MCM block.
//
// Two instances, one built with the GB graph and one with the CSE graph,
// receive the same signed 8-bit samples (sign-extended to W = 18 bits,
// D = 2 bits per clock, back to back). Every one of the sixteen product
// words of each instance is compared with h[k]*x computed by the testbench
// from the coefficient list. The first sample is 2; for it the products
// of the 15x, 16x, 18x, 23x, 29x, 32x, 43x, 64x, 4x and 3x taps must be
// 30, 32, 36, 46, 58, 64, 86, 128, 8 and 6.
module tb_fir_mcm;
  import fir_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [$clog2(NDIG)-1:0] dig;
  logic [D-1:0]            x;
  logic [NTAPS-1:0][D-1:0] prod_gb, prod_cse;

  fir_mcm                        u_gb  (.clk, .rst, .dig, .x, .prod(prod_gb));
  fir_mcm #(.ALGO(MCM_CSE))      u_cse (.clk, .rst, .dig, .x, .prod(prod_cse));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Values for x = 2 (tap index, product).
  localparam int FIG_TAP [10] = '{6, 7, 8, 9, 10, 11, 12, 13, 15, 1};
  localparam int FIG_VAL [10] = '{30, 32, 36, 46, 58, 64, 86, 128, 8, 6};

  initial begin
    logic signed [XW-1:0] s;
    logic [W-1:0] xw;
    logic [W-1:0] g_gb [NTAPS];
    logic [W-1:0] g_cse [NTAPS];
    dig = '0; x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      s  = (n == 0) ? XW'(2) : (n == 1) ? XW'(-128) : (n == 2) ? XW'(127) : XW'($urandom);
      xw = W'(s);
      for (int i = 0; i < int'(NDIG); i++) begin
        @(negedge clk);
        dig = i[$clog2(NDIG)-1:0];
        x   = xw[D*i +: D];
        #2;
        for (int k = 0; k < int'(NTAPS); k++) begin
          g_gb[k][D*i +: D]  = prod_gb[k];
          g_cse[k][D*i +: D] = prod_cse[k];
        end
      end
      for (int k = 0; k < int'(NTAPS); k++) begin
        checks += 2;
        if (g_gb[k] !== W'(H[k] * int'(s))) begin
          failures++; $display("GB  tap %0d: %0d * %0d -> %0d", k, H[k], s, $signed(g_gb[k]));
        end
        if (g_cse[k] !== W'(H[k] * int'(s))) begin
          failures++; $display("CSE tap %0d: %0d * %0d -> %0d", k, H[k], s, $signed(g_cse[k]));
        end
      end
      if (n == 0) begin
        for (int f = 0; f < 10; f++) begin
          checks++;
          if (g_gb[FIG_TAP[f]] != W'(FIG_VAL[f])) begin
            failures++; $display("x=2 tap %0d -> %0d, expected %0d", FIG_TAP[f], g_gb[FIG_TAP[f]], FIG_VAL[f]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
