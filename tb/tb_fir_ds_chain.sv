// tb_fir_ds_chain - self-checking test of the transposed accumulation chain.
//
// The testbench plays the MCM block itself: for every random signed sample
// it computes the sixteen products h[k]*x, cuts them into D-bit digits and
// drives them into the chain, back to back. Each output word must equal the
// convolution sum_k h[k] x[n-k] of the samples so far (zero history before
// the first sample), with no added latency.
module tb_fir_ds_chain;
  import fir_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [$clog2(NDIG)-1:0] dig;
  logic [NTAPS-1:0][D-1:0] prod;
  logic [D-1:0]            y;

  fir_ds_chain u_dut (.clk, .rst, .dig, .prod, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [NTAPS];
    int s, ref_y;
    logic [W-1:0] pw [NTAPS];
    logic [W-1:0] got;
    for (int k = 0; k < int'(NTAPS); k++) hist[k] = 0;
    dig = '0; prod = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      s = (n < 40) ? ((n % 20 < 10) ? 127 : -128) : int'($signed(XW'($urandom)));
      for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s;
      ref_y = 0;
      for (int k = 0; k < int'(NTAPS); k++) begin
        ref_y += H[k] * hist[k];
        pw[k] = W'(H[k] * s);
      end
      for (int i = 0; i < int'(NDIG); i++) begin
        @(negedge clk);
        dig = i[$clog2(NDIG)-1:0];
        for (int k = 0; k < int'(NTAPS); k++) prod[k] = pw[k][D*i +: D];
        #2;
        got[D*i +: D] = y;
      end
      checks++;
      if (got !== W'(ref_y)) begin
        failures++; $display("n=%0d y=%0d expected %0d", n, $signed(got), ref_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
