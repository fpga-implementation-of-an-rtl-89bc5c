// tb_mcm_29_43_gb - self-checking test of the GB multiplier block (7x, 29x, 43x).
//
// Signed 8-bit samples, sign-extended to W = 18 bits, are sent digit by
// digit (D = 2) back to back. The product words gathered from the three
// outputs are compared with 7x, 29x and 43x computed by the testbench.
// The first sample is 2, for which the products are 14, 58 and 86.
module tb_mcm_29_43_gb;
  localparam int unsigned D = 2, NDIG = 9, W = D * NDIG;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [$clog2(NDIG)-1:0] dig;
  logic [D-1:0]            x, p7, p29, p43;

  mcm_29_43_gb #(.D(D), .NDIG(NDIG)) u_dut (.clk, .rst, .dig, .x, .p7, .p29, .p43);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0] s;
    logic [W-1:0] xw, g7, g29, g43;
    dig = '0; x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 600; n++) begin
      s  = (n == 0) ? 8'sd2 : (n == 1) ? -8'sd128 : (n == 2) ? 8'sd127 : 8'($urandom);
      xw = W'(s);
      for (int i = 0; i < int'(NDIG); i++) begin
        @(negedge clk);
        dig = i[$clog2(NDIG)-1:0];
        x   = xw[D*i +: D];
        #2;
        g7[D*i +: D] = p7; g29[D*i +: D] = p29; g43[D*i +: D] = p43;
      end
      checks += 3;
      if ($signed(g7)  !== 18'(7 * int'(s)))  begin failures++; $display("7*%0d -> %0d", s, $signed(g7)); end
      if ($signed(g29) !== 18'(29 * int'(s))) begin failures++; $display("29*%0d -> %0d", s, $signed(g29)); end
      if ($signed(g43) !== 18'(43 * int'(s))) begin failures++; $display("43*%0d -> %0d", s, $signed(g43)); end
      if (n == 0) begin
        checks += 2;
        if (g29 != 58) failures++;
        if (g43 != 86) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
