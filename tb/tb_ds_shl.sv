// tb_ds_shl - self-checking test of the digit-serial constant shifter.
//
// Instances shifting by K = 1, 2, 3 and 7 bits (D = 2, W = 18) receive the
// same random words back to back. Each output word must equal
// (x << K) mod 2^W, so the low K bits must be zero even though the delay
// line still holds the top bits of the previous word.
module tb_ds_shl;
  localparam int unsigned D = 2, NDIG = 9, W = D * NDIG;
  localparam int KS [4] = '{1, 2, 3, 7};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [$clog2(NDIG)-1:0] dig;
  logic [D-1:0]            x;
  logic [D-1:0]            y [4];

  for (genvar g = 0; g < 4; g++) begin : g_dut
    ds_shl #(.D(D), .NDIG(NDIG), .K(KS[g])) u_dut (.clk, .rst, .dig, .x, .y(y[g]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] xw;
    logic [W-1:0] got [4];
    dig = '0; x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      xw = (n % 7 == 0) ? '1 : W'({$urandom, $urandom});
      for (int i = 0; i < int'(NDIG); i++) begin
        @(negedge clk);
        dig = i[$clog2(NDIG)-1:0];
        x   = xw[D*i +: D];
        #2;
        for (int g = 0; g < 4; g++) got[g][D*i +: D] = y[g];
      end
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (got[g] !== W'(xw << KS[g])) begin
          failures++;
          $display("K=%0d x=%h got %h", KS[g], xw, got[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
