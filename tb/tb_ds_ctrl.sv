// tb_ds_ctrl - self-checking test of the word-framing counter.
//
// After reset the digit index must run NDIG-1, 0, 1, ..., NDIG-1, 0, ...;
// take must be high exactly when the index is NDIG-1, and done likewise
// except in the very first cycle after reset.
module tb_ds_ctrl;
  localparam int unsigned NDIG = 9;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [$clog2(NDIG)-1:0] dig;
  logic take, done;
  int n_take = 0;

  ds_ctrl #(.NDIG(NDIG)) u_dut (.clk, .rst, .dig, .take, .done);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_dig;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    #1;
    exp_dig = NDIG - 1;
    for (int n = 0; n < 500; n++) begin
      checks += 3;
      if (int'(dig) != exp_dig) begin failures++; $display("cycle %0d dig=%0d exp %0d", n, dig, exp_dig); end
      if (take != (exp_dig == NDIG - 1)) begin failures++; $display("cycle %0d take=%b", n, take); end
      if (done != (exp_dig == NDIG - 1 && n > 0)) begin failures++; $display("cycle %0d done=%b", n, done); end
      if (take) n_take++;
      exp_dig = (exp_dig == NDIG - 1) ? 0 : exp_dig + 1;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_take != (500 + NDIG - 1) / NDIG) begin failures++; $display("take count %0d", n_take); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
