// tb_ds_delay - self-checking test of the one-sample digit delay.
//
// A random digit stream goes in; every cycle the output must equal the
// digit that went in NDIG cycles earlier (zero for the first NDIG cycles
// after reset).
module tb_ds_delay;
  localparam int unsigned D = 2, NDIG = 9;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [D-1:0] d, q;
  logic [D-1:0] hist [$];

  ds_delay #(.D(D), .NDIG(NDIG)) u_dut (.clk, .rst, .d, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] exp_q;
    d = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      exp_q = (hist.size() >= NDIG) ? hist[hist.size() - NDIG] : '0;
      checks++;
      if (q !== exp_q) begin failures++; $display("cycle %0d q=%0d exp %0d", n, q, exp_q); end
      d = D'($urandom);
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
