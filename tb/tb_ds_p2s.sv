// tb_ds_p2s - self-checking test of the input serializer.
//
// A random signed 8-bit sample is loaded every NDIG cycles (random data
// sits on the input in between and must be ignored); in the NDIG cycles
// after each load the digits must be those of the sample
// sign-extended to W bits, least significant first.
module tb_ds_p2s;
  localparam int unsigned D = 2, NDIG = 9, XW = 8, W = D * NDIG;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic          load;
  logic [XW-1:0] x_in;
  logic [D-1:0]  digit;

  ds_p2s #(.D(D), .NDIG(NDIG), .XW(XW)) u_dut (.clk, .rst, .load, .x_in, .digit);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] cur_w, next_w;
    int  idx = 0;
    bit  have = 1'b0;
    load = 1'b0; x_in = '0; cur_w = '0; next_w = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (load) begin cur_w = next_w; idx = 0; have = 1'b1; end
      if (have && idx < int'(NDIG)) begin
        checks++;
        if (digit !== cur_w[D*idx +: D]) begin
          failures++; $display("cycle %0d digit %0d = %0d, expected %0d", c, idx, digit, cur_w[D*idx +: D]);
        end
        idx++;
      end
      x_in = (c == 8) ? 8'h80 : XW'($urandom);
      load = (c % NDIG == NDIG - 1);
      next_w = W'($signed(x_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
