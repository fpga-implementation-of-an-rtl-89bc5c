// tb_ds_s2p - self-checking test of the output deserializer.
//
// Random W-bit words are sent as digits, least significant first, with
// `done` in the last digit of each. One cycle later y_valid must pulse and
// y_out must hold the word; y_valid must stay low in every other cycle and
// y_out must not change while no word completes.
module tb_ds_s2p;
  localparam int unsigned D = 2, NDIG = 9, W = D * NDIG;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [D-1:0] digit;
  logic         done;
  logic [W-1:0] y_out;
  logic         y_valid;

  ds_s2p #(.D(D), .NDIG(NDIG)) u_dut (.clk, .rst, .digit, .done, .y_out, .y_valid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w, last_w;
    bit           done_prev;
    digit = '0; done = 1'b0; last_w = '0; done_prev = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      w = W'({$urandom, $urandom});
      for (int i = 0; i < int'(NDIG); i++) begin
        @(negedge clk);
        checks += 2;
        if (y_valid !== done_prev) begin failures++; $display("word %0d digit %0d: y_valid=%b", n, i, y_valid); end
        if (y_out !== last_w) begin failures++; $display("word %0d digit %0d: y_out=%h exp %h", n, i, y_out, last_w); end
        digit = w[D*i +: D];
        done  = (i == int'(NDIG) - 1);
        done_prev = done;
        if (done) last_w = w;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
