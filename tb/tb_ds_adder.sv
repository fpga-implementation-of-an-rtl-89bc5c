// tb_ds_adder - self-checking test of the digit-serial adder / subtractor.
//
// Three instances run side by side on the same random W-bit words, sent
// least significant digit first and back to back: a digit-serial adder and
// subtractor with D = 2, and a bit-serial adder (D = 1). Each result word is
// gathered from the output digits and compared with (a + b) or (a - b)
// modulo 2^W computed by the testbench. Back-to-back words check that the
// carry is restarted at every word; edge words (all ones, zero) force long
// carry chains across digit boundaries. Right after reset, before any first
// digit, zero inputs must give a zero sum and a zero difference.
module tb_ds_adder;
  localparam int unsigned W     = 18;
  localparam int unsigned NWORD = 400;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         first2, first1;
  logic [1:0]   a2, b2, sa2, ss2;
  logic         a1, b1, sa1;

  ds_adder #(.D(2), .SUB(1'b0)) u_add2 (.clk, .rst, .first(first2), .a(a2), .b(b2), .s(sa2));
  ds_adder #(.D(2), .SUB(1'b1)) u_sub2 (.clk, .rst, .first(first2), .a(a2), .b(b2), .s(ss2));
  ds_adder #(.D(1), .SUB(1'b0)) u_add1 (.clk, .rst, .first(first1), .a(a1), .b(b1), .s(sa1));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pick(int n);
    case (n % 5)
      0: return '1;
      1: return '0;
      default: return W'({$urandom, $urandom});
    endcase
  endfunction

  // D = 2 stream for adder and subtractor.
  initial begin : run2
    logic [W-1:0] a, b, gs, gd;
    first2 = 1'b0; a2 = '0; b2 = '0;
    first1 = 1'b0; a1 = '0; b1 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Leaving reset in the middle of a word: zero operands must give zero.
    #2;
    checks += 2;
    if (sa2 !== 2'b00) begin failures++; $display("add2 after reset: %b", sa2); end
    if (ss2 !== 2'b00) begin failures++; $display("sub2 after reset: %b", ss2); end
    for (int n = 0; n < int'(NWORD); n++) begin
      a = pick(n); b = pick(n / 5 + 3 * n);
      for (int i = 0; i < int'(W / 2); i++) begin
        @(negedge clk);
        first2 = (i == 0);
        a2 = a[2*i +: 2]; b2 = b[2*i +: 2];
        #2;
        gs[2*i +: 2] = sa2; gd[2*i +: 2] = ss2;
      end
      checks += 2;
      if (gs !== W'(a + b)) begin failures++; $display("add2 %h + %h -> %h", a, b, gs); end
      if (gd !== W'(a - b)) begin failures++; $display("sub2 %h - %h -> %h", a, b, gd); end
    end
    // D = 1 stream (bit-serial).
    for (int n = 0; n < 100; n++) begin
      a = pick(n + 2); b = pick(n + 4);
      for (int i = 0; i < int'(W); i++) begin
        @(negedge clk);
        first1 = (i == 0);
        a1 = a[i]; b1 = b[i];
        #2;
        gs[i] = sa1;
      end
      checks++;
      if (gs !== W'(a + b)) begin failures++; $display("add1 %h + %h -> %h", a, b, gs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
