// ds_shl - digit-serial left shift by K bits.
//
// In a digit-serial datapath a shift by a constant is not wiring but a delay:
// multiplying by 2^K means every bit of the word arrives K bit positions
// later. The module keeps the last K bits of the stream in a register, and
// each output digit is taken from the window {current digit, last K bits}.
// Bits that would come from the previous word (output positions below K) are
// forced to 0, and the top K bits of each word fall off, so the output is
// (x << K) mod 2^W for each W-bit word. The designer must pick W large enough
// that nothing of value is lost, which the filter's W guarantees.
//
// The "<<k" edges of the shift-add graphs come from the source design; the
// delay-line form and the masking by digit index are this design's own.
//
// Ports:  clk, rst (synchronous, active high), dig (index of the current
//         digit in its word, 0 = least significant), x (input digit),
//         y (shifted digit, same cycle).
// Timing: zero latency; K flip-flops.
module ds_shl #(
  parameter int unsigned D    = 2,
  parameter int unsigned NDIG = 9,
  parameter int unsigned K    = 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(NDIG)-1:0] dig,
  input  logic [D-1:0]            x,
  output logic [D-1:0]            y
);

  if (K == 0) begin : g_pass
    assign y = x;
  end else begin : g_shift
    logic [K-1:0]   hist_q;   // hist_q[K-1] is the most recent bit
    logic [K+D-1:0] window;

    assign window = {x, hist_q};

    always_comb begin
      for (int j = 0; j < int'(D); j++) begin
        // Output bit dig*D + j of the word has a source K bits lower, which
        // lies in this word once dig >= ceil((K - j) / D).
        y[j] = (int'(dig) >= (int'(K) - j + int'(D) - 1) / int'(D)) ? window[j] : 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      if (rst) hist_q <= '0;
      else     hist_q <= window[K+D-1:D];
    end
  end

endmodule
