// ds_s2p - collects a digit-serial word back into a parallel output word.
//
// Every clock the incoming digit is shifted in from the top, so after NDIG
// digits (least significant first) the whole W-bit word is in place. In the
// cycle flagged by `done` (the last digit of a word) the completed word is
// copied to the output register and y_valid pulses for one cycle. The
// source design presents its filter output as a parallel word; this
// converter is this design's own.
//
// Ports:  clk, rst (synchronous, active high), digit, done,
//         y_out (last completed word, two's complement), y_valid.
// Timing: y_out / y_valid change at the clock edge that ends the last digit.
module ds_s2p #(
  parameter int unsigned D    = 2,
  parameter int unsigned NDIG = 9
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [D-1:0]        digit,
  input  logic                done,
  output logic [NDIG*D-1:0]   y_out,
  output logic                y_valid
);

  localparam int unsigned W = NDIG * D;

  logic [W-D-1:0] acc_q;    // digits received so far, top aligned

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q   <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      acc_q   <= (W-D)'({digit, acc_q} >> D);
      y_valid <= done;
      if (done) y_out <= {digit, acc_q};
    end
  end

endmodule
