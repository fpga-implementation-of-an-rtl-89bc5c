// ds_ctrl - word framing for the digit-serial datapath.
//
// Counts the digit index 0 .. NDIG-1 of the word being processed, one step
// per clock, and tells the converters at the edges of the datapath when a
// word begins and ends. The source design does not describe its control;
// this counter is the simplest thing that frames the words.
//
// After reset the counter starts at NDIG-1, so the very first cycle already
// asks for a sample (take = 1) and the first real word starts one cycle
// later. `done` marks the last digit of a real word: it stays low during
// that first cycle, when no word has yet been processed.
//
// Ports:  clk, rst (synchronous, active high),
//         dig  (index of the digit in the datapath this cycle, 0 = LSD),
//         take (1 in the last digit cycle: a new sample is loaded at the
//               clock edge that ends it),
//         done (1 in the last digit cycle of a word that was processed).
// Timing: take and done repeat every NDIG cycles.
module ds_ctrl #(
  parameter int unsigned NDIG = 9
) (
  input  logic                    clk,
  input  logic                    rst,
  output logic [$clog2(NDIG)-1:0] dig,
  output logic                    take,
  output logic                    done
);

  localparam int unsigned DIGW = $clog2(NDIG);
  localparam logic [DIGW-1:0] LAST = DIGW'(NDIG - 1);

  logic [DIGW-1:0] dig_q;
  logic            primed_q;   // a word has entered the datapath

  always_ff @(posedge clk) begin
    if (rst) begin
      dig_q    <= LAST;
      primed_q <= 1'b0;
    end else begin
      dig_q <= (dig_q == LAST) ? '0 : dig_q + 1'b1;
      if (dig_q == LAST) primed_q <= 1'b1;
    end
  end

  assign dig  = dig_q;
  assign take = (dig_q == LAST);
  assign done = take & primed_q;

endmodule
