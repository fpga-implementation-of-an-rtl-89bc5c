// fir_ds_chain - transposed-form accumulation chain of the digit-serial FIR.
//
// In the transposed form every tap product h[k]*x[n] is added to the
// partial sum coming from tap k+1, delayed by one sample:
//   s[15] = h[15] x[n]
//   s[k]  = h[k] x[n] + z^-1 s[k+1]      k = 14 .. 0
//   y[n]  = s[0]
// which is the transposed structure of the source design. Here every adder
// is a digit-serial ds_adder and every z^-1 a ds_delay (NDIG digits deep),
// so the chain handles one digit per clock. A tap whose coefficient is 0
// gets no adder, only its delay.
//
// Ports:  clk, rst (synchronous, active high), dig (digit index, 0 = least
//         significant), prod[k] (digit of h[k]*x from the MCM block),
//         y (digit of the filter output, same cycle).
// Timing: the output word for x[n] leaves in the same NDIG cycles as x[n]
//         enters; NTAPS-1 delay lines of NDIG*D flip-flops.
module fir_ds_chain #(
  parameter int unsigned D    = fir_pkg::D,
  parameter int unsigned NDIG = fir_pkg::NDIG
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(NDIG)-1:0] dig,
  input  logic [fir_pkg::NTAPS-1:0][D-1:0] prod,
  output logic [D-1:0]            y
);

  logic                    first;
  logic [fir_pkg::NTAPS-1:0][D-1:0] s;     // partial sums
  logic [fir_pkg::NTAPS-2:0][D-1:0] sd;    // partial sums after z^-1 (index k: into tap k)

  assign first = (dig == '0);

  assign s[fir_pkg::NTAPS-1]  = prod[fir_pkg::NTAPS-1];

  for (genvar k = 0; k < int'(fir_pkg::NTAPS) - 1; k++) begin : g_tap
    ds_delay #(.D(D), .NDIG(NDIG)) u_z (.clk, .rst, .d(s[k+1]), .q(sd[k]));
    if (fir_pkg::H[k] != 0) begin : g_add
      ds_adder #(.D(D), .SUB(1'b0)) u_add (.clk, .rst, .first, .a(prod[k]), .b(sd[k]), .s(s[k]));
    end else begin : g_none
      assign s[k] = sd[k];
    end
  end

  assign y = s[0];

endmodule
