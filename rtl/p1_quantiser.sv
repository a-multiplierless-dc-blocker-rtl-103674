// p1_quantiser -- signal path of the DC blocker: input summing node and the
// single-bit quantiser P1.
//
// Each sample, the feedback bit s(n) is subtracted from the input bit x(n):
// u(n) = x(n) - s(n), which can only be -2, 0 or +2. P1 takes its sign, with
// u >= 0 giving +1 (so a tie, x = s, always gives +1), and the result is
// registered, so that y(n) = sgn[u(n-1)]. Both the tie rule and the one-sample
// register follow the published description; the reset value y = +1
// (the sign of u = 0) is this design's choice.
//
// Interface: x, s and y are single bits (1 = +1, 0 = -1); u is the signed
// difference, for observation. en is a sample strobe: y advances only on a
// rising clk edge with en = 1. rst_n is an asynchronous active-low reset.
// Timing: y follows x and s with a latency of exactly one sample.
module p1_quantiser (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              x,
  input  logic              s,
  output logic signed [2:0] u,
  output logic              y
);

  always_comb u = 3'(dcb_pkg::pm1(x) - dcb_pkg::pm1(s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= 1'b1;
    else if (en) y <= (u >= 0);
  end

endmodule
