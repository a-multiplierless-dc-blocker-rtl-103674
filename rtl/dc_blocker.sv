// dc_blocker -- multiplierless DC blocker for a single-bit sigma-delta
// bitstream.
//
// A delta modulator whose feedback path carries an estimate of the input's
// DC content, itself re-encoded as a single-bit stream:
//
//   x(n) --(+)--u(n)--[P1, reg]-- y(n) ---------------------------> output
//           -|                      |
//            s(n)                 [alpha] (sign_mult)
//            |                      |
//            +--[sigma-delta]<--w--[accumulate, z^-1]   (alpha_integrator)
//
//   u(n) = x(n) - s(n)                     (p1_quantiser)
//   y(n+1) = sgn u(n), tie -> +1           (p1_quantiser)
//   w(n+1) = w(n) + alpha * y(n)           (alpha_integrator)
//   s      = single-bit sigma-delta encoding of w, feedback gain beta
//            (sdm1: first order, sdm2: second order)
//
// The integrator drives s towards the input's mean, so the mean is
// subtracted from x before P1 re-quantises it. Only two multiplexer-based
// constant gains (alpha, beta) are needed, no multiplier.
//
// Follows the published structure: the loop topology, the registered
// quantisers (y(n) = sgn[u(n-1)], s(n) = sgn[v(n-1)]), the optional
// second-order feedback modulator, the mux-based gains, the 10-bit fractional
// resolution and the optimum (alpha, beta) pairs, which are the defaults for
// the chosen order: (0.0205, 0.2705) for SDM_ORDER = 1 and (0.0127, 0.0508)
// for SDM_ORDER = 2, rounded to the 2^-FRAC_W grid (21/277 and 13/52).
// This design's own choices: the total word width DATA_W, saturating
// integrators, the sample strobe en, the reset values, and the first-order
// stage as the default configuration.
//
// Behaviour worth knowing: x and s are both +/-1, so u is -2, 0 or +2, and
// the tie u = 0 (x = s) always gives y = +1. y can therefore be -1 only in
// samples where x = -1. A negative DC offset is removed, but a positive one
// cannot be pulled below the fraction of +1 input bits; the alpha integrator
// then runs into its saturation limit (sat).
//
// Interface: x, y, s are single bits (1 = +1, 0 = -1). dc_est is the alpha
// integrator (signed, LSB = 2^-FRAC_W). sat is high in a sample where any
// integrator clipped. u (x - s, -2/0/+2) and sdm_v (the sigma-delta
// integrator whose sign is s: v of the first-order stage, v2 of the
// second-order one) are brought out for observation. en: one input sample is taken, and every register
// advances, on each rising clk edge with en = 1. rst_n is an asynchronous
// active-low reset. Latency: x(n) appears in y(n+1), one sample later.
module dc_blocker #(
  parameter int unsigned SDM_ORDER = dcb_pkg::SDM_ORDER_DEF,
  parameter int unsigned DATA_W    = dcb_pkg::DATA_W_DEF,
  parameter int unsigned FRAC_W    = dcb_pkg::FRAC_W_DEF,
  parameter real         ALPHA     = (SDM_ORDER == 1) ? dcb_pkg::ALPHA_SDM1 : dcb_pkg::ALPHA_SDM2,
  parameter real         BETA      = (SDM_ORDER == 1) ? dcb_pkg::BETA_SDM1  : dcb_pkg::BETA_SDM2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     x,
  output logic                     y,
  output logic                     s,
  output logic signed [2:0]        u,
  output logic signed [DATA_W-1:0] dc_est,
  output logic signed [DATA_W-1:0] sdm_v,
  output logic                     sat
);

  localparam int ALPHA_Q = dcb_pkg::gain_to_q(ALPHA, FRAC_W);
  localparam int BETA_Q  = dcb_pkg::gain_to_q(BETA, FRAC_W);

  if (ALPHA_Q <= 0 || BETA_Q <= 0 || ALPHA_Q >= 2 ** (DATA_W - 1) || BETA_Q >= 2 ** (DATA_W - 1)) begin : g_bad_gain
    $error("dc_blocker: alpha and beta must be positive and fit in DATA_W bits");
  end

  logic              sat_int, sat_sdm;

  p1_quantiser u_p1 (
    .clk, .rst_n, .en,
    .x, .s, .u, .y
  );

  alpha_integrator #(.DATA_W(DATA_W), .ALPHA_Q(ALPHA_Q)) u_int (
    .clk, .rst_n, .en,
    .y, .w(dc_est), .sat(sat_int)
  );

  if (SDM_ORDER == 1) begin : g_sdm1
    sdm1 #(.DATA_W(DATA_W), .BETA_Q(BETA_Q)) u_sdm (
      .clk, .rst_n, .en,
      .w(dc_est), .s, .v(sdm_v), .sat(sat_sdm)
    );
  end else if (SDM_ORDER == 2) begin : g_sdm2
    logic signed [DATA_W-1:0] v1;
    sdm2 #(.DATA_W(DATA_W), .BETA_Q(BETA_Q)) u_sdm (
      .clk, .rst_n, .en,
      .w(dc_est), .s, .v1, .v2(sdm_v), .sat(sat_sdm)
    );
  end else begin : g_bad_order
    $error("dc_blocker: SDM_ORDER must be 1 or 2");
  end

  always_comb sat = sat_int | sat_sdm;

endmodule
