// dcb_pkg -- constants and helpers shared by the single-bit DC blocker.
//
// Number format. Every multi-bit quantity in the blocker (the alpha
// integrator, the sigma-delta integrators and the gain constants) is a
// signed two's-complement word whose LSB weighs 2^-FRAC_W. The gains alpha
// and beta are therefore carried as integers: alpha_q = round(alpha *
// 2^FRAC_W). A 10-bit fractional resolution and the two (alpha, beta) pairs
// below are the published operating points; the total word width is this
// design's own choice (5 integer bits of headroom over the 2^-10 grid).
//
// Single-bit signals. A bit b stands for the value +1 when b = 1 and -1 when
// b = 0, for the input x, the output y and the feedback bit s alike.
package dcb_pkg;

  // Fractional bits of the multi-bit region (published resolution).
  localparam int unsigned FRAC_W_DEF = 10;
  // Total width of the multi-bit words (design choice).
  localparam int unsigned DATA_W_DEF = 16;

  // Published optimum gains, first-order sigma-delta feedback stage.
  localparam real ALPHA_SDM1 = 0.0205;
  localparam real BETA_SDM1  = 0.2705;
  // Published optimum gains, second-order sigma-delta feedback stage.
  localparam real ALPHA_SDM2 = 0.0127;
  localparam real BETA_SDM2  = 0.0508;

  // Feedback-stage order of the default configuration.
  localparam int unsigned SDM_ORDER_DEF = 1;

  // Gain to fixed point: round(g * 2^frac_w).
  function automatic int gain_to_q(input real g, input int unsigned frac_w);
    return $rtoi(g * (2.0 ** frac_w) + 0.5);
  endfunction

  // Value (+1 or -1) that a single bit stands for.
  function automatic int pm1(input logic b);
    return b ? 1 : -1;
  endfunction

endpackage
