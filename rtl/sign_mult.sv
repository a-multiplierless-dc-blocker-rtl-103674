// sign_mult -- multiplies a single-bit +/-1 signal by a fixed K-bit constant
// without a multiplier.
//
// The product of a constant a and a signal that is only ever +1 or -1 is
// either a or -a. Both are fixed numbers, so the "multiplier" is K two-input
// multiplexers: bit i of the result is a[i] when the select bit stands for +1
// and b[i] = (-a)[i] when it stands for -1. This is the published structure
// for the alpha and beta gains of the DC blocker. Computing -a at elaboration
// time and muxing bit by bit is the whole circuit; nothing is computed at
// run time.
//
// Interface: sel = 1 means +1, sel = 0 means -1; c is the signed product.
// Purely combinational. A must not be the most negative K-bit value, whose
// negation does not fit in K bits (checked at elaboration).
module sign_mult #(
  parameter int unsigned         K = dcb_pkg::DATA_W_DEF,
  // Default: the first-order alpha, 0.0205 on the 2^-10 grid (21).
  parameter logic signed [K-1:0] A = K'(21)
) (
  input  logic                sel,
  output logic signed [K-1:0] c
);

  localparam logic signed [K-1:0] B = -A;

  if (A == {1'b1, {(K-1){1'b0}}}) begin : g_bad_const
    $error("sign_mult: constant A has no K-bit negation");
  end

  for (genvar i = 0; i < int'(K); i++) begin : g_mux
    always_comb c[i] = sel ? A[i] : B[i];
  end

endmodule
