// sdm1 -- first-order sigma-delta modulator of the DC blocker's feedback
// path.
//
// It turns the multi-bit integrator output w(n) into the single-bit feedback
// stream s(n):
//     s(n) = sgn[v(n-1)]            (v >= 0 gives +1)
//     v(n) = v(n-1) + w(n) - beta * s(n)
// The register holds v(n-1), so s is the inverted sign bit of the register and
// the integrator is non-delaying (its z^-1 sits in the adder's feedback), as
// in the published block diagram. beta * s comes from a sign_mult (beta or
// -beta selected by s). Over many samples the density of s tracks
// w / beta, so |w| must stay below beta for the loop to follow it.
// Saturating v at the ends of the DATA_W-bit range is this design's choice;
// sat flags a sample in which it clipped.
//
// Interface: w is signed, LSB = 2^-FRAC_W; s is a single bit (1 = +1);
// v is the integrator register, for observation. en is the sample strobe;
// rst_n clears v asynchronously (so s starts at +1). Timing: w(n) affects
// s(n+1).
module sdm1 #(
  parameter int unsigned DATA_W = dcb_pkg::DATA_W_DEF,
  // beta on the 2^-FRAC_W grid; default 0.2705 * 2^10 = 277.
  parameter int          BETA_Q = 277
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] w,
  output logic                     s,
  output logic signed [DATA_W-1:0] v,
  output logic                     sat
);

  localparam logic signed [DATA_W+1:0] MAXV = (DATA_W+2)'(2 ** (DATA_W - 1) - 1);
  localparam logic signed [DATA_W+1:0] MINV = -(DATA_W+2)'(2 ** (DATA_W - 1));

  logic signed [DATA_W-1:0] bs;     // beta * s
  logic signed [DATA_W+1:0] sum;
  logic signed [DATA_W-1:0] v_next;

  always_comb s = ~v[DATA_W-1];

  sign_mult #(.K(DATA_W), .A(DATA_W'(BETA_Q))) u_beta (.sel(s), .c(bs));

  always_comb begin
    sum = (DATA_W+2)'(v) + (DATA_W+2)'(w) - (DATA_W+2)'(bs);
    sat = 1'b0;
    if (sum > MAXV) begin
      v_next = MAXV[DATA_W-1:0];
      sat    = 1'b1;
    end else if (sum < MINV) begin
      v_next = MINV[DATA_W-1:0];
      sat    = 1'b1;
    end else begin
      v_next = sum[DATA_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  v <= '0;
    else if (en) v <= v_next;
  end

endmodule
