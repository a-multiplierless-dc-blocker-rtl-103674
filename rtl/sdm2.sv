// sdm2 -- second-order sigma-delta modulator, the alternative feedback stage
// of the DC blocker.
//
// Two integrators in cascade, each fed back from the single-bit output:
//     s(n)     = sgn[v2(n)]                      (v2 >= 0 gives +1)
//     v1(n)    = v1(n-1) + w(n)  - beta * s(n)   (non-delaying integrator)
//     v2(n+1)  = v2(n)   + v1(n) - beta * s(n)   (delaying integrator)
// The integrator arrangement (first one with z^-1 in its adder's feedback,
// second with z^-1 in the forward path ahead of the sign) follows the
// published second-order modulator diagram. That diagram draws the two
// feedback taps without a gain; scaling both by the same beta (one sign_mult)
// is this design's reading, since beta is the feedback gain of the stage in
// the first-order case. Saturating both integrators at the ends of the
// DATA_W-bit range is this design's choice; sat flags a clipped sample.
//
// Interface: w is signed, LSB = 2^-FRAC_W; s is a single bit (1 = +1);
// v1, v2 are the integrator registers, for observation. en is the sample
// strobe; rst_n clears both integrators asynchronously (s starts at +1).
// Timing: w(n) affects s(n+1).
module sdm2 #(
  parameter int unsigned DATA_W = dcb_pkg::DATA_W_DEF,
  // beta on the 2^-FRAC_W grid; default 0.0508 * 2^10 = 52.
  parameter int          BETA_Q = 52
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] w,
  output logic                     s,
  output logic signed [DATA_W-1:0] v1,
  output logic signed [DATA_W-1:0] v2,
  output logic                     sat
);

  localparam logic signed [DATA_W+1:0] MAXV = (DATA_W+2)'(2 ** (DATA_W - 1) - 1);
  localparam logic signed [DATA_W+1:0] MINV = -(DATA_W+2)'(2 ** (DATA_W - 1));

  logic signed [DATA_W-1:0] bs;     // beta * s
  logic signed [DATA_W+1:0] sum1, sum2;
  logic signed [DATA_W-1:0] v1_now, v2_next;
  logic                     sat1, sat2;

  always_comb s = ~v2[DATA_W-1];

  sign_mult #(.K(DATA_W), .A(DATA_W'(BETA_Q))) u_beta (.sel(s), .c(bs));

  always_comb begin
    sum1 = (DATA_W+2)'(v1) + (DATA_W+2)'(w) - (DATA_W+2)'(bs);
    sat1 = 1'b0;
    if (sum1 > MAXV) begin
      v1_now = MAXV[DATA_W-1:0];
      sat1   = 1'b1;
    end else if (sum1 < MINV) begin
      v1_now = MINV[DATA_W-1:0];
      sat1   = 1'b1;
    end else begin
      v1_now = sum1[DATA_W-1:0];
    end

    sum2 = (DATA_W+2)'(v2) + (DATA_W+2)'(v1_now) - (DATA_W+2)'(bs);
    sat2 = 1'b0;
    if (sum2 > MAXV) begin
      v2_next = MAXV[DATA_W-1:0];
      sat2    = 1'b1;
    end else if (sum2 < MINV) begin
      v2_next = MINV[DATA_W-1:0];
      sat2    = 1'b1;
    end else begin
      v2_next = sum2[DATA_W-1:0];
    end
  end

  always_comb sat = sat1 | sat2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0;
      v2 <= '0;
    end else if (en) begin
      v1 <= v1_now;
      v2 <= v2_next;
    end
  end

endmodule
