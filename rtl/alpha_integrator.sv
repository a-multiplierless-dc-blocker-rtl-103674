// alpha_integrator -- feedback integrator of the delta modulator.
//
// The output bit y(n) is scaled by the gain alpha (a sign_mult: alpha or
// -alpha chosen by y, no multiplier) and accumulated in a register:
//     w(n+1) = w(n) + alpha * y(n).
// The register output w(n), the running estimate of the DC content scaled by
// alpha, drives the sigma-delta stage of the feedback path. The gain, the
// adder and the z^-1 register with its output fed back to the adder follow the
// published block diagram. Saturating the sum at the ends of the DATA_W-bit
// range, instead of letting it wrap, is this design's choice; sat flags a
// sample in which the sum was clipped.
//
// Interface: y is a single bit (1 = +1, 0 = -1); w is signed, LSB = 2^-FRAC_W
// of the enclosing design. en is the sample strobe; rst_n clears w
// asynchronously. Timing: y(n) reaches w one sample later.
module alpha_integrator #(
  parameter int unsigned DATA_W  = dcb_pkg::DATA_W_DEF,
  // alpha on the 2^-FRAC_W grid; default 0.0205 * 2^10 = 21.
  parameter int          ALPHA_Q = 21
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     y,
  output logic signed [DATA_W-1:0] w,
  output logic                     sat
);

  localparam logic signed [DATA_W+1:0] MAXV = (DATA_W+2)'(2 ** (DATA_W - 1) - 1);
  localparam logic signed [DATA_W+1:0] MINV = -(DATA_W+2)'(2 ** (DATA_W - 1));

  logic signed [DATA_W-1:0] ay;     // alpha * y
  logic signed [DATA_W+1:0] sum;
  logic signed [DATA_W-1:0] w_next;

  sign_mult #(.K(DATA_W), .A(DATA_W'(ALPHA_Q))) u_alpha (.sel(y), .c(ay));

  always_comb begin
    sum = (DATA_W+2)'(w) + (DATA_W+2)'(ay);
    sat = 1'b0;
    if (sum > MAXV) begin
      w_next = MAXV[DATA_W-1:0];
      sat    = 1'b1;
    end else if (sum < MINV) begin
      w_next = MINV[DATA_W-1:0];
      sat    = 1'b1;
    end else begin
      w_next = sum[DATA_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  w <= '0;
    else if (en) w <= w_next;
  end

endmodule
