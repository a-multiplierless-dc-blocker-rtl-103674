// tb_sdm2 -- self-checking test of the second-order feedback sigma-delta
// modulator (published beta = 52/1024). The multi-bit input w is held at a
// series of constant levels inside the stable range (|w| < beta/2), then
// far past beta so that the integrators clip, with a random sample strobe.
// Every sample, s, v1, v2 and the clip flag are compared with an integer
// model of
//   s(n) = sgn v2(n), v1(n) = clip(v1(n-1) + w - beta*s),
//   v2(n+1) = clip(v2(n) + v1(n) - beta*s).
// For each in-range level the bit density must track it:
// |N*w - beta*sum(s)| = |v1 drift| stays within a bound over N samples.
module tb_sdm2;
  localparam int DW = 16;
  localparam int BQ = 52;
  localparam int NLEV = 6;
  localparam int LEVELS[NLEV] = '{0, 10, -10, 20, -25, 2000};
  localparam int NS = 2048;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DW-1:0] w = '0, v1, v2;
  logic s, sat;
  longint v1_exp, v2_exp;
  int sat_seen = 0;

  sdm2 #(.DATA_W(DW), .BETA_Q(BQ)) dut (.clk, .rst_n, .en, .w, .s, .v1, .v2, .sat);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: w=%0d v1=%0d exp %0d v2=%0d exp %0d s=%0b", what, $time, w,
               v1, v1_exp, v2, v2_exp, s);
    end
  endtask

  function automatic longint clip(longint a, ref bit hit);
    longint hi = (longint'(1) <<< (DW - 1)) - 1, lo = -(longint'(1) <<< (DW - 1));
    if (a > hi) begin hit = 1; return hi; end
    if (a < lo) begin hit = 1; return lo; end
    return a;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t1, t2;
    int s_exp;
    bit sat_exp;
    v1_exp = 0;
    v2_exp = 0;
    #12 rst_n = 1;
    for (int l = 0; l < NLEV; l++) begin
      longint acc_s;
      int taken;
      acc_s = 0;
      taken = 0;
      while (taken < NS) begin
        @(negedge clk);
        w  = DW'(LEVELS[l]);
        en = ($urandom % 4) != 0;
        s_exp = (v2_exp >= 0) ? 1 : -1;
        sat_exp = 0;
        t1 = clip(v1_exp + longint'(LEVELS[l]) - longint'(BQ * s_exp), sat_exp);
        t2 = clip(v2_exp + t1 - BQ * s_exp, sat_exp);
        #1;
        check((s ? 1 : -1) == s_exp, "s = sgn v2");
        check(sat == sat_exp, "clip flag");
        if (en) begin
          v1_exp = t1;
          v2_exp = t2;
          acc_s += longint'(s_exp);
          taken++;
          if (sat_exp) sat_seen++;
        end
        @(posedge clk);
        #1;
        check(longint'(v1) == v1_exp, "first integrator");
        check(longint'(v2) == v2_exp, "second integrator");
      end
      if (LEVELS[l] > -BQ && LEVELS[l] < BQ) begin
        automatic longint err = longint'(NS) * LEVELS[l] - BQ * acc_s;
        if (err < 0) err = -err;
        check(err <= 8 * BQ, "bit density tracks input");
        $display("level %0d: density %f expected %f", LEVELS[l], real'(acc_s) / NS, real'(LEVELS[l]) / BQ);
      end
    end
    check(sat_seen > 0, "integrators clipped for out-of-range input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
