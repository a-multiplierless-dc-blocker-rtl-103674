// tb_sdm1 -- self-checking test of the first-order feedback sigma-delta
// modulator (published beta = 277/1024). The multi-bit input w is held at a
// series of constant levels inside (-beta, beta), then driven past beta so
// that the integrator clips, with a random sample strobe throughout. Every
// sample, s, v and the clip flag are compared with an integer model of
// v(n) = clip(v(n-1) + w(n) - beta*s(n)), s(n) = sgn v(n-1). For each
// in-range level the bit density must track it: |N*w - beta*sum(s)| stays
// within a few beta over N accepted samples.
module tb_sdm1;
  localparam int DW = 16;
  localparam int BQ = 277;
  localparam int NLEV = 7;
  localparam int LEVELS[NLEV] = '{0, 100, -100, 200, -250, 270, 3000};
  localparam int NS = 2048;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DW-1:0] w = '0, v;
  logic s, sat;
  longint v_exp;
  int sat_seen = 0;

  sdm1 #(.DATA_W(DW), .BETA_Q(BQ)) dut (.clk, .rst_n, .en, .w, .s, .v, .sat);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: w=%0d v=%0d exp %0d s=%0b", what, $time, w, v, v_exp, s);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint hi = (longint'(1) <<< (DW - 1)) - 1;
    automatic longint lo = -(longint'(1) <<< (DW - 1));
    longint t;
    int s_exp;
    bit sat_exp;
    v_exp = 0;
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
        s_exp = (v_exp >= 0) ? 1 : -1;
        t = v_exp + longint'(LEVELS[l]) - longint'(BQ * s_exp);
        sat_exp = (t > hi) || (t < lo);
        if (t > hi) t = hi;
        if (t < lo) t = lo;
        #1;
        check((s ? 1 : -1) == s_exp, "s = sgn v(n-1)");
        check(sat == sat_exp, "clip flag");
        if (en) begin
          v_exp = t;
          acc_s += longint'(s_exp);
          taken++;
          if (sat_exp) sat_seen++;
        end
        @(posedge clk);
        #1;
        check(longint'(v) == v_exp, "integrator");
      end
      if (LEVELS[l] > -BQ && LEVELS[l] < BQ) begin
        automatic longint err = longint'(NS) * LEVELS[l] - BQ * acc_s;
        if (err < 0) err = -err;
        check(err <= 4 * BQ, "bit density tracks input");
        $display("level %0d: density %f expected %f", LEVELS[l], real'(acc_s) / NS, real'(LEVELS[l]) / BQ);
      end
    end
    check(sat_seen > 0, "integrator clipped for out-of-range input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
