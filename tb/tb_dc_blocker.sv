// tb_dc_blocker -- end-to-end self-checking test of the DC blocker in both
// feedback configurations: SDM_ORDER = 1 and SDM_ORDER = 2, each with its
// published gain pair, fed the same input stream and sample strobe.
//
// The input bits come from an ideal second-order sigma-delta encoder of a
// test signal (offset + tone at 1/500 cycles per sample + small noise). Three
// phases, each preceded by a reset: negative offset, positive offset, and a
// zero-mean tone. Every sample the outputs y, s, u, dc_est, sdm_v and sat of
// both instances are compared with a cycle-accurate integer reference model.
//
// Mechanisms that must each occur at least once (counted, a failure if
// never seen): samples skipped by the strobe, P1 ties (u = 0), integrator
// clipping, feedback-bit activity in both orders, and removal of the negative
// offset by the first-order configuration (mean of y within 0.05 of zero over
// the second half of that phase, against an input mean of about -0.5).
module tb_dc_blocker;
  import dcb_tb_pkg::*;

  localparam int DW = 16;
  localparam int NPH = 3;
  localparam int NS  = 20000;
  localparam real OFFSET[NPH] = '{-0.5, 0.5, 0.0};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, x = 0;
  logic y1, s1, sat1, y2, s2, sat2;
  logic signed [2:0] u1, u2;
  logic signed [DW-1:0] w1, w2, v1, v2;

  dc_blocker #(.SDM_ORDER(1)) dut1 (.clk, .rst_n, .en, .x, .y(y1), .s(s1), .u(u1),
                                    .dc_est(w1), .sdm_v(v1), .sat(sat1));
  dc_blocker #(.SDM_ORDER(2)) dut2 (.clk, .rst_n, .en, .x, .y(y2), .s(s2), .u(u2),
                                    .dc_est(w2), .sdm_v(v2), .sat(sat2));

  dcb_ref ref1 = new(1, DW, 21, 277);
  dcb_ref ref2 = new(2, DW, 13, 52);
  sdm_source src = new();

  int n_stall = 0, n_tie = 0, n_sat = 0, n_s1_flip = 0, n_s2_flip = 0, n_dc_removed = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare(dcb_ref r, logic y, logic s, logic signed [2:0] u,
                         logic signed [DW-1:0] w, logic signed [DW-1:0] v, logic sat, string tag);
    check((y ? 1 : -1) == r.y, {tag, " y"});
    check((s ? 1 : -1) == r.s, {tag, " s"});
    check(int'(u) == r.u, {tag, " u"});
    check(longint'(w) == r.w, {tag, " dc_est"});
    check(longint'(v) == ((r.order == 1) ? r.v : r.v2), {tag, " sdm_v"});
    check(sat == r.sat, {tag, " sat"});
  endtask

  initial begin
    repeat (NPH * NS * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi;
    logic s1_prev, s2_prev;
    for (int p = 0; p < NPH; p++) begin
      longint sum_x, sum_y1, sum_y2;
      int taken;
      sum_x = 0; sum_y1 = 0; sum_y2 = 0; taken = 0;
      @(negedge clk);
      rst_n = 0;
      en = 0;
      ref1.reset();
      ref2.reset();
      #2 rst_n = 1;
      s1_prev = s1;
      s2_prev = s2;
      while (taken < NS) begin
        @(negedge clk);
        en = ($urandom % 8) != 0;
        if (en) x = src.next(OFFSET[p] + 0.3 * $sin(6.283185307179586 * taken / 500.0) + 0.01 * gauss());
        xi = x ? 1 : -1;
        ref1.peek(xi);
        ref2.peek(xi);
        #1;
        compare(ref1, y1, s1, u1, w1, v1, sat1, "order1");
        compare(ref2, y2, s2, u2, w2, v2, sat2, "order2");
        if (en) begin
          if (u1 == 0 || u2 == 0) n_tie++;
          if (sat1 || sat2) n_sat++;
          if (s1 != s1_prev) n_s1_flip++;
          if (s2 != s2_prev) n_s2_flip++;
          s1_prev = s1;
          s2_prev = s2;
          if (taken >= NS / 2) begin
            sum_x  += longint'(xi);
            sum_y1 += longint'(ref1.y);
            sum_y2 += longint'(ref2.y);
          end
          ref1.step(xi);
          ref2.step(xi);
          taken++;
        end else begin
          n_stall++;
        end
        @(posedge clk);
      end
      $display("phase %0d offset %5.2f: mean x %7.4f  mean y order1 %7.4f  order2 %7.4f", p, OFFSET[p],
               real'(sum_x) / (NS / 2), real'(sum_y1) / (NS / 2), real'(sum_y2) / (NS / 2));
      if (OFFSET[p] < 0.0) begin
        check(real'(sum_x) / (NS / 2) < -0.4, "input carries the negative offset");
        if ((sum_y1 < 0 ? -sum_y1 : sum_y1) < longint'(0.05 * NS / 2)) n_dc_removed++;
      end
    end
    $display("stalls %0d ties %0d clips %0d s-flips order1 %0d order2 %0d dc-removed %0d",
             n_stall, n_tie, n_sat, n_s1_flip, n_s2_flip, n_dc_removed);
    check(n_stall > 0, "strobe held samples");
    check(n_tie > 0, "P1 tie occurred");
    check(n_sat > 0, "integrator clipped");
    check(n_s1_flip > 0, "order-1 feedback active");
    check(n_s2_flip > 0, "order-2 feedback active");
    check(n_dc_removed > 0, "negative offset removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
