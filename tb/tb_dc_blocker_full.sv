// tb_dc_blocker_full -- the DC blocker at its default parameters (first-order
// feedback stage, alpha = 21/1024, beta = 277/1024, 16-bit words) running the
// published test signals end to end.
//
// Input: offset + tone + noise, encoded to a bitstream by an ideal
// second-order sigma-delta encoder. The tone sits at 1/500 of the sample
// rate (4096 Hz at an assumed 2.048 MHz bit rate, inside the band of an
// oversampling ratio of 32); the noise is Gaussian at 20 dB below the tone.
// Phases, each after a reset and 50 000 samples long:
//   0: offset +0.5, tone amplitude 0.25 (offset twice the tone)
//   1: offset -0.5, same tone (the mirror image)
//   2: offset +0.5, frequency-modulated tone (carrier 1/500, modulation
//      index 5, modulating frequency 1/25000), amplitude 0.25
//   3: offset -0.5, sawtooth of period 500 samples, amplitude 0.25
//   4: offset -0.5, AM-FM: the FM tone of phase 2 with 50 % amplitude
//      modulation at 1/10000, peak amplitude 0.25
// Every sample y, s and dc_est are compared with a cycle-accurate integer
// reference model. Over the second half of each phase the mean and the
// amplitude at the tone frequency of input and output are measured and
// printed. Each negative offset must be removed (|mean y| < 0.05).
module tb_dc_blocker_full;
  import dcb_tb_pkg::*;

  localparam int  DW  = 16;
  localparam int  NPH = 5;
  localparam int  NS  = 50000;
  localparam real TWO_PI = 6.283185307179586;
  localparam real F0  = 1.0 / 500.0;
  localparam real OFFSET[NPH] = '{0.5, -0.5, 0.5, -0.5, -0.5};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, x = 0;
  logic y, s, sat;
  logic signed [2:0] u;
  logic signed [DW-1:0] w, v;

  dc_blocker dut (.clk, .rst_n, .en, .x, .y, .s, .u, .dc_est(w), .sdm_v(v), .sat);

  dcb_ref rf = new(1, DW, 21, 277);
  sdm_source src = new();

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (NPH * (NS + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi;
    real a, ph;
    for (int p = 0; p < NPH; p++) begin
      real sx, sy, cxs, cxc, cys, cyc;
      sx = 0; sy = 0; cxs = 0; cxc = 0; cys = 0; cyc = 0;
      @(negedge clk);
      en = 0;
      rst_n = 0;
      rf.reset();
      #2 rst_n = 1;
      for (int n = 0; n < NS; n++) begin
        @(negedge clk);
        en = 1;
        if (p == 2 || p == 4) ph = TWO_PI * F0 * n + 5.0 * $sin(TWO_PI * n / 25000.0);
        else                  ph = TWO_PI * F0 * n;
        case (p)
          3:       a = 0.25 * (2.0 * (F0 * n - $floor(F0 * n)) - 1.0);              // sawtooth
          4:       a = 0.25 * (1.0 + 0.5 * $sin(TWO_PI * n / 10000.0)) / 1.5 * $sin(ph); // AM-FM
          default: a = 0.25 * $sin(ph);                                            // tone, FM
        endcase
        a  = OFFSET[p] + a + 0.0177 * gauss();
        x  = src.next(a);
        xi = x ? 1 : -1;
        rf.peek(xi);
        #1;
        check((y ? 1 : -1) == rf.y, "y");
        check((s ? 1 : -1) == rf.s, "s");
        check(longint'(w) == rf.w, "dc_est");
        if (n >= NS / 2) begin
          // y here is the response to the input one sample earlier
          sx  += xi;
          sy  += rf.y;
          cxs += xi * $sin(TWO_PI * F0 * n);
          cxc += xi * $cos(TWO_PI * F0 * n);
          cys += rf.y * $sin(TWO_PI * F0 * n);
          cyc += rf.y * $cos(TWO_PI * F0 * n);
        end
        rf.step(xi);
        @(posedge clk);
      end
      sx /= NS / 2; sy /= NS / 2;
      $display("phase %0d: offset %5.2f  mean x %7.4f  mean y %7.4f  tone amplitude x %6.4f  y %6.4f",
               p, OFFSET[p], sx, sy,
               2.0 * $sqrt(cxs * cxs + cxc * cxc) / (NS / 2), 2.0 * $sqrt(cys * cys + cyc * cyc) / (NS / 2));
      if (OFFSET[p] < 0.0) check(sy < 0.05 && sy > -0.05, "negative offset removed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
