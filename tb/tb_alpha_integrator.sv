// tb_alpha_integrator -- self-checking test of the alpha feedback
// integrator. y is driven all +1 (until the upper limit clips), all -1 (to
// the lower limit) and then at random with a random sample strobe. The
// register and the clip flag are compared every sample with an integer model
// w(n+1) = clip(w(n) + alpha*y(n)). Both limits must be reached.
module tb_alpha_integrator;
  localparam int DW = 12;
  localparam int AQ = 21;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, y = 0;
  logic signed [DW-1:0] w;
  logic sat;
  longint w_exp;
  bit sat_exp;
  int hits_hi = 0, hits_lo = 0;

  alpha_integrator #(.DATA_W(DW), .ALPHA_Q(AQ)) dut (.clk, .rst_n, .en, .y, .w, .sat);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: w=%0d exp %0d sat=%0b exp %0b", what, $time, w, w_exp, sat, sat_exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint hi = (longint'(1) <<< (DW - 1)) - 1;
    automatic longint lo = -(longint'(1) <<< (DW - 1));
    longint t;
    w_exp = 0;
    #12 rst_n = 1;
    check(w == 0, "reset");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n < 250)       begin y = 1; en = 1; end
      else if (n < 700)  begin y = 0; en = 1; end
      else               begin y = 1'($urandom); en = ($urandom % 3) != 0; end
      t = w_exp + (y ? longint'(AQ) : -longint'(AQ));
      sat_exp = (t > hi) || (t < lo);
      if (t > hi) t = hi;
      if (t < lo) t = lo;
      #1;
      check(sat == sat_exp, "clip flag");
      if (en) begin
        w_exp = t;
        if (sat_exp && y) hits_hi++;
        if (sat_exp && !y) hits_lo++;
      end
      @(posedge clk);
      #1;
      check(longint'(w) == w_exp, "accumulator");
    end
    check(hits_hi > 0, "upper limit reached");
    check(hits_lo > 0, "lower limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
