// tb_p1_quantiser -- self-checking test of the input summing node and the
// registered quantiser P1. Random x, s and sample strobe; u is compared every
// sample with x - s, and y with the sign rule (u >= 0 gives +1) delayed by
// exactly one accepted sample. Also checks the reset value and that y holds
// while en is low. All four (x, s) combinations, including both ties, are
// counted and must occur.
module tb_p1_quantiser;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, x = 0, s = 0;
  logic signed [2:0] u;
  logic y;
  int y_exp;
  int combos[4];

  p1_quantiser dut (.clk, .rst_n, .en, .x, .s, .u, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: x=%0b s=%0b u=%0d y=%0b y_exp=%0d", what, $time, x, s, u, y, y_exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y_exp = 1;
    #12;
    check(y == 1'b1, "reset value");
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      x  = 1'($urandom);
      s  = 1'($urandom);
      en = ($urandom % 4) != 0;
      #1;
      check(int'(u) == (x ? 1 : -1) - (s ? 1 : -1), "u = x - s");
      check((y ? 1 : -1) == y_exp, "y before edge");
      if (en) begin
        y_exp = ((x ? 1 : -1) - (s ? 1 : -1) >= 0) ? 1 : -1;
        combos[{x, s}]++;
      end
      @(posedge clk);
      #1;
      check((y ? 1 : -1) == y_exp, "y one sample later");
    end
    for (int i = 0; i < 4; i++) check(combos[i] > 0, "all x/s combinations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
