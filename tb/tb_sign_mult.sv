// tb_sign_mult -- self-checking test of the mux-based +/-constant multiplier.
// Four instances with different constants and widths (the published gains
// on the 2^-10 grid, a negative constant and a 10-bit one) are driven with
// both select values many times; each product is compared with the constant
// or its negation worked out in integer arithmetic.
module tb_sign_mult;
  int checks = 0, failures = 0;
  logic sel;
  logic signed [15:0] c21, c277, cneg;
  logic signed [9:0]  c10;

  sign_mult #(.K(16), .A(16'sd21))   u_a (.sel, .c(c21));
  sign_mult #(.K(16), .A(16'sd277))  u_b (.sel, .c(c277));
  sign_mult #(.K(16), .A(-16'sd300)) u_c (.sel, .c(cneg));
  sign_mult #(.K(10), .A(10'sd255))  u_d (.sel, .c(c10));

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s sel=%0b got %0d expected %0d", what, sel, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      sel = 1'($urandom);
      #1;
      check(int'(c21),  sel ?   21 :   -21, "A=21");
      check(int'(c277), sel ?  277 :  -277, "A=277");
      check(int'(cneg), sel ? -300 :   300, "A=-300");
      check(int'(c10),  sel ?  255 :  -255, "K=10 A=255");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
