// tb_quinary_mult_unit: all 16 reduced digit pairs x = X-1, y = Y-1 (X, Y in 1..4).
// Expected: M0 = X*Y mod 5 (three bits), C0 = X*Y div 5, and m = (X*Y mod 5) - 1.
// Also counts the two pairs whose carry sum neurons see two true product terms at once.
module tb_quinary_mult_unit;
  import logo_pkg::*;
  int checks = 0, failures = 0;
  int double_terms = 0;

  logic [1:0] x, y;
  mu_out_t    mo;
  logic       m1, m2;

  quinary_mult_unit dut (.x(x), .y(y), .mo(mo), .m1(m1), .m2(m2));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    for (int xv = 1; xv < 5; xv++)
      for (int yv = 1; yv < 5; yv++) begin
        automatic int p;
        p = xv * yv;
        x = 2'(xv - 1);
        y = 2'(yv - 1);
        #1;
        check($sformatf("%0d*%0d M0", xv, yv), int'({mo.m03, mo.m02, mo.m01}), p % 5);
        check($sformatf("%0d*%0d C0", xv, yv), int'({mo.c02, mo.c01}), p / 5);
        check($sformatf("%0d*%0d m", xv, yv), int'({m2, m1}), p % 5 - 1);
        if ((xv == 2 && yv == 4) || (xv == 4 && yv == 4)) double_terms++;
      end
    check("double-term sums exercised", double_terms, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
