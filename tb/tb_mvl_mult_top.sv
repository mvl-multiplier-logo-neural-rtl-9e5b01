// tb_mvl_mult_top: end-to-end test of both multipliers at their default sizes.
//
// Every quinary digit pair is applied (the ternary inputs cycle through all nine pairs at the
// same time) and both results are compared with integer arithmetic. The worked example 4*3 =
// 12 = (2,2) in quinary is checked on its own. The test counts how often each mechanism of
// the design was exercised and fails if one never was:
//   zero gating     a zero operand forces product and carry to 0 (quinary and ternary)
//   carry           a non-zero carry digit is produced (quinary and ternary)
//   double term     a sum neuron of the carry sees two true product terms and must still
//                   output logic 1 (quinary pairs 2*4 and 4*4)
//   no carry        a non-zero product below the radix
module tb_mvl_mult_top;
  import logo_pkg::*;
  int checks = 0, failures = 0;
  int k = 0;
  int n_qzero = 0, n_qcarry = 0, n_qdouble = 0, n_qplain = 0, n_tzero = 0, n_tcarry = 0;

  quit_t      q_x, q_y;
  logic [2:0] q_m;
  logic [1:0] q_c;
  trit_t      t_x, t_y;
  logic [1:0] t_m;
  logic       t_c;

  mvl_mult_top dut (.q_x(q_x), .q_y(q_y), .q_m(q_m), .q_c(q_c),
                    .t_x(t_x), .t_y(t_y), .t_m(t_m), .t_c(t_c));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic seen(string what, int n);
    $display("%-28s %0d", what, n);
    check({what, " exercised"}, int'(n > 0), 1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++) begin
        automatic int ta, tb;
        ta = (k / 3) % 3;
        tb = k % 3;
        k++;
        q_x = quit_t'(a);  q_y = quit_t'(b);
        t_x = trit_t'(ta); t_y = trit_t'(tb);
        #1;
        check($sformatf("quinary %0d*%0d M", a, b), int'(q_m), (a * b) % 5);
        check($sformatf("quinary %0d*%0d C", a, b), int'(q_c), (a * b) / 5);
        check($sformatf("ternary %0d*%0d M", ta, tb), int'(t_m), (ta * tb) % 3);
        check($sformatf("ternary %0d*%0d C", ta, tb), int'(t_c), (ta * tb) / 3);
        if (a == 0 || b == 0)                       n_qzero++;
        else if (a * b >= 5)                        n_qcarry++;
        else                                        n_qplain++;
        if ((a == 2 || a == 4) && b == 4)           n_qdouble++;
        if (ta == 0 || tb == 0)                     n_tzero++;
        if (ta * tb >= 3)                           n_tcarry++;
      end

    // Worked example: 4 * 3 = 12 = 2*5 + 2
    q_x = 3'd4; q_y = 3'd3;
    #1;
    check("4*3 low digit", int'(q_m), 2);
    check("4*3 carry digit", int'(q_c), 2);

    seen("quinary zero gating", n_qzero);
    seen("quinary carry", n_qcarry);
    seen("quinary no carry", n_qplain);
    seen("quinary double-term sum", n_qdouble);
    seen("ternary zero gating", n_tzero);
    seen("ternary carry", n_tcarry);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
