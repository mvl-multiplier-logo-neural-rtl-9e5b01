// tb_logo_term: exhaustive truth-table check of the logo_term network against products of true and complemented literals.
module tb_logo_term;
  int checks = 0, failures = 0;
  logic [2:0] a3; logic f3;
  logic [3:0] a4; logic f4;
  logo_term                         dut3 (.a(a3), .f(f3));   // x.y.z' with a3 = {z, y, x}
  logo_term #(.N(4), .POL(4'b1010)) dut4 (.a(a4), .f(f4));   // a0'.a1.a2'.a3

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
    for (int i = 0; i < 8; i++) begin
      a3 = 3'(i);
      #1 check($sformatf("x.y.z' a=%b", a3), int'(f3), (a3[0] && a3[1] && !a3[2]) ? 1 : 0);
    end
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i);
      #1 check($sformatf("N4 a=%b", a4), int'(f4), (i == 'b1010) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
