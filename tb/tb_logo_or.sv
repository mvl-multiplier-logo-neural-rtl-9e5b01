// tb_logo_or: exhaustive truth-table check of the logo_or network against the OR of all inputs (2 and 4 inputs).
module tb_logo_or;
  int checks = 0, failures = 0;
  logic [1:0] a2; logic f2;
  logic [3:0] a4; logic f4;
  logo_or          dut2 (.a(a2), .f(f2));
  logo_or #(.N(4)) dut4 (.a(a4), .f(f4));

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
    for (int i = 0; i < 4; i++) begin
      a2 = 2'(i);
      #1 check($sformatf("N2 a=%b", a2), int'(f2), (i != 0) ? 1 : 0);
    end
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i);
      #1 check($sformatf("N4 a=%b", a4), int'(f4), (i != 0) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
