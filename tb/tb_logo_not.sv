// tb_logo_not: exhaustive truth-table check of the logo_not network against the complement 1 - a.
module tb_logo_not;
  int checks = 0, failures = 0;
  logic a, f;
  logo_not dut (.a(a), .f(f));

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
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1 check($sformatf("a=%0d", i), int'(f), 1 - i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
