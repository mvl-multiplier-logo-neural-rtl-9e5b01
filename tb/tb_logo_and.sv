// tb_logo_and: exhaustive truth-table check of the logo_and network against the AND of all inputs (2 and 3 inputs).
module tb_logo_and;
  int checks = 0, failures = 0;
  logic [1:0] a2; logic f2;
  logic [2:0] a3; logic f3;
  logo_and          dut2 (.a(a2), .f(f2));
  logo_and #(.N(3)) dut3 (.a(a3), .f(f3));

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
      #1 check($sformatf("N2 a=%b", a2), int'(f2), (i == 3) ? 1 : 0);
    end
    for (int i = 0; i < 8; i++) begin
      a3 = 3'(i);
      #1 check($sformatf("N3 a=%b", a3), int'(f3), (i == 7) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
