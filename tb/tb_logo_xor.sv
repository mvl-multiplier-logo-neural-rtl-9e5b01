// tb_logo_xor: exhaustive truth-table check of the logo_xor network against GF(2) addition.
module tb_logo_xor;
  int checks = 0, failures = 0;
  logic a, b, f;
  logo_xor dut (.a(a), .b(b), .f(f));

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
      {a, b} = 2'(i);
      #1 check($sformatf("a=%0d b=%0d", a, b), int'(f), int'(a) ^ int'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
