// tb_ternary_multiplier: the full ternary multiplication table, all 9 digit pairs.
// Expected: m = X*Y mod 3 and c = X*Y div 3.
module tb_ternary_multiplier;
  import logo_pkg::*;
  int checks = 0, failures = 0;

  trit_t      x, y;
  logic [1:0] m;
  logic       c;

  ternary_multiplier dut (.x(x), .y(y), .m(m), .c(c));

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
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        x = trit_t'(a);
        y = trit_t'(b);
        #1;
        check($sformatf("%0d*%0d M", a, b), int'(m), (a * b) % 3);
        check($sformatf("%0d*%0d C", a, b), int'(c), (a * b) / 3);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
