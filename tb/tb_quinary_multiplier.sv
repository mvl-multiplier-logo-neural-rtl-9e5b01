// tb_quinary_multiplier: the full quinary multiplication table, all 25 digit pairs.
// Expected: m = X*Y mod 5 and c = X*Y div 5, computed here with integer arithmetic.
module tb_quinary_multiplier;
  import logo_pkg::*;
  int checks = 0, failures = 0;

  quit_t      x, y;
  logic [2:0] m;
  logic [1:0] c;

  quinary_multiplier dut (.x(x), .y(y), .m(m), .c(c));

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
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++) begin
        x = quit_t'(a);
        y = quit_t'(b);
        #1;
        check($sformatf("%0d*%0d M", a, b), int'(m), (a * b) % 5);
        check($sformatf("%0d*%0d C", a, b), int'(c), (a * b) / 5);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
