// tb_quinary_converter: all 25 digit pairs. For each digit D the converter must give
// nz = (D != 0) and, for D != 0, the two bits of D-1; for D = 0 both bits are 0.
module tb_quinary_converter;
  import logo_pkg::*;
  int checks = 0, failures = 0;

  quit_t  x, y;
  qcode_t xc, yc;

  quinary_converter dut (.x(x), .y(y), .xc(xc), .yc(yc));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int code(int d);   // {nz, b2, b1}
    return (d == 0) ? 0 : (4 + d - 1);
  endfunction

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
        check($sformatf("X=%0d", a), int'(xc), code(a));
        check($sformatf("Y=%0d", b), int'(yc), code(b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
