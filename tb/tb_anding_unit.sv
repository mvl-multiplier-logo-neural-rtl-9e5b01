// tb_anding_unit: all 128 combinations of the five results and the two non-zero flags.
// Each output must be its input ANDed with X0 and Y0.
module tb_anding_unit;
  import logo_pkg::*;
  int checks = 0, failures = 0;

  mu_out_t    mo;
  logic       x0, y0;
  logic [2:0] m;
  logic [1:0] c;

  anding_unit dut (.mo(mo), .x0(x0), .y0(y0), .m(m), .c(c));

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
    for (int i = 0; i < 128; i++) begin
      automatic logic [4:0] v;
      automatic logic       g;
      {x0, y0, v} = 7'(i);
      mo = mu_out_t'(v);
      g  = x0 & y0;
      #1;
      check($sformatf("in=%b m", 7'(i)), int'(m), g ? int'({v[4], v[3], v[2]}) : 0);
      check($sformatf("in=%b c", 7'(i)), int'(c), g ? int'({v[1], v[0]}) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
