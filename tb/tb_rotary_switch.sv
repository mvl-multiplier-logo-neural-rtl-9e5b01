// tb_rotary_switch: every position of the five-position (quinary) and three-position
// (ternary) switch; the selected contact must carry its level (1 for contact 0, k for
// contact k) and every other contact 0.
module tb_rotary_switch;
  int checks = 0, failures = 0;

  logic [2:0] d5;
  logic [2:0] l5 [5];
  logic [1:0] d3;
  logic [1:0] l3 [3];

  rotary_switch                    dut5 (.d(d5), .line(l5));
  rotary_switch #(.R(3), .LW(2))   dut3 (.d(d3), .line(l3));

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
    for (int d = 0; d < 5; d++) begin
      d5 = 3'(d);
      #1;
      for (int k = 0; k < 5; k++)
        check($sformatf("R5 d=%0d line%0d", d, k), int'(l5[k]), (d == k) ? ((k == 0) ? 1 : k) : 0);
    end
    for (int d = 0; d < 3; d++) begin
      d3 = 2'(d);
      #1;
      for (int k = 0; k < 3; k++)
        check($sformatf("R3 d=%0d line%0d", d, k), int'(l3[k]), (d == k) ? ((k == 0) ? 1 : k) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
