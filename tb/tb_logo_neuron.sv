// tb_logo_neuron: exhaustive check of the LOGO-NN processing element.
// Three configurations are compared with f = min(max(sum(w*x) - theta, 0), K-1) computed
// here: a multi-valued neuron with mixed-sign weights (K=5), a wide linear one (K=16) and
// the default binary one.
module tb_logo_neuron;
  import logo_pkg::*;
  int checks = 0, failures = 0;

  localparam wvec_t WA = wts(2, -1, 3);
  localparam wvec_t WB = wts(3, 1);

  logic [2:0] xa [3];
  logic [2:0] fa;
  logic [2:0] xb [2];
  logic [3:0] fb;
  logic       xc [2];
  logic       fc;

  logo_neuron #(.N(3), .IW(3), .K(5),  .W(WA), .THETA(2))  u_a (.x(xa), .f(fa));
  logo_neuron #(.N(2), .IW(3), .K(16), .W(WB), .THETA(-2)) u_b (.x(xb), .f(fb));
  logo_neuron u_c (.x(xc), .f(fc));

  function automatic int clamp(int z, int k);
    if (z < 0) return 0;
    if (z > k - 1) return k - 1;
    return z;
  endfunction

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
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++) begin
          xa[0] = 3'(a); xa[1] = 3'(b); xa[2] = 3'(c);
          #1 check($sformatf("K5 x=%0d,%0d,%0d", a, b, c), int'(fa), clamp(2*a - b + 3*c - 2, 5));
        end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        xb[0] = 3'(a); xb[1] = 3'(b);
        #1 check($sformatf("K16 x=%0d,%0d", a, b), int'(fb), clamp(3*a + b + 2, 16));
      end
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        xc[0] = 1'(a); xc[1] = 1'(b);
        #1 check($sformatf("default x=%0d,%0d", a, b), int'(fc), clamp(a + b, 2));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
