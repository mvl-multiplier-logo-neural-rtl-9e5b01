// ternary_multiplier: one-digit ternary (radix-3) multiplier by the same mixed-radix method.
//
// A zero operand forces a zero result, so it is carried as a flag (X0, Y0); the non-zero
// digits 1, 2 minus one are binary, x = X-1 and y = Y-1. Then
//   (X*Y mod 3) - 1 = x XOR y      X*Y div 3 = x.y
// and the low digit M = (x XOR y) + 1 is 1 or 2, i.e. M01 = x XOR y is its 2's bit and
// M02 = complement of M01 its 1's bit. All three results are ANDed with X0.Y0.
// The equations are the document's, built from its basic networks (XOR, complement, AND).
// The document gives no converter for this case; this one follows the quinary converter:
// a three-position rotary switch, X0 = complement of line 0, and x = one neuron on line 2
// (level 2, weight 1, threshold 1).
//
// Interface: x, y ternary digits 0..2 (binary coded); m = X*Y mod 3 (binary), c = X*Y div 3.
// Combinational.
module ternary_multiplier
  import logo_pkg::*;
#(
  parameter int LW = 2
) (
  input  trit_t      x,
  input  trit_t      y,
  output logic [1:0] m,
  output logic       c
);

  logic [LW-1:0] xl [TERNARY];
  logic [LW-1:0] yl [TERNARY];

  rotary_switch #(.R(TERNARY), .LW(LW)) u_sw_x (.d(LW'(x)), .line(xl));
  rotary_switch #(.R(TERNARY), .LW(LW)) u_sw_y (.d(LW'(y)), .line(yl));

  // Converter: non-zero flags and the reduced one-bit digits.
  logic [LW-1:0] xz [1], yz [1], xb [1], yb [1];
  logic          x0, y0, xr, yr;

  always_comb begin
    xz[0] = xl[0];
    yz[0] = yl[0];
    xb[0] = xl[2];
    yb[0] = yl[2];
  end

  logo_neuron #(.N(1), .IW(LW), .K(2), .W(wts_all(-1)), .THETA(-1)) u_x0 (.x(xz), .f(x0));
  logo_neuron #(.N(1), .IW(LW), .K(2), .W(wts_all(1)),  .THETA(1))  u_xr (.x(xb), .f(xr));
  logo_neuron #(.N(1), .IW(LW), .K(2), .W(wts_all(-1)), .THETA(-1)) u_y0 (.x(yz), .f(y0));
  logo_neuron #(.N(1), .IW(LW), .K(2), .W(wts_all(1)),  .THETA(1))  u_yr (.x(yb), .f(yr));

  // Multiplier: M01 = x XOR y, M02 = M01', C0 = x.y
  logic m01, m02, c0;

  logo_xor          u_m01 (.a(xr), .b(yr), .f(m01));
  logo_not          u_m02 (.a(m01),        .f(m02));
  logo_and #(.N(2)) u_c0  (.a({yr, xr}),   .f(c0));

  // Output gating with X0.Y0
  logo_and #(.N(3)) u_m1 (.a({y0, x0, m01}), .f(m[1]));
  logo_and #(.N(3)) u_m0 (.a({y0, x0, m02}), .f(m[0]));
  logo_and #(.N(3)) u_c  (.a({y0, x0, c0}),  .f(c));

endmodule
