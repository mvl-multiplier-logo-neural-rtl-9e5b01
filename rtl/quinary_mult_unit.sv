// quinary_mult_unit: the LOGO-NN multiplier unit, the core of the quinary multiplier.
//
// Once zero operands are set aside, X, Y in 1..4 are reduced to x = X-1 = (x2,x1) and
// y = Y-1 = (y2,y1) in 0..3. The product of the reduced digits, again offset by one, is
//   m = (X*Y mod 5) - 1 = (m2,m1)      c = X*Y div 5 = (c2,c1)
// which are four two-level functions of the four bits:
//   m1 = x1.y1'.y2' + x2'.y1.y2' + x1'.y1.y2 + x2.y1'.y2
//   m2 = x2.y1'.y2' + x1.y1.y2'  + x2'.y1.y2 + x1'.y1'.y2
//   c1 = x2.y1.y2'  + x1.y1.y2   + x1.x2'.y2 + x1'.x2.y1'.y2
//   c2 = x2.y1.y2   + x1.x2.y2
// Each product term is one neuron (logo_term), each sum one OR neuron (weights 2,
// threshold 1). Two terms of c1 (for X=2, Y=4) and both of c2 (for X=4, Y=4) can be true
// together; the OR neuron's clamp keeps the sum at logic 1. The low product digit
// M0 = m + 1 is then rebuilt in three bits:
//   M01 = m1'  (complement neuron),  M02 = m1 XOR m2 (XOR network),  M03 = m1.m2 (AND neuron).
// Equations, neuron thresholds and the output networks are the document's.
//
// Interface: x = (x2,x1), y = (y2,y1) from the converter (the zero flags bypass this unit
// and go to the ANDing unit); mo = {M03, M02, M01, C02, C01}; m1, m2 also brought out.
// Combinational.
module quinary_mult_unit
  import logo_pkg::*;
(
  input  logic [1:0] x,
  input  logic [1:0] y,
  output mu_out_t    mo,
  output logic       m1,
  output logic       m2
);

  logic x1, x2, y1, y2;
  assign {x2, x1} = x;
  assign {y2, y1} = y;

  logic [3:0] tm1, tm2, tc1;
  logic [1:0] tc2;
  logic       c1, c2;

  // m1 product terms; operand order {v2, v1, v0}, POL bit = 1 for a true literal.
  logo_term #(.N(3), .POL(3'b001)) u_m1_0 (.a({y2, y1, x1}), .f(tm1[0]));  // x1.y1'.y2'
  logo_term #(.N(3), .POL(3'b010)) u_m1_1 (.a({y2, y1, x2}), .f(tm1[1]));  // x2'.y1.y2'
  logo_term #(.N(3), .POL(3'b110)) u_m1_2 (.a({y2, y1, x1}), .f(tm1[2]));  // x1'.y1.y2
  logo_term #(.N(3), .POL(3'b101)) u_m1_3 (.a({y2, y1, x2}), .f(tm1[3]));  // x2.y1'.y2

  // m2 product terms
  logo_term #(.N(3), .POL(3'b001)) u_m2_0 (.a({y2, y1, x2}), .f(tm2[0]));  // x2.y1'.y2'
  logo_term #(.N(3), .POL(3'b011)) u_m2_1 (.a({y2, y1, x1}), .f(tm2[1]));  // x1.y1.y2'
  logo_term #(.N(3), .POL(3'b110)) u_m2_2 (.a({y2, y1, x2}), .f(tm2[2]));  // x2'.y1.y2
  logo_term #(.N(3), .POL(3'b100)) u_m2_3 (.a({y2, y1, x1}), .f(tm2[3]));  // x1'.y1'.y2

  // c1 product terms
  logo_term #(.N(3), .POL(3'b011))  u_c1_0 (.a({y2, y1, x2}),     .f(tc1[0]));  // x2.y1.y2'
  logo_term #(.N(3), .POL(3'b111))  u_c1_1 (.a({y2, y1, x1}),     .f(tc1[1]));  // x1.y1.y2
  logo_term #(.N(3), .POL(3'b101))  u_c1_2 (.a({y2, x2, x1}),     .f(tc1[2]));  // x1.x2'.y2
  logo_term #(.N(4), .POL(4'b1010)) u_c1_3 (.a({y2, y1, x2, x1}), .f(tc1[3]));  // x1'.x2.y1'.y2

  // c2 product terms
  logo_term #(.N(3), .POL(3'b111)) u_c2_0 (.a({y2, y1, x2}), .f(tc2[0]));  // x2.y1.y2
  logo_term #(.N(3), .POL(3'b111)) u_c2_1 (.a({y2, x2, x1}), .f(tc2[1]));  // x1.x2.y2

  // Sum neurons
  logo_or #(.N(4)) u_m1 (.a(tm1), .f(m1));
  logo_or #(.N(4)) u_m2 (.a(tm2), .f(m2));
  logo_or #(.N(4)) u_c1 (.a(tc1), .f(c1));
  logo_or #(.N(2)) u_c2 (.a(tc2), .f(c2));

  // M0 = m + 1
  logo_not         u_m01 (.a(m1),         .f(mo.m01));
  logo_xor         u_m02 (.a(m1), .b(m2), .f(mo.m02));
  logo_and #(.N(2)) u_m03 (.a({m2, m1}),  .f(mo.m03));

  assign mo.c01 = c1;
  assign mo.c02 = c2;

endmodule
