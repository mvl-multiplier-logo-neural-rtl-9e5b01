// anding_unit: output unit of the quinary multiplier.
//
// The multiplier unit assumes both digits are non-zero. When X = 0 or Y = 0 the product and
// carry must both be 0, so each of the five results M01, M02, M03, C01, C02 goes through a
// three-input AND neuron (weights 1) together with the non-zero flags X0 and Y0:
//   M1 = M01.X0.Y0, M2 = M02.X0.Y0, M3 = M03.X0.Y0, C1 = C01.X0.Y0, C2 = C02.X0.Y0.
// The gating and the one-neuron-per-output structure are the document's. The threshold is
// 2, the document's AND rule for three inputs (threshold = inputs - 1); a threshold of 1
// would let X0.Y0 alone switch an output on.
//
// Interface: mo from the multiplier unit, x0, y0 from the converter; m = (M3,M2,M1),
// c = (C2,C1), M1 and C1 least significant. Combinational.
module anding_unit
  import logo_pkg::*;
(
  input  mu_out_t    mo,
  input  logic       x0,
  input  logic       y0,
  output logic [2:0] m,
  output logic [1:0] c
);

  logo_and #(.N(3)) u_m1 (.a({y0, x0, mo.m01}), .f(m[0]));
  logo_and #(.N(3)) u_m2 (.a({y0, x0, mo.m02}), .f(m[1]));
  logo_and #(.N(3)) u_m3 (.a({y0, x0, mo.m03}), .f(m[2]));
  logo_and #(.N(3)) u_c1 (.a({y0, x0, mo.c01}), .f(c[0]));
  logo_and #(.N(3)) u_c2 (.a({y0, x0, mo.c02}), .f(c[1]));

endmodule
