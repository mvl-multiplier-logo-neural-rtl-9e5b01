// quinary_multiplier: one-digit quinary (radix-5) multiplier built from LOGO-NN neurons.
//
// The idea is to avoid a three-bit binary code for quinary digits. A zero operand forces
// a zero result, so it is detected once and carried as a flag; the remaining digits 1..4,
// minus one, are quaternary and fit in two bits. The multiplication is then a set of
// four-variable binary functions. Three units are chained:
//   quinary_converter  -> X0, (x2,x1) = X-1, Y0, (y2,y1) = Y-1
//   quinary_mult_unit  -> M0 = (X*Y mod 5) and C0 = (X*Y div 5), valid for X, Y != 0
//   anding_unit        -> M = M0.X0.Y0, C = C0.X0.Y0
// This structure is the document's.
//
// Interface: x, y quinary digits 0..4 (binary coded); m = (M3,M2,M1) = X*Y mod 5 and
// c = (C2,C1) = X*Y div 5, both binary coded. Purely combinational, about six neuron levels
// from input to output.
module quinary_multiplier
  import logo_pkg::*;
(
  input  quit_t      x,
  input  quit_t      y,
  output logic [2:0] m,
  output logic [1:0] c
);

  qcode_t  xc, yc;
  mu_out_t mo;

  quinary_converter u_conv (.x(x), .y(y), .xc(xc), .yc(yc));
  quinary_mult_unit u_mult (.x({xc.b2, xc.b1}), .y({yc.b2, yc.b1}), .mo(mo), .m1(), .m2());
  anding_unit       u_and  (.mo(mo), .x0(xc.nz), .y0(yc.nz), .m(m), .c(c));

endmodule
