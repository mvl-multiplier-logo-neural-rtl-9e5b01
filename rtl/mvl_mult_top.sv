// mvl_mult_top: the two mixed-radix LOGO-NN digit multipliers side by side.
//
// The quinary multiplier (radix 5) is the main design: it multiplies two quinary digits and
// returns the low product digit and the carry digit, each as a binary coded quinary digit.
// The ternary multiplier (radix 3) is the smaller design the method is first explained on;
// it is independent and has its own ports. Both are networks of a single neuron type with
// integer weights and thresholds, and both are purely combinational: no clock, no reset.
//
// Interface:
//   q_x, q_y  quinary digits 0..4      q_m = X*Y mod 5 (M3,M2,M1)   q_c = X*Y div 5 (C2,C1)
//   t_x, t_y  ternary digits 0..2      t_m = X*Y mod 3              t_c = X*Y div 3
module mvl_mult_top
  import logo_pkg::*;
(
  input  quit_t      q_x,
  input  quit_t      q_y,
  output logic [2:0] q_m,
  output logic [1:0] q_c,
  input  trit_t      t_x,
  input  trit_t      t_y,
  output logic [1:0] t_m,
  output logic       t_c
);

  quinary_multiplier u_quinary (.x(q_x), .y(q_y), .m(q_m), .c(q_c));
  ternary_multiplier u_ternary (.x(t_x), .y(t_y), .m(t_m), .c(t_c));

endmodule
