// logo_xor: GF(2) addition (exclusive OR) as a two-layer LOGO-NN network.
//
// Two first-layer neurons compute a.b' (weights 1,-1) and a'.b (weights -1,1), both with
// threshold 0; a second-layer neuron with weights 1,1 and threshold 0 adds them. At most one
// of the two terms is 1, so the sum is already binary. Structure and numbers are the
// document's. Interface: binary a, b in, f = a XOR b out. Combinational.
module logo_xor
  import logo_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic f
);

  logic x [2];
  logic h [2];
  assign x[0] = a;
  assign x[1] = b;

  logo_neuron #(.N(2), .IW(1), .K(2), .W(wts(1, -1)), .THETA(0)) u_ab (.x(x), .f(h[0]));
  logo_neuron #(.N(2), .IW(1), .K(2), .W(wts(-1, 1)), .THETA(0)) u_ba (.x(x), .f(h[1]));
  logo_neuron #(.N(2), .IW(1), .K(2), .W(wts(1, 1)),  .THETA(0)) u_or (.x(h), .f(f));

endmodule
