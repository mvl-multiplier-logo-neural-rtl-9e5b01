// logo_not: complement network, one LOGO-NN neuron.
//
// f = 1 - a is obtained from a single neuron with weight -1 and threshold -1:
// Z = -a + 1 is 1 for a = 0 and 0 for a = 1. Both numbers are the document's.
// Interface: one binary input, one binary output. Combinational.
module logo_not
  import logo_pkg::*;
(
  input  logic a,
  output logic f
);

  logic x [1];
  assign x[0] = a;

  logo_neuron #(.N(1), .IW(1), .K(2), .W(wts_all(-1)), .THETA(-1)) u_n (.x(x), .f(f));

endmodule
