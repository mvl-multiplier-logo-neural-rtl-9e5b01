// logo_and: GF(2) multiplication (AND) of N binary inputs, one LOGO-NN neuron.
//
// All weights are 1 and the threshold is N-1, so Z = (number of ones) - (N-1) reaches 1 only
// when every input is 1. This is the document's rule for an n+1 input product (theta = n).
// Interface: a[N] binary inputs, f binary output. Combinational.
module logo_and
  import logo_pkg::*;
#(
  parameter int N = 2
) (
  input  logic [N-1:0] a,
  output logic         f
);

  logic x [N];
  always_comb for (int i = 0; i < N; i++) x[i] = a[i];

  logo_neuron #(.N(N), .IW(1), .K(2), .W(wts_all(1)), .THETA(N - 1)) u_n (.x(x), .f(f));

endmodule
