// logo_term: one product term (minterm-like AND of literals) in a single LOGO-NN neuron.
//
// Literal i is a[i] when POL[i] = 1 and its complement when POL[i] = 0. Instead of putting a
// complement neuron in front of each complemented input, the complement is folded into the
// neuron: weight +1 for a true literal, -1 for a complemented one, threshold = (number of true
// literals) - 1. Z then reaches 1 exactly when all true literals are 1 and all complemented
// ones are 0. This is the document's minimization rule, shown there for f = x.y.z' (the
// default POL = 3'b011, a[2] = z). Interface: a[N] in, f out. Combinational.
module logo_term
  import logo_pkg::*;
#(
  parameter int         N   = 3,
  parameter logic [N-1:0] POL = 3'b011
) (
  input  logic [N-1:0] a,
  output logic         f
);

  function automatic int n_true();
    int n = 0;
    for (int i = 0; i < N; i++) if (POL[i]) n++;
    return n;
  endfunction

  function automatic wvec_t weights();
    wvec_t w = '0;
    for (int i = 0; i < N; i++) w[8*i +: 8] = POL[i] ? 8'(1) : 8'(-1);
    return w;
  endfunction

  localparam wvec_t W = weights();

  logic x [N];
  always_comb for (int i = 0; i < N; i++) x[i] = a[i];

  logo_neuron #(.N(N), .IW(1), .K(2), .W(W), .THETA(n_true() - 1)) u_n (.x(x), .f(f));

endmodule
