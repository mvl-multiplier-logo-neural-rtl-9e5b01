// logo_or: OR of N binary inputs, one LOGO-NN neuron.
//
// Every weight is 2 and the threshold is 1, so one true input gives Z = 1. Two or more true
// inputs give Z >= 3, which the neuron clamps to logic 1 (the binary networks are two-valued).
// The weights and threshold are the document's; the N-input form is the one its multiplier
// unit uses to sum product terms. Interface: a[N] binary inputs, f binary output.
// Combinational.
module logo_or
  import logo_pkg::*;
#(
  parameter int N = 2
) (
  input  logic [N-1:0] a,
  output logic         f
);

  logic x [N];
  always_comb for (int i = 0; i < N; i++) x[i] = a[i];

  logo_neuron #(.N(N), .IW(1), .K(2), .W(wts_all(2)), .THETA(1)) u_n (.x(x), .f(f));

endmodule
