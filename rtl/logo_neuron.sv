// logo_neuron: the single processing element from which every LOGO-NN network is built.
//
// The neuron forms Z = sum_i x_i * W[i] - THETA over N inputs with integer weights and an
// integer threshold, and outputs f(Z) = Z for Z > 0 and 0 otherwise (a linear transfer
// with a floor at zero). Inputs are unsigned logic levels of IW bits. The output is a level
// of a K-valued logic, so it is clamped to K-1; for the binary (K=2) networks that make up
// the multiplier this turns an OR neuron that sees two true terms into logic 1 rather than 3.
// The weighted sum, threshold and floor follow the document; the clamp at K-1 is this
// design's reading of the requirement that neuron signals lie in {0..K-1}.
//
// Interface: x[N] inputs, f output of $clog2(K) bits. Weights and threshold are fixed at
// elaboration (the networks are designed, not trained): W holds up to WMAX signed 8-bit
// weights, field i (bits 8i+7..8i) for input i, usually built with logo_pkg::wts().
// Purely combinational, no clock.
module logo_neuron
  import logo_pkg::*;
#(
  parameter int    N     = 2,
  parameter int    IW    = 1,
  parameter int    K     = 2,
  parameter wvec_t W     = wts_all(1),
  parameter int    THETA = 0
) (
  input  logic [IW-1:0]         x [N],
  output logic [$clog2(K)-1:0]  f
);

  if (N > WMAX) begin : g_too_wide
    $error("logo_neuron: N = %0d exceeds WMAX = %0d", N, WMAX);
  end

  int z;

  always_comb begin
    z = -THETA;
    for (int i = 0; i < N; i++) begin
      z += int'(x[i]) * int'($signed(W[8*i +: 8]));
    end
    if (z <= 0)          f = '0;
    else if (z >= K - 1) f = ($clog2(K))'(K - 1);
    else                 f = ($clog2(K))'(z);
  end

endmodule
