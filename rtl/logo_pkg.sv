// logo_pkg: types and constants shared by the mixed-radix LOGO-NN multipliers.
//
// A quinary digit (0..4) is carried on the ports as a plain 3-bit binary number, a ternary
// digit (0..2) as a 2-bit number. Inside the quinary datapath a digit X is carried in the
// "mixed radix" form produced by the converter: a non-zero flag X0 and the two bits of X-1,
// which lies in 0..3 (a quaternary digit) whenever X is non-zero. The multiplier unit passes
// its five pre-gating results to the ANDing unit as one packed struct.
package logo_pkg;

  localparam int QUINARY = 5;   // radix of the main design
  localparam int TERNARY = 3;   // radix of the preface design

  // Neuron weights travel as one packed parameter: WMAX signed 8-bit fields, field i being
  // the weight of input i. wts() packs a list of weights, wts_all() repeats one weight.
  localparam int WMAX = 8;
  typedef logic [WMAX*8-1:0] wvec_t;

  function automatic wvec_t wts(byte w0 = 0, byte w1 = 0, byte w2 = 0, byte w3 = 0,
                                byte w4 = 0, byte w5 = 0, byte w6 = 0, byte w7 = 0);
    return {w7, w6, w5, w4, w3, w2, w1, w0};
  endfunction

  function automatic wvec_t wts_all(byte w);
    wvec_t v;
    for (int i = 0; i < WMAX; i++) v[8*i +: 8] = w;
    return v;
  endfunction

  typedef logic [2:0] quit_t;   // quinary digit, binary coded (0..4)
  typedef logic [1:0] trit_t;   // ternary digit, binary coded (0..2)

  // Converter output for one quinary digit X: nz = X0 (X != 0), {b2,b1} = X-1 when X != 0.
  typedef struct packed {
    logic nz;
    logic b2;
    logic b1;
  } qcode_t;

  // Multiplier-unit results before gating with X0.Y0: M0 = m+1 in binary, C0 = carry.
  typedef struct packed {
    logic m03;
    logic m02;
    logic m01;
    logic c02;
    logic c01;
  } mu_out_t;

endpackage
