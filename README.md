# Mixed-radix quinary multiplier built from threshold neurons

This is a one-digit quinary (radix-5) multiplier. It takes two digits X, Y in 0..4 and
returns X·Y as two quinary digits: the low digit M = X·Y mod 5 and the carry C = X·Y div 5.
Each digit comes out as a binary-coded number. The circuit is a network of one kind of
neuron with integer weights and thresholds (a "logic oriented neural network", LOGO-NN).
A smaller ternary (radix-3) multiplier built the same way sits beside it.

The main idea is a change of radix. A quinary digit normally needs three bits. A zero
operand, though, always gives a zero product, so the zero case is detected once and carried
as a flag. The remaining digits 1..4, minus one, are 0..3: a quaternary digit that fits in
two bits. Multiplication then becomes four Boolean functions of four bits. Each is a short
sum of products, and each product term and each sum is a single neuron. A last layer ANDs
every result bit with the two non-zero flags.

The RTL follows the multiplier described by H. A. Osseily, A. M. Haidar and M. A. Ahmed in
"MVL multiplier logo neural network based on mixed radices". Every weight and threshold
below is theirs unless the section *Departures and interpretations* says otherwise.

## The neuron (`logo_neuron`)

One neuron type is used everywhere:

    Z = Σ x_i·w_i − θ          f(Z) = Z if Z > 0, else 0, and at most K−1

- The weights `w_i` and the threshold `θ` are integers fixed at elaboration.
- Inputs are unsigned levels of `IW` bits.
- The output is a level of a K-valued logic, `$clog2(K)` bits wide.
- The networks here are binary (K = 2), except that the converter's inputs are multi-level.
- The weights are passed as a single packed parameter `W` of up to eight signed 8-bit
  fields. Field i is the weight of input i. `logo_pkg::wts(w0, w1, …)` builds the vector
  and `logo_pkg::wts_all(w)` repeats one weight.

The clamp at K−1 is this design's reading, and it matters. Without it, an OR neuron that
sees two true product terms outputs 3 rather than logic 1 (see *The multiplier unit*).

## Basic networks

| module | function | neuron(s) |
|---|---|---|
| `logo_not` | 1 − a | weight −1, θ = −1 |
| `logo_and #(N)` | AND of N inputs | weights 1, θ = N−1 |
| `logo_or #(N)` | OR of N inputs | weights 2, θ = 1 |
| `logo_xor` | a ⊕ b | a·b̄ (1,−1; θ 0) and ā·b (−1,1; θ 0), then summed (1,1; θ 0) |
| `logo_term #(N, POL)` | one product of literals | +1 for a true literal, −1 for a complemented one; θ = (true literals) − 1 |

`logo_term` puts the complement of a literal into a negative weight. That saves a separate
inverter neuron per complemented input (the "minimization rule"). Its default, x·y·z̄, has
weights 1, 1, −1 and θ = 1.

## The quinary datapath (`quinary_multiplier`)

    digit X ─┐  quinary_converter   x = X−1 (2 bits)   quinary_mult_unit   M0, C0   anding_unit   M = M0·X0·Y0
    digit Y ─┘  (switch + neurons)  y = Y−1 (2 bits) ─►  (sum of products) ───────►  (3-input  ─► C = C0·X0·Y0
                                    X0, Y0 ─────────────────────────────────────────►  ANDs)

The whole path is combinational, about six neuron levels deep. It has no clock and no reset.

### Converter (`quinary_converter`, `rotary_switch`)

An operand is picked on a five-position rotary switch. `rotary_switch` models the switch as
a decoder from the binary digit code. The selected contact k > 0 carries level k. Contact 0
carries level 1 when selected, because a level of 0 could not be told from an open contact.
All other contacts carry 0. Four neurons per operand then weight these levels:

| output | inputs (weight) | θ | fires for |
|---|---|---|---|
| X0 | contact 0 (−1) | −1 | X ≠ 0 |
| x1 | contact 2 (2), contact 4 (1) | 3 | X = 2 (4−3), X = 4 (4−3) |
| x2 | contact 3 (4), contact 4 (3) | 11 | X = 3 (12−11), X = 4 (12−11) |

So (x2, x1) = X−1 whenever X ≠ 0. Contact 1 needs no neuron, since X = 1 gives x = 00.

### The multiplier unit (`quinary_mult_unit`)

With x = (x2,x1) = X−1 and y = (y2,y1) = Y−1, the unit computes m = (X·Y mod 5) − 1 and
c = X·Y div 5. Juxtaposition is AND, ' is complement:

    m1 = x1·y1'·y2' + x2'·y1·y2' + x1'·y1·y2 + x2·y1'·y2
    m2 = x2·y1'·y2' + x1·y1·y2'  + x2'·y1·y2 + x1'·y1'·y2
    c1 = x2·y1·y2'  + x1·y1·y2   + x1·x2'·y2 + x1'·x2·y1'·y2
    c2 = x2·y1·y2   + x1·x2·y2

Each product term is a `logo_term` and each sum is a `logo_or` (weights 2, θ 1). The terms
of m1 and m2 exclude each other, but those of the carries do not:

- For X = 2, Y = 4 two terms of c1 are true.
- For X = 4, Y = 4 both terms of c2 are true.

Z is then 3, and the neuron's clamp gives logic 1.

The low product digit is rebuilt as M0 = m + 1 in three bits: M01 = m1' (`logo_not`),
M02 = m1 ⊕ m2 (`logo_xor`) and M03 = m1·m2 (`logo_and`). C0 = (c2, c1). These five bits
travel to the output unit as the packed struct `mu_out_t`.

### Output unit (`anding_unit`)

The unit has five three-input AND neurons (weights 1, θ 2). Each gates one of M01, M02,
M03, C01, C02 with X0 and Y0. This forces M = C = 0 when an operand is zero. Port
`m` = (M3, M2, M1) and `c` = (C2, C1), with M1 and C1 the least significant bits.

Example: 4 × 3 = 12 = 2·5 + 2, so `m` = 2 and `c` = 2.

## The ternary multiplier (`ternary_multiplier`)

This is the same method at radix 3. For X, Y in 1..2 the reduced digits x = X−1 and
y = Y−1 are single bits, and:

- M01 = x ⊕ y, which is the 2's bit of the low digit.
- M02 = M01', which is its 1's bit.
- C0 = x·y.

All three are gated with X0·Y0, and `m` = {M01, M02}·X0·Y0. The converter is this
design's own, modelled on the quinary one. It uses a three-position switch, X0 is the
complement of contact 0, and x is one neuron on contact 2 (weight 1, θ 1).

## Top level (`mvl_mult_top`)

The two multipliers stand side by side and share nothing:

| port | dir | width | meaning |
|---|---|---|---|
| `q_x`, `q_y` | in | 3 | quinary digits 0..4 |
| `q_m` | out | 3 | X·Y mod 5 |
| `q_c` | out | 2 | X·Y div 5 |
| `t_x`, `t_y` | in | 2 | ternary digits 0..2 |
| `t_m` | out | 2 | X·Y mod 3 |
| `t_c` | out | 1 | X·Y div 3 |

Digit codes at or above the radix are not valid inputs. The switch then selects nothing,
and an assertion reports it in simulation.

## Departures and interpretations

- **Neuron clamp.** The transfer function as published is linear above zero with no upper
  limit. Here it is clamped at K−1, so that a neuron's output is again a logic level. Without
  the clamp, the carries for 2×4 and 4×4 would come out of the sum neurons as 3.
- **Output AND threshold.** The published drawing of the output unit marks each
  three-input neuron with threshold 1. The stated AND rule (θ = number of inputs − 1) and
  the output equations need 2. With 1, X0 = Y0 = 1 alone would set every output bit. This
  RTL uses 2.
- **Zero-detect weight.** The converter drawing marks the zero-detect neuron with weight 1.
  The text describes it as an inverter, which is weight −1 with θ −1. This RTL uses −1.
- **Switch levels.** The levels on the switch contacts (k for contact k, 1 for contact 0)
  are inferred from the converter's weights and thresholds. They are the only levels that
  make those numbers give X−1.
- **M02.** M02 is implemented as m1 ⊕ m2, as the truth table of M0 = m + 1 requires.
- **Ternary bit order.** In the ternary design, M01 carries weight 2 and M02 weight 1, as
  in the ternary truth table. Port `m` is the plain binary value of the low digit.
- **Ternary converter.** The ternary converter is not given in the source and is this
  design's own.
- **Comparisons left out.** The source reports software timings (about 8 µs per
  multiplication against 80 µs for a processor's multiply, in MATLAB). These say nothing
  about this circuit, which is combinational.

## Verification

Every module has a self-checking testbench in `tb/`. Each checks its module exhaustively
against integer arithmetic:

- `tb_logo_neuron` checks the neuron at three settings, including K = 5 with mixed-sign
  weights.
- Each basic network is checked over its full truth table.
- The converter, multiplier unit and output unit are each checked over all of their inputs.
- Both multipliers are checked over their full multiplication tables.
- `tb_mvl_mult_top` applies all 25 quinary pairs and all 9 ternary pairs at the default
  sizes, and checks the 4 × 3 example.

`tb_mvl_mult_top` also counts how often each mechanism was exercised: zero gating, carry,
no carry and double-term carry sums for quinary, and zero gating and carry for ternary. It
fails if any count is zero.

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/logo_pkg.sv \
        tb/tb_mvl_mult_top.sv --top tb_mvl_mult_top
    ./obj_dir/Vtb_mvl_mult_top

Replace the testbench name to run any other. Every run takes well under a second.

## Files

- `rtl/logo_pkg.sv`: digit types, the converter code `qcode_t`, the multiplier-unit result
  `mu_out_t` and the weight-packing functions.
- `rtl/logo_neuron.sv`: the neuron.
- `rtl/logo_not.sv`, `logo_and.sv`, `logo_or.sv`, `logo_xor.sv`, `logo_term.sv`: the basic
  networks.
- `rtl/rotary_switch.sv`, `quinary_converter.sv`, `quinary_mult_unit.sv`, `anding_unit.sv`,
  `quinary_multiplier.sv`: the quinary datapath.
- `rtl/ternary_multiplier.sv`: the ternary multiplier.
- `rtl/mvl_mult_top.sv`: the top level.
- `tb/tb_<module>.sv`: one testbench per module.
