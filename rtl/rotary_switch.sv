// rotary_switch: the input selector in front of the radix converter.
//
// The converter is fed by a rotary switch with one contact per digit value 0..R-1. The
// selected contact k > 0 drives its line at level k, contact 0 drives its line at level 1
// when selected (a value of 0 could not be told from an open contact), and every other line
// is 0. The converter neurons then weight these levels. The switch itself is the document's;
// modelling it as a decoder from a binary digit code, with these line levels, is this
// design's choice.
//
// Interface: d is the selected position as a binary number (must be < R); line[k] is the
// level on contact k. Combinational. A code d >= R selects nothing (all lines 0) and is
// flagged by an assertion in simulation.
module rotary_switch #(
  parameter int R  = 5,
  parameter int LW = 3
) (
  input  logic [LW-1:0] d,
  output logic [LW-1:0] line [R]
);

  always_comb begin
    for (int k = 0; k < R; k++) begin
      if (int'(d) == k) line[k] = (k == 0) ? LW'(1) : LW'(k);
      else              line[k] = '0;
    end
  end

  always_comb begin
    assert (int'(d) < R) else $error("rotary_switch: position %0d does not exist", d);
  end

endmodule
