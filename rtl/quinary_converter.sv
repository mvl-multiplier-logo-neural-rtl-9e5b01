// quinary_converter: quinary to mixed-radix binary converter for both operands.
//
// Each quinary digit X (0..4) is selected on a five-position rotary switch. Four neurons
// turn the switch lines into the form the multiplier works in:
//   X0 = complement of line 0   (weight -1, threshold -1)       -> 1 when X != 0
//   x1 = 2*line2 + 1*line4 - 3  (weights 2, 1, threshold 3)     -> bit 0 of X-1
//   x2 = 4*line3 + 3*line4 - 11 (weights 4, 3, threshold 11)    -> bit 1 of X-1
// With contact k driving level k, x1 fires for X = 2 (2*2-3) and X = 4 (4-3), x2 for X = 3
// (12-11) and X = 4 (12-11). The non-zero digits 1..4 thus become the quaternary value
// X-1 in two bits, and zero is carried apart in X0. Y is converted identically.
// Weights and thresholds of x1, x2 follow the document; X0 uses the document's inverter
// (weight -1). IW is the width of a line level.
//
// Interface: x, y quinary digits in; xc, yc = {nz, b2, b1} out. Combinational.
module quinary_converter
  import logo_pkg::*;
#(
  parameter int IW = 3
) (
  input  quit_t  x,
  input  quit_t  y,
  output qcode_t xc,
  output qcode_t yc
);

  logic [IW-1:0] xl [QUINARY];
  logic [IW-1:0] yl [QUINARY];

  rotary_switch #(.R(QUINARY), .LW(IW)) u_sw_x (.d(IW'(x)), .line(xl));
  rotary_switch #(.R(QUINARY), .LW(IW)) u_sw_y (.d(IW'(y)), .line(yl));

  // Neuron inputs, grouped as in the converter figure.
  logic [IW-1:0] x_z [1], x_b1 [2], x_b2 [2];
  logic [IW-1:0] y_z [1], y_b1 [2], y_b2 [2];

  always_comb begin
    x_z[0]  = xl[0];
    x_b1[0] = xl[2];  x_b1[1] = xl[4];
    x_b2[0] = xl[3];  x_b2[1] = xl[4];
    y_z[0]  = yl[0];
    y_b1[0] = yl[2];  y_b1[1] = yl[4];
    y_b2[0] = yl[3];  y_b2[1] = yl[4];
  end

  logo_neuron #(.N(1), .IW(IW), .K(2), .W(wts_all(-1)), .THETA(-1)) u_x0 (.x(x_z),  .f(xc.nz));
  logo_neuron #(.N(2), .IW(IW), .K(2), .W(wts(2, 1)),   .THETA(3))  u_x1 (.x(x_b1), .f(xc.b1));
  logo_neuron #(.N(2), .IW(IW), .K(2), .W(wts(4, 3)),   .THETA(11)) u_x2 (.x(x_b2), .f(xc.b2));

  logo_neuron #(.N(1), .IW(IW), .K(2), .W(wts_all(-1)), .THETA(-1)) u_y0 (.x(y_z),  .f(yc.nz));
  logo_neuron #(.N(2), .IW(IW), .K(2), .W(wts(2, 1)),   .THETA(3))  u_y1 (.x(y_b1), .f(yc.b1));
  logo_neuron #(.N(2), .IW(IW), .K(2), .W(wts(4, 3)),   .THETA(11)) u_y2 (.x(y_b2), .f(yc.b2));

endmodule
