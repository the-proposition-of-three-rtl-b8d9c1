// tansig_top: the three tan-sigmoid units side by side.
//
// Three alternative hardware approximations of tansig(x) = tanh(x), each with
// its own input and output so that they can be used, compared or measured
// independently:
//   tansig_pwl  - 2*logsig(2x) - 1 with a five-segment piecewise-linear
//                 log-sigmoid made of shifts and adds (combinational);
//   tansig_lut  - tanh(|x|) table of 128 words with sign handling and
//                 saturation at |x| >= 4 (one cycle of latency);
//   tansig_poly - odd cubic 0.8672x - 0.1055x^3 on |x| < 1.8, saturated
//                 outside (combinational).
// Inputs are signed Q7.8, outputs signed Q1.14 (see tansig_pkg). Offering the
// three units together, rather than one, is this design's choice; each unit
// follows its own reference structure.
//
// Interface: clk (used only by the look-up-table unit), three x inputs, three
// y outputs. Timing: y_pwl and y_poly follow their inputs in the same cycle;
// y_lut follows x_lut one rising clock edge later.
module tansig_top
  import tansig_pkg::*;
(
  input  logic clk,
  input  x_t   x_pwl,
  input  x_t   x_lut,
  input  x_t   x_poly,
  output y_t   y_pwl,
  output y_t   y_lut,
  output y_t   y_poly
);

  tansig_pwl  u_pwl  (.x(x_pwl),  .y(y_pwl));
  tansig_lut  u_lut  (.clk(clk), .x(x_lut), .y(y_lut));
  tansig_poly u_poly (.x(x_poly), .y(y_poly));

endmodule
