// tansig_pkg: number formats and constants shared by the three tan-sigmoid units.
//
// Input x is a signed two's-complement fixed-point number of X_W bits with X_F
// fractional bits (Q7.8 by default, range [-128, 128)). The 8 fractional bits
// follow from the comparison constants of the reference design: 1.6 and 1.8 held
// with 8 fractional bits become exactly 1.6015625 and 1.80078125, the values the
// design compares against. The total width of 16 bits is this design's choice.
//
// Output y is signed fixed point of Y_W bits with Y_F fractional bits (Q1.14 by
// default, range [-2, 2)); tan-sigmoid lies in [-1, 1], so +1.0 and -1.0 are both
// representable. The output format is this design's choice.
package tansig_pkg;

  parameter int unsigned X_W = 16;  // input width
  parameter int unsigned X_F = 8;   // input fractional bits
  parameter int unsigned Y_W = 16;  // output width
  parameter int unsigned Y_F = 14;  // output fractional bits

  typedef logic signed [X_W-1:0] x_t;
  typedef logic signed [Y_W-1:0] y_t;

  // Quantise a real constant to F fractional bits, rounding to nearest.
  function automatic longint quant(real v, int unsigned f);
    real s;
    s = v * (2.0 ** f);
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

endpackage
