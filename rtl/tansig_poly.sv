// tansig_poly: tan-sigmoid by an odd cubic polynomial, combinational.
//
// On -LIMIT < x < LIMIT (LIMIT = 1.8) the output is
//     y = C1*x + C3*x^3,   C1 = 0.8675, C3 = -0.1053,
// with both coefficients quantised to CF = 8 fractional bits (0.8671875 and
// -0.10546875). For x <= -LIMIT the output is -1 and for x >= LIMIT it is +1,
// LIMIT being 1.8 held in the input format (1.80078125 at 8 fraction bits).
// Two general multipliers form x^2 and x^3, two constant multipliers scale x
// and x^3, an adder sums them, a first two-way multiplexer substitutes -1 and
// a second one substitutes +1.
//
// The polynomial, its coefficients, the limit and the two-multiplexer
// structure follow the reference design, whose constant multiplier scales x
// itself by C1. Products are kept at full precision and the sum is truncated
// toward minus infinity to the output format: these number-format decisions are
// this design's own.
//
// Interface: x in, y out, no clock. Timing: purely combinational, zero latency.
module tansig_poly
  import tansig_pkg::*;
#(
  parameter int unsigned XW    = X_W,
  parameter int unsigned XF    = X_F,
  parameter int unsigned YW    = Y_W,
  parameter int unsigned YF    = Y_F,
  parameter int unsigned CF    = 8,        // coefficient fractional bits
  parameter real         C1    = 0.8675,   // linear coefficient
  parameter real         C3    = -0.1053,  // cubic coefficient
  parameter real         LIMIT = 1.8       // saturation point
) (
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  localparam int unsigned CW = CF + 2;               // coefficient width
  localparam longint C1_Q    = quant(C1, CF);
  localparam longint C3_Q    = quant(C3, CF);
  localparam longint LIM_Q   = quant(LIMIT, XF);

  localparam int unsigned SF = 3*XF + CF;            // fraction bits of the sum
  localparam int unsigned SW = 3*XW + CW + 1;        // width of the sum

  logic signed [2*XW-1:0] x2;     // x^2,   2*XF fraction bits
  logic signed [3*XW-1:0] x3;     // x^3,   3*XF fraction bits
  logic signed [XW+CW-1:0] t1;    // C1*x,  XF+CF fraction bits
  logic signed [3*XW+CW-1:0] t3;  // C3*x^3, SF fraction bits
  logic signed [SW-1:0]   sum;
  logic signed [YW-1:0]   p, m0;
  logic                   lo, hi;

  always_comb begin
    x2  = x * x;
    x3  = x2 * x;
    t1  = x * (CW)'(C1_Q);
    t3  = x3 * (CW)'(C3_Q);
    sum = (SW'(t1) <<< (2*XF)) + SW'(t3);
    if (SF >= YF) p = YW'(sum >>> (SF - YF));
    else          p = YW'(sum <<< (YF - SF));

    lo = longint'(x) <= -LIM_Q;
    hi = longint'(x) >= LIM_Q;
    m0 = lo ? -YW'(1 <<< YF) : p;   // first multiplexer
    y  = hi ?  YW'(1 <<< YF) : m0;  // second multiplexer
  end

endmodule
