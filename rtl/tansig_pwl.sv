// tansig_pwl: tan-sigmoid from the piecewise-linear log-sigmoid, combinational.
//
// Uses the identity tansig(x) = 1 - 2/(e^2x + 1) = 2*logsig(2x) - 1. The input
// is doubled by a left shift (s = 2x, one bit wider so nothing is lost), passed
// through the five-segment log-sigmoid logsig_pwl, and the result L is doubled
// by a left shift and 1 is subtracted. In terms of x the output is
//
//   x <= -4            -1
//   -4 < x <= -0.8     -0.75 + x/16
//   |x| < 0.8          x
//   0.8 <= x < 4       0.75 + x/16
//   x >= 4             +1
//
// (the knee is 0.80078125 exactly: 1.6015625 on the doubled input).
//
// The doubling, the reuse of the log-sigmoid approximation on 2x and the final
// 2*L - 1 follow the reference design. The number formats (see tansig_pkg) are
// this design's choice. L is exact, with XF + 6 fraction bits; when the output
// has fewer fraction bits, 2*L - 1 is truncated toward minus infinity (with the
// default Q1.14 output nothing is lost).
//
// Interface: x in, y out, no clock. Timing: purely combinational, zero latency.
module tansig_pwl
  import tansig_pkg::*;
#(
  parameter int unsigned XW       = X_W,
  parameter int unsigned XF       = X_F,
  parameter int unsigned YW       = Y_W,
  parameter int unsigned YF       = Y_F,
  parameter real         KNEE     = 1.6,  // segment boundary on s = 2x
  parameter int          SAT      = 8,    // saturation point on s = 2x
  parameter int unsigned SH_OUTER = 6,    // right shift of the outer segments (/64)
  parameter int unsigned SH_MID   = 2     // right shift of the middle segment (/4)
) (
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  localparam int unsigned LF = XF + SH_OUTER;  // fraction bits of L
  localparam int unsigned IW = LF + 4;         // width of 2*L - 1, signed

  logic signed [XW:0]   s;      // 2x
  logic        [LF:0]   l;      // logsig(2x), range [0, 1]
  logic signed [IW-1:0] y_int;  // 2*L - 1, LF fraction bits

  assign s = {x, 1'b0};

  logsig_pwl #(
    .SW      (XW + 1),
    .SF      (XF),
    .KNEE    (KNEE),
    .SAT     (SAT),
    .SH_OUTER(SH_OUTER),
    .SH_MID  (SH_MID)
  ) u_logsig (
    .s(s),
    .l(l)
  );

  always_comb begin
    y_int = (IW'(l) <<< 1) - (IW'(1) <<< LF);
    if (LF >= YF) y = YW'(y_int >>> (LF - YF));
    else          y = YW'(y_int <<< (YF - LF));
  end

endmodule
