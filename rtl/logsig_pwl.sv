// logsig_pwl: five-segment piecewise-linear log-sigmoid, combinational.
//
// Approximates logsig(s) = 1/(1 + e^-s) with straight segments whose slopes
// are powers of two, so that only comparators, shifts and adders are needed:
//
//   s <= -SAT            L = 0
//   -SAT < s <= -K       L = (8 - |s|) / 64       (right shift by SH_OUTER)
//   |s| < K              L = s/4 + 0.5            (right shift by SH_MID)
//   K <= s < SAT         L = 1 - (8 - |s|) / 64
//   s >= SAT             L = 1                    (second multiplexer)
//
// with SAT = 8 and K = 1.6 rounded to the input's fraction bits (1.6015625 at
// 8 bits). The segment value 8 - |s| is formed once and shared by the two outer
// segments. A four-way multiplexer, selected by the 2-bit code below, picks one
// of the first four segments; a second two-way multiplexer forces L = 1 at and
// above SAT. The segments meet without steps at -8, -K, K and 8.
//
// The segment table, the constants, the shifts, the selector codes and the two
// multiplexers follow the reference design. The output keeps every bit of the
// result (SF + SH_OUTER fraction bits), so it is exact; its width and the input
// format are this design's choices.
//
// Interface: s in (signed, SW bits, SF fraction bits), l out (unsigned,
// SF + SH_OUTER + 1 bits, SF + SH_OUTER fraction bits, range [0, 1]).
// Timing: purely combinational, zero latency.
module logsig_pwl
  import tansig_pkg::*;
#(
  parameter int unsigned SW       = X_W,  // input width
  parameter int unsigned SF       = X_F,  // input fractional bits
  parameter real         KNEE     = 1.6,  // inner segment boundary
  parameter int          SAT      = 8,    // saturation point
  parameter int unsigned SH_OUTER = 6,    // right shift of the outer segments (/64)
  parameter int unsigned SH_MID   = 2     // right shift of the middle segment (/4)
) (
  input  logic signed [SW-1:0]          s,
  output logic        [SF+SH_OUTER:0]   l
);

  // Selector of the four-way multiplexer
  typedef enum logic [1:0] {
    SEG_ZERO = 2'b00,  // s <= -SAT
    SEG_LOW  = 2'b01,  // -SAT < s <= -K
    SEG_MID  = 2'b10,  // |s| < K
    SEG_HIGH = 2'b11   // K <= s (s >= SAT is overridden afterwards)
  } seg_e;

  localparam int unsigned LF = SF + SH_OUTER;    // fraction bits of L
  localparam int unsigned IW = SW + SH_OUTER + 4; // internal signed width

  localparam longint KNEE_Q = quant(KNEE, SF);
  localparam longint SAT_Q  = longint'(SAT) <<< SF;

  logic        [SW:0]   s_abs;
  logic signed [IW-1:0] seg_outer, seg_mid, seg_high, l_mux, l_val;
  seg_e                 sel;
  logic                 sat_hi;

  always_comb begin
    s_abs = s[SW-1] ? $unsigned(-(SW+1)'(s)) : $unsigned((SW+1)'(s));

    // Segment values, all with LF fraction bits: an SF-bit value divided by
    // 2^SH_OUTER is the same integer read with LF fraction bits.
    seg_outer = IW'(SAT_Q) - IW'(s_abs);                         // (8 - |s|)/64
    seg_mid   = (IW'(s) <<< (SH_OUTER - SH_MID)) + (IW'(1) <<< (LF - 1));
    seg_high  = (IW'(1) <<< LF) - seg_outer;

    if (longint'(s) <= -SAT_Q)         sel = SEG_ZERO;
    else if (longint'(s) <= -KNEE_Q)   sel = SEG_LOW;
    else if (longint'(s_abs) < KNEE_Q) sel = SEG_MID;
    else                               sel = SEG_HIGH;
    sat_hi = longint'(s) >= SAT_Q;

    unique case (sel)
      SEG_ZERO: l_mux = '0;
      SEG_LOW:  l_mux = seg_outer;
      SEG_MID:  l_mux = seg_mid;
      default:  l_mux = seg_high;
    endcase
    l_val = sat_hi ? (IW'(1) <<< LF) : l_mux;
    l     = (LF+1)'(l_val);
  end

endmodule
