// tansig_lut: tan-sigmoid by table look-up, one clock cycle of latency.
//
// tanh is odd and reaches +-1 (to within 7e-4) by |x| = 4, so only the
// magnitudes 0 <= |x| < 4 are stored. The absolute value of x is sliced to the
// ROM address (by default bits [9:3] of |x|: two integer and five fraction
// bits, a step of 1/32), and the ROM word is used as is for positive x,
// negated for negative x, and replaced by +1 or -1 once |x| >= 4:
//
//   sel = {4 <= |x|, sign of x}
//   00: ROM      01: -ROM      10: +1      11: -1
//
// The structure (absolute value, address slice, sign slice, one comparison
// with 4, concatenation into a 2-bit selector, negation, four-way
// multiplexer) and the 7-bit address follow the reference design. The ROM
// there has one cycle of read latency while the selector path has none; here
// the selector is registered together with the ROM read so that output and
// selector belong to the same input. That register, and the number formats,
// are this design's choices. Within [0, 4) the output is the table value of the
// step |x| falls in, so x = 2 gives tanh(2) = 0.96405 (0.9641).
//
// Interface: clk, x in; y out. Timing: y(t+1) = tansig(x(t)) for every
// rising edge; a new input can be applied every cycle. No reset is needed:
// every register is rewritten each cycle.
module tansig_lut
  import tansig_pkg::*;
#(
  parameter int unsigned XW     = X_W,
  parameter int unsigned XF     = X_F,
  parameter int unsigned YW     = Y_W,
  parameter int unsigned YF     = Y_F,
  parameter int unsigned AW     = 7,   // ROM address width
  parameter int unsigned STEP_F = 5,   // address LSB weight is 2^-STEP_F
  parameter int          LIMIT  = 4    // |x| at and above which y saturates
) (
  input  logic                 clk,
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  typedef enum logic [1:0] {
    SEL_POS = 2'b00,  // |x| < LIMIT, x >= 0: ROM word
    SEL_NEG = 2'b01,  // |x| < LIMIT, x < 0 : negated ROM word
    SEL_P1  = 2'b10,  // x >= LIMIT         : +1
    SEL_M1  = 2'b11   // x <= -LIMIT        : -1
  } sel_e;

  logic        [XW:0]   x_abs;
  logic        [AW-1:0] addr;
  logic        [YW-1:0] rom_q;
  sel_e                 sel_d, sel_q;

  always_comb begin
    x_abs = x[XW-1] ? $unsigned(-(XW+1)'(x)) : $unsigned((XW+1)'(x));
    addr  = x_abs[XF-STEP_F +: AW];
    sel_d = sel_e'({(XW+1)'(longint'(LIMIT) <<< XF) <= x_abs, x[XW-1]});
  end

  tansig_rom #(
    .AW    (AW),
    .STEP_F(STEP_F),
    .YW    (YW),
    .YF    (YF)
  ) u_rom (
    .clk (clk),
    .addr(addr),
    .q   (rom_q)
  );

  always_ff @(posedge clk)
    sel_q <= sel_d;

  always_comb begin
    unique case (sel_q)
      SEL_POS: y = $signed(rom_q);
      SEL_NEG: y = -$signed(rom_q);
      SEL_P1:  y = YW'(1 <<< YF);
      default: y = -YW'(1 <<< YF);
    endcase
  end

endmodule
