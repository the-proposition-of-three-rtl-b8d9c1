// tansig_rom: read-only table of tanh(|x|) for |x| in [0, 4).
//
// Entry a holds tanh(a / 2^STEP_F) rounded to nearest with YF fractional bits,
// so the default 128 entries (7-bit address) with STEP_F = 5 cover [0, 4) in
// steps of 1/32. The contents are computed at elaboration from $tanh; no data
// file is needed. The read is synchronous, like a block RAM used as ROM: the
// word addressed at one rising clock edge appears on q after that edge.
//
// The 7-bit address and the [0, 4) range follow the reference design; the word
// format, the choice of sampling each step at its lower end and the
// round-to-nearest quantisation are this design's choices.
//
// Interface: clk, addr in; q out. Timing: one cycle of read latency, no reset
// (the output is valid from the first clock edge after addr is applied).
module tansig_rom
  import tansig_pkg::Y_W, tansig_pkg::Y_F, tansig_pkg::quant;
#(
  parameter int unsigned AW     = 7,    // address width
  parameter int unsigned STEP_F = 5,    // address LSB weight is 2^-STEP_F
  parameter int unsigned YW     = Y_W,
  parameter int unsigned YF     = Y_F
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [YW-1:0] q
);

  localparam int unsigned DEPTH = 1 << AW;

  typedef logic [YW-1:0] word_t;
  typedef word_t table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int a = 0; a < DEPTH; a++)
      t[a] = word_t'(quant($tanh(real'(a) / (2.0 ** STEP_F)), YF));
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk)
    q <= TABLE[addr];

endmodule
