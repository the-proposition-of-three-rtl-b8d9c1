# Three small hardware tan-sigmoid units

A neural network built in an FPGA needs its activation function in logic, and
the hyperbolic-tangent sigmoid, tansig(x) = tanh(x) = (e^x - e^-x)/(e^x + e^-x),
calls for exponentials and a division. This RTL gives three cheap
approximations of it, each a complete unit with a fixed-point input and output:

| unit          | idea                                                  | logic                                   | latency |
|---------------|-------------------------------------------------------|-----------------------------------------|---------|
| `tansig_pwl`  | tansig(x) = 2·logsig(2x) − 1, piecewise-linear logsig | comparators, shifts, adders, 2 muxes     | 0 (combinational) |
| `tansig_lut`  | odd symmetry + a 128-word table of tanh(\|x\|), 0 ≤ \|x\| < 4 | one ROM, negation, 1 mux          | 1 clock |
| `tansig_poly` | odd cubic 0.8672x − 0.1055x³ on \|x\| < 1.8            | 2 multipliers, 2 constant multipliers, 2 muxes | 0 (combinational) |

All three saturate to ±1 outside their active range. `tansig_top` places them
side by side, each with its own input and output, so that any one can be taken
on its own or the three compared. Of the three, the table unit is the most
accurate, and where a block RAM holds its table it needs the least logic. The
piecewise-linear unit needs no multiplier and no memory at all.

## Number formats

Defined in `tansig_pkg`:

* input `x`: signed 16 bits, 8 fraction bits (Q7.8), range [−128, 128);
* output `y`: signed 16 bits, 14 fraction bits (Q1.14). +1.0 is 16384 and
  −1.0 is −16384.

The 8 input fraction bits are not arbitrary: the comparison constants of the
original design are 1.6 and 1.8 held at 8 fraction bits, i.e. 1.6015625 and
1.80078125, and the units compare against exactly those values. The widths and
the output format are choices of this RTL. All units take `XW, XF, YW, YF`
parameters defaulting to the package values.

## The piecewise-linear unit (`tansig_pwl`)

This is the least obvious of the three. It rests on the identity

    tansig(x) = 1 − 2/(e^{2x} + 1) = 2·logsig(2x) − 1,   logsig(s) = 1/(1 + e^{−s})

so a log-sigmoid approximation can be reused. With s = 2x (one left shift), the
log-sigmoid is approximated by five straight segments whose slopes are powers
of two, so only shifts and adds are needed:

| selector | condition on s = 2x | L(s)                 | resulting y = 2L − 1 |
|----------|---------------------|----------------------|----------------------|
| 00       | s ≤ −8              | 0                    | −1                   |
| 01       | −8 < s ≤ −K         | (8 − \|s\|) / 64     | −0.75 + x/16         |
| 10       | \|s\| < K           | s/4 + 0.5            | x                    |
| 11       | K ≤ s < 8           | 1 − (8 − \|s\|) / 64 | 0.75 + x/16          |
| 2nd mux  | s ≥ 8               | 1                    | +1                   |

K = 1.6015625 (1.6 at 8 fraction bits), so in terms of x the knees sit at
x = ±0.8 and saturation starts at x = ±4. The datapath computes 8 − |s| once
and shifts it right by 6 for the low segment, subtracts that from 1 for the
high segment, and forms s/4 + 0.5 for the middle one. A four-way multiplexer
picks a segment by the 2-bit code above; a second two-way multiplexer forces
L = 1 when s ≥ 8. The output stage doubles L and subtracts 1.

The selector is formed by a priority comparison (s ≤ −8, then s ≤ −K, then
|s| < K, otherwise the high segment) rather than by a small network of gates.
The log-sigmoid is its own module, `logsig_pwl` (input Q7.8, output unsigned
with 14 fraction bits, range [0, 1]), usable on its own; `tansig_pwl` wraps it
with the doubling of x and the final 2L − 1.

Every intermediate keeps its full precision (14 fraction bits inside), so the
unit's output is exactly the piecewise-linear function above, with no rounding.
The largest error against tanh is 0.136, at the knees (x = ±0.8, where
tanh = 0.664 and the unit gives 0.8). At x = 2 it gives 0.875 (tanh(2) = 0.964).

## The look-up-table unit (`tansig_lut`, `tansig_rom`)

tanh is odd and is within 7·10⁻⁴ of ±1 once |x| ≥ 4, so only magnitudes in
[0, 4) are stored:

1. |x| is formed (17 bits, so −128 does not overflow).
2. Bits [9:3] of |x| (two integer bits, five fraction bits) address the ROM, so
   the table step is 1/32. Word a holds tanh(a/32), rounded to nearest at 14
   fraction bits. The table is computed at elaboration with `$tanh`; no data
   file is involved.
3. A 2-bit selector is built from {4 ≤ |x|, sign of x}:

| selector | case          | output         |
|----------|---------------|----------------|
| 00       | 0 ≤ x < 4     | ROM word       |
| 01       | −4 < x < 0    | −ROM word      |
| 10       | x ≥ 4         | +1             |
| 11       | x ≤ −4        | −1             |

**Timing.** The ROM is read synchronously, like a block RAM: the word for the
address presented at a rising edge appears after that edge. The selector is
registered at the same edge, so `y` always belongs to the `x` of the previous
cycle: y(t+1) = tansig(x(t)), one result per clock, no stalls, no reset
needed. In the original structure only the ROM had the register; with a
changing input, selector and data there come from different samples.

Within a step the output is the value at the step's lower end, so the error
against tanh grows towards the upper end of each 1/32 step. It is at most
0.027 (near x = 0, where tanh is steepest). At x = 2 the unit gives 15795/16384
= 0.96405.

## The polynomial unit (`tansig_poly`)

On −1.8 < x < 1.8 the output is

    y = C1·x + C3·x³,   C1 = 0.8675 → 222/256 = 0.8671875,   C3 = −0.1053 → −27/256 = −0.10546875

with both coefficients held at 8 fraction bits (parameter `CF`). Outside, a
first multiplexer gives −1 for x ≤ −1.80078125 and a second one gives +1 for
x ≥ 1.80078125. x² and x³ come from two general multipliers, and the two
coefficients from constant multipliers. Products are kept at full width (x³ is
48 bits), and the sum is truncated toward −∞ to Q1.14. The largest error
against tanh on [−5, 5] is 0.053, just above x = 1.8 where the cubic's 0.946
jumps to 1. At x = 2 the output is 1.

## Accuracy summary

Largest |y − tanh(x)| over every input code with −5 ≤ x ≤ 5, as measured by
`tb_tansig_top`:

| unit   | max error | value at x = 2 |
|--------|-----------|----------------|
| pwl    | 0.136     | 0.875          |
| lut    | 0.027     | 0.96405        |
| poly   | 0.053     | 1.0            |

## Where this RTL departs from, or fills in, the original design

* **Number formats.** The formats are this RTL's own. Only the 8 input fraction
  bits follow from the original constants.
* **Knee of the piecewise-linear unit.** The segment table of the original
  gives the inner knee as x = ±0.6, but its circuit compares 2x with 1.6015625
  (x = ±0.8), and its measured curve bends at 0.8. This RTL follows the
  circuit.
* **Outer log-sigmoid segments** are (8 − |s|)/64 and 1 − (8 − |s|)/64, as the
  original circuit computes them (8 − |2x|, then a right shift by 6). The
  segments meet without steps.
* **Selector codes** in the text of the original disagree with the data inputs
  wired to its multiplexers (both table and polynomial units). The RTL follows
  the wiring, which produces the tabulated function.
* **Saturation boundaries** use ≥ / ≤ as the original comparators do (x = 4 in
  the table unit and x = 1.8 in the polynomial unit already saturate). The
  tables of the original write strict inequalities there.
* **Polynomial.** The linear term is C1·x, as in the original multiplier
  structure (a constant multiplier on x).
* **Table unit register.** The selector register that keeps it aligned with
  the ROM read is an addition; see the timing note above.
* **ROM contents** are sampled at each step's lower end and rounded to
  nearest. Neither choice is specified by the original.
* **Rounding.** The piecewise-linear unit is exact. The polynomial unit
  truncates.
* Resource figures of the original (a Spartan-3A implementation) are not
  reproduced or claimed.

## Files

* `rtl/tansig_pkg.sv` – formats and the constant-quantising function `quant`.
* `rtl/logsig_pwl.sv`, `rtl/tansig_pwl.sv`, `rtl/tansig_lut.sv`, `rtl/tansig_rom.sv`,
  `rtl/tansig_poly.sv` – the units.
* `rtl/tansig_top.sv` – the three units side by side.
* `tb/tb_<module>.sv` – one self-checking testbench per module. Each sweeps
  all 65536 input codes (the ROM test reads all 128 words) and compares with a
  reference computed in `real` arithmetic. Each ends with a
  `TB_RESULT checks=N failures=M` line. `tb_tansig_top` also counts every
  segment, selector case and region of the three units, fails if one never
  occurs, and checks the x = 2 operating point.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wall -Wno-fatal \
      rtl/tansig_pkg.sv rtl/tansig_rom.sv rtl/logsig_pwl.sv rtl/tansig_pwl.sv \
      rtl/tansig_lut.sv rtl/tansig_poly.sv rtl/tansig_top.sv tb/tb_tansig_top.sv \
      --top-module tb_tansig_top -o sim
    ./obj_dir/sim

For a single unit, list the package, the unit (plus `tansig_rom.sv` for the
table unit, `logsig_pwl.sv` for the piecewise-linear one) and its testbench,
and name that testbench as top module. Every run takes well under a second.

## Changing it

* **Wider input or output:** change `X_W/X_F/Y_W/Y_F` in the package, or
  override `XW/XF/YW/YF` per instance. Internal widths follow. The testbenches
  assume the defaults (Q7.8 in, Q1.14 out) in their scaling constants.
* **Finer table:** raise `AW` and `STEP_F` together (keep AW − STEP_F = 2 so
  that the table still spans [0, 4)). The ROM then holds 2^AW words.
* **Other piecewise-linear slopes or knee:** `KNEE`, `SAT`, `SH_OUTER`,
  `SH_MID` (on `tansig_pwl` or `logsig_pwl`). For the function to stay
  continuous, the knee must satisfy K/4 + 0.5 = 1 − (8 − K)/64 with the
  default shifts (K = 1.6).
* **Other polynomial:** `C1`, `C3`, `CF`, `LIMIT`.
