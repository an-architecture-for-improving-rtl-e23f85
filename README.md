# Variable-radix real and complex division by digit recurrence

This is synthesizable SystemVerilog for a divider that computes `q = n / d` for real and complex
operands with a digit recurrence. Prescaling makes the quotient digits easy to select, and the
radix grows during the operation: 4, then 16, then 256. The design follows the architecture of
J. E. Stine, M. D. Ercegovac and J.-M. Muller, "An Architecture for Improving Variable Radix Real
and Complex Division Using Recurrence Division" (Asilomar 2020). That paper builds on Ercegovac and
Muller's variable-radix algorithm (ASAP 2005). Much of the detail is not given in the paper: the
widths, the table size, the factor used between radices, the iteration split and the handshake.
This RTL chooses them, and the sections below say where.

## The idea

A digit-recurrence divider makes one quotient digit per cycle:

    w[j+1] = r*w[j] - q[j+1]*d

A higher radix `r` means fewer cycles. The price is that choosing each digit normally takes a
table indexed by bits of both `w` and `d`, and that table grows very quickly with `r`.
*Prescaling* multiplies the dividend and the divisor by the same factor `K ~ 1/d`. The scaled
divisor `z = K*d` is then close to 1, and the digit becomes simply the shifted remainder rounded to
an integer, `q = round(r*w)`. That rounding needs `|1 - z|` to be about `1/r` or smaller. For
radix 256 this would need a reciprocal table with many millions of entries.

The variable-radix trick starts at a low radix, where a tiny table is accurate enough. It then
tightens `z` as the operation goes. Multiplying `w` and `z` by the same factor `M` leaves the
quotient unchanged, because `w/z` is what remains to be divided. This design uses `M = 2 - z`,
truncated to 14 fraction bits. Then `z' = z*(2 - z) = 1 - (1 - z)^2`, so each rescaling step
squares the error:

| step                           | bound on `|1 - z|` | needed for             |
|--------------------------------|--------------------|------------------------|
| table lookup (256 entries)     | 0.165              | —                      |
| refinement step (`M = 2 - z`)  | 0.027              | radix 4: 0.033         |
| rescale after the radix-4 phase   | ~2^-10          | radix 16: ~2^-6.5      |
| rescale after the radix-16 phase  | ~2^-14          | radix 256: ~2^-10.3    |

So a table of 256 entries serves a radix-256 recurrence.

## Complex division

With complex `n`, `d` and `K = K1 + i*K2`, the prescaled recurrence splits into two real
recurrences. They are coupled through the digits of the other component:

    wR[j+1] = r*wR[j] - qR*zR + qI*zI
    wI[j+1] = r*wI[j] - qI*zR - qR*zI

Each component's digit is its own remainder, rounded. The hardware is two copies of the same
recurrence block (`vr_slice`). Each cycle they exchange their quotient digits and scaled divisor
parts. They also exchange the values about to be scaled, since a complex `M` mixes the two
components (`Re(M*t) = Mr*tR - Mi*tI`). A slice's `IMAG` parameter sets the signs. The real
divider is one slice with the cross terms removed (`CPLX = 0`).

## One division, cycle by cycle

`vr_ctrl` sequences this. All slices of a divider share its control word.

| clock edge   | operation  | what happens |
|--------------|------------|--------------|
| 0 (start)    | `OP_LOAD`  | `K` read from `prescale_table` using the divisor's top bits; `w <- K*n/4`, `z <- K*d` |
| 1            | `OP_SCALE` | refinement: `M = 2 - z`; `w <- M*w`, `z <- M*z` |
| 2 .. 5       | `OP_RECUR` radix 4   | digit `q = round(4w)`, `w <- 4w - q*z`; rescale on the last of these (edge 5) |
| 6 .. 9       | `OP_RECUR` radix 16  | the same with r = 16; rescale on edge 9 |
| 10 .. 13     | `OP_RECUR` radix 256 | the same with r = 256 |
| 14           | `OP_FINAL` | truncated quotient <- `Q`, or `Q - 1` if the final remainder is negative; rounded quotient <- `Q` or `Q + 4` without its two low bits |

`done` is high for one cycle after edge 14, so a result takes 15 cycles. A new `start` is accepted
in that same cycle, so the throughput is one division every 16 cycles per divider. The twelve
iterations give `2*4 + 4*4 + 8*4 = 56` quotient bits. The paper gives the radix order, twelve
iterations, about 56 bits and one preparatory iteration for the prescaling. The 4/4/4 split is
chosen here: it is the only split of twelve iterations that gives 56 bits. The separate load and
final cycles are also this design's choice. Parameters `N4`, `N16` and `N256` change the split.

The dividend is prescaled by `K/4` (two extra integer bits), which keeps `|w[0]| < 3/4`. The first
radix-4 digit therefore holds the integer part of the quotient.

## Number formats and interface

| quantity | format |
|----------|--------|
| operands `n`, `d`, `x` | `N` = 53-bit two's complement fractions, 52 fraction bits, value in [-1, 1) |
| complex divisor | normalised: at least one component >= 1/2 or < -1/2 |
| real divisor | in [1/2, 1); the dividend is any signed fraction |
| truncated quotient | `QL` = 58 bits two's complement, 54 fraction bits (`q = Q * 2^-54`) |
| rounded quotient | `QL - 2` = 56 bits, 52 fraction bits: the precision of the operands |
| internal `w` | carry-save pair of `W = 72` bits: 10 integer and 62 fraction bits |
| internal `z` | conventional, 72 bits |
| table factor `K` | 11 bits, 8 fraction bits |
| rescale factor `M` | 17 bits, 14 fraction bits, used as 9 radix-4 digits |

Handshake for both dividers: raise `start` for one cycle while `ready` is high, with the operands
valid in that cycle. The operands are captured at that edge and need not be held. The result
outputs hold their value from the `done` cycle until the next `done`. An assertion in `vr_ctrl`
flags a `start` while the divider is busy. Reset (`rst_n`) is asynchronous and active low.

**Accuracy.** Each divider has two result outputs:

- The truncated output (`q`, `q_re`, `q_im`) is the exact quotient, or each of its components,
  truncated towards minus infinity at 54 fraction bits. It is exact to within 1/8 of a unit in the
  last place.
- The rounded output (`qr`, `qr_re`, `qr_im`) is that value rounded to 52 fraction bits, with
  half-way cases rounded up. It is within 1/2 + 1/32 of a unit of the exact quotient.

The 1/8 allowance has two sources. First, the factors are truncated when `w` and `z` are
rescaled. This shifts `w/z` by about `2^-60` relative, so a quotient within that distance of a
multiple of `2^-54` may come out one unit low or high. Second, for complex division the final
correction uses the sign of each component's remainder. That sign stands in for the sign of the
same component of `w/z`. The two agree unless that component is about `2^-14` of the other or
smaller. The testbenches accept exactly this tolerance.

The paper says the on-the-fly converter rounds, but not to which position or in which mode.
Round-half-up at the operand precision is this design's choice. Ties-to-even is not implemented:
it needs an exact test for a zero remainder, and the truncated scaling does not allow one.

## The blocks

| file | block | role |
|------|-------|------|
| `vr_divider_top.sv` | top | complex and real divider side by side, separate handshakes |
| `vr_complex_div.sv` | complex divider | two cross-coupled slices, 256-entry table, factor generation, controller |
| `vr_real_div.sv` | real divider | one slice, 8-entry table, factor generation, controller |
| `vr_slice.sv` | recurrence block | `w` and `z` registers, digit selection, multiples, scalers, converter |
| `vr_ctrl.sv` | controller | the schedule above |
| `prescale_table.sv` | reciprocal table | `K ~ 1/d` from the divisor's top bits |
| `scale_factor.sv` | factor generation | `M = K` on load, else `M = 2 - z`; radix-4 recoding of `M` |
| `rr_unit.sv` | round and recode | digit = rounded remainder estimate, recoded into five radix-4 digits |
| `lr_scaler.sv` | carry-save scaler | `M * t` for carry-save `t`, carry-save result |
| `otfc.sv` | on-the-fly conversion | signed digits of any of the three radices to two's complement, with the registers used for rounding |
| `csa_tree.sv` | helper | 3:2 counter tree (Wallace style) |
| `vrdiv_pkg.sv` | package | constants, control types, Booth recoding, table formulas |

### Digit selection (`rr_unit`)

The remainder is kept in carry-save form, so the sum is never propagated across the full width.
The selection adds only the top 16 bits of the sum and carry words. It takes them at the field
that the radix selects: a three-way multiplexer for 4, 16 and 256. This gives `r*w` with 6
fraction bits. Truncating the two words makes the estimate up to `2^-5` low, so `2^-6` is added
back before rounding to the nearest integer. This keeps `|r*w - q| <= 1/2 + 2^-6`. With the
bounds on `|1 - z|` above, `|w|` stays below about 0.55. The digit therefore stays inside the
maximally redundant set `|q| <= r - 1`, and `vr_slice` asserts that every iteration. The digit
(up to 255 in magnitude) is recoded into **five radix-4 digits** in {-2..2}, as the paper
describes. Each recoded digit selects 0, ±z or ±2z, shifted. The five multiples, the shifted
remainder and, for complex division, the five cross multiples go into one carry-save tree. No
carry-propagate adder sits in the iteration.

### Scaling in carry-save form (`lr_scaler`)

The paper's left-to-right multipliers scale by `K` or `M` without a carry-propagate adder. Here the
factor is recoded into 9 radix-4 digits. Each digit multiplies both words of the carry-save input,
and a 3:2 counter tree reduces the 18 (real) or 36 (complex) partial products back to two words.
One subtlety is this design's own. A carry-save pair is only meaningful modulo `2^W`, because the
plain sum of the two words may have wrapped, and multiplying by a *fractional* factor does not
preserve that modulus. The value being scaled is always below 1 in magnitude. So the top three
bits of the two words tell whether their sum wrapped, and the carry word is corrected by `±2^W`
before scaling. The correction changes only the top bits, with no carry chain. The same scaler
instance, with a zero carry word, rescales `z`. `z` is then assimilated by an adder, three times
per division.

### Prescaling table (`prescale_table`)

For complex division the table is addressed by the sign and 3 fraction bits of each divisor
component: 2^8 = 256 entries. The paper's Table I gives 256 for its radix-4 row. Each entry is
the rounded reciprocal of its cell's midpoint. With the cell midpoint
`(a + i*b)/16`, `a = 2*iR+1` and `b = 2*iI+1`:

    K1 = round( 4096*a / (a^2 + b^2) ) / 256
    K2 = round(-4096*b / (a^2 + b^2) ) / 256

Cells where both components are below 1/2 in magnitude hold only divisors that are not
normalised, and they store zero. The real table has 8 entries, `K = round(8192/(17 + 2j))/256`,
addressed by the three bits after the divisor's leading one. The entries are computed from these
formulas when the design is elaborated. The paper's example factors `0x82` and `0x80` are read
with 8 fraction bits. Entries are 11 bits wide because `1/d` reaches about 2.3 for normalised
complex divisors.

### On-the-fly conversion and rounding (`otfc`)

Each slice keeps four registers: `Q`, `QM = Q - 1`, `QP = Q + 1` and `QP4 = Q + 4`. Each new
digit `q` of radix `r = 2^b` (b = 2, 4 or 8) turns each register into `Q*r + q + c`, where `c` is
that register's constant. With `v = q + c`, the new value is built by shifting and appending `b`
bits:

- `QM*r + (v + r)` when `v < 0`
- `Q*r + v` when `0 <= v < r`
- `QP*r + (v - r)` when `v >= r`

No adder is involved. At the end, the truncated result is `QM` when the remainder is negative,
else `Q`. Call that result `T`. The rounded result is `(T + 2) >> 2`. In terms of the two low
bits of `Q` and the remainder sign, that is `Q >> 2` or `QP4 >> 2`. `QP4 >> 2` is chosen when the
low bits are 3, or 2 with a non-negative remainder.

## What departs from the paper, or is not in it

- The real and complex dividers are separate instances. The paper leaves a combined unit as
  future work.
- Operand width: 53 bits, which the paper gives for this architecture. The paper's synthesis
  results are for 32-bit complex division. Parameter `N` sets the width. The testbench also runs a
  32-bit complex divider with 4+4+2 iterations (40 quotient bits).
- Factor between radices: the paper says only that `M` approximates `1/d`. `M = 2 - z` is a
  choice made here.
- The extra refinement step right after the table lookup is how this design reads the paper's
  "one iteration to determine the prescaling values". With it, a 256-entry table is enough for
  radix 4.
- Latency: 15 cycles from start to done. The paper counts 1 + 12 iterations and does not count
  load or output cycles.
- Rounding: the position (52 fraction bits), the mode (half-way cases up) and the extra `Q + 4`
  register are this design's choices. The truncated 54-bit result is also brought out.
- The paper's worked example prints the imaginary part of the quotient as -0.6576796. The exact
  quotient of the printed operands is -0.647703 in that component, and this design returns it.
- Physical results (32 nm cells, area, power) are outside the RTL.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<m>`. Checks against
division use exact integer arithmetic on 256-bit values, not a model of the design. For the real
divider the check is `-d/8 <= x*2^54 - Q*d < 9d/8`. For the complex divider it is the same bound on
each component of `(n*2^54 - Q*d) * conj(d)` against `|d|^2`. The rounded result `R` is checked
the same way with `4R` in place of `Q` and the bound `±17/8`.

| testbench | covers |
|-----------|--------|
| `tb_vr_divider_top` | both dividers together at default size; worked example, corner cases, 300 random divisions each; truncated and rounded results; latency; counts radix-4/16/256 iterations, refinements, rescales, negative digits, remainder corrections and round-ups, and fails if any never happened |
| `tb_vr_complex_div` | 2,000 complex divisions at 53 bits and at 32 bits |
| `tb_vr_real_div` | 2,000 real divisions including range edges |
| `tb_vr_slice` | one slice with the testbench as controller; `z` accuracy after each rescale; final quotient |
| `tb_vr_ctrl` | control word cycle by cycle, `done`/`ready` timing |
| `tb_rr_unit` | rounding bound and recoding for random carry-save remainders at each radix |
| `tb_lr_scaler` | scaled value against exact products, carry-save inputs that wrap, both signs |
| `tb_scale_factor` | `M` values and their digit recoding |
| `tb_prescale_table` | `|1 - K*d|` bound for random normalised divisors |
| `tb_otfc` | `Q`, `Q - 1` and `Q + 4` against integer accumulation, all three radices |

To run one with plain Verilator from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/vrdiv_pkg.sv tb/tb_vr_divider_top.sv \
        --top-module tb_vr_divider_top -Mdir obj_top
    ./obj_top/Vtb_vr_divider_top

Verilator finds the other modules in `rtl/` by name through `-Irtl`. Every testbench runs in a few
seconds.

## Changing the design

- `N` (operand width) and `N4`, `N16` and `N256` (iterations per radix) are parameters of the
  dividers and the top. The datapath fraction width follows from them: the larger of
  `N - 1 + 10` and `L + 6`, where `L = 2*N4 + 4*N16 + 8*N256`. Set `QL = L + 2` on the top.
- The radix-4 bound on `|1 - z|` after refinement (0.033) leaves little margin. A finer table
  (`PB` in `vrdiv_pkg`) adds margin at the cost of 4x entries per extra bit.
- `TBITS` (estimate precision), `MF` (precision of `M`) and `IBITS` (integer headroom) live in
  `vrdiv_pkg`. The bounds above assume their default values.
