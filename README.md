# Approximate double precision floating-point units

Floating-point adders, multipliers and dividers are large and power hungry,
yet many applications (vision, learning, media, sensor processing) accept a
small error in the last bits of a result. This RTL implements three IEEE 754
double precision units in which the most expensive structure can be trimmed
in a controlled way:

* an **adder/subtractor** with a dual-path (R-path / N-path) organisation whose
  118-bit alignment shifter can be narrowed to 54 bits or given fewer control
  bits;
* a **multiplier** whose 53 x 53 array multiplier can drop its `h` least
  significant partial-product columns (truncated multiplication);
* a **divider** that forms the reciprocal of the divisor with two
  Newton-Raphson iterations on one shared, likewise truncatable, 54 x 54
  array multiplier.

The three units are independent and sit side by side in `approx_fpu_top`.
All arithmetic is SystemVerilog-2017, synthesizable, and parameterised so
that the exact and the approximate configurations come from the same source.

| Unit | Default configuration | Error at default | Timing |
|------|-----------------------|------------------|--------|
| `fp_adder` | 118-bit shifter, 6 control bits | none (IEEE, all 4 modes) | combinational |
| `fp_multiplier` | `TRUNC_H = 46` truncated columns | at most 1 ulp | combinational |
| `fp_divider` | `TRUNC_H = 48` truncated columns | a few ulp (see below) | 7 cycles, start/done |

Operands are normalised doubles. An exponent field of zero is read as zero
(denormals flush to zero), results below the normal range flush to a signed
zero, overflow returns infinity or the largest finite number depending on the
rounding mode. Infinities and NaNs on the inputs are not handled. These
special-value rules are this implementation's own; the arithmetic core
follows the published architecture.

Rounding modes (`fp_pkg::rmode_e`): `00` nearest-even, `01` toward zero,
`10` toward +infinity, `11` toward -infinity.

## The dual-path adder

`fp_adder` runs two complete datapaths in parallel and keeps one result:

    IS_R = IS_R1 | IS_R2 | ~S_EFF

* `S_EFF` is 1 for an effective subtraction (operand signs differ after the
  add/sub control is applied).
* `IS_R1` means the exponent difference `delta` satisfies `|delta| >= 2`.
* `IS_R2` comes from the N-path. It means the significand difference is at
  least one, so no massive cancellation can happen.

This split is not the classical "near/far by exponent difference" split. The
N-path handles only effective subtractions with `|delta| <= 1` whose
difference is below one. Within those limits the difference is exact in 54
bits, so the N-path needs **no rounding**. The R-path then always produces a
positive sum. That sum needs at most a one-position right normalisation.

### R-path (`fpa_rpath`)

1. **Lazy exponent difference.** `ea + ~eb` is computed instead of `ea - eb`,
   which saves the carry-in. The sign bit (`SIGN_BIG`) says which operand is
   larger. The magnitude is `delta-1` when A is larger and `|delta|`
   otherwise. `IS_BIG` flags `delta >= 65` or `delta <= -64`, where every
   bit of the small operand ends up in the sticky bit. `MAG_MED` is the low
   six bits of the magnitude.
2. **One's complement, preshift, Align1.** For an effective subtraction both
   significands are inverted. Both are also preshifted left by one place, so
   that sums and differences share the range [1,4). The small operand is
   placed in a 55-bit frame `FSOP'` by this table; it also makes up for the
   missing 1 of the lazy difference:

   | SIGN_BIG | S_EFF | net shift already applied | FSOP'[54:0] |
   |---|---|---|---|
   | 0 | 0 | right 1 | `{00, FSO}` |
   | 0 | 1 | 0 | `{1, FSO, 1}` |
   | 1 | 0 | 0 | `{0, FSO, 0}` |
   | 1 | 1 | left 1 | `{FSO, 11}` |

   (`FSO` is the small significand, inverted when `S_EFF`.)
3. **Align2.** `{FSOP', 63 x S_EFF}` (118 bits) is shifted right by `MAG_MED`
   in a two-level radix-8 barrel shifter (`barrel_shifter_r8`). The first
   level shifts 0..7 places and the second level multiples of 8. Ones are
   shifted in for subtractions. When `IS_BIG` is set, a fixed 64-position
   shift `{65 x S_EFF, FSO}` is selected instead.
4. **G, R, S and addition.** Bit 64 of the aligned word is the guard bit and
   bit 63 the round bit. For an addition, sticky is the OR of bits 62..0. For
   a subtraction it is the AND of those bits: they are inverted, so this is
   the complement of the true sticky bit. `{FSOPA[117:65], G, R, S}` is added
   to the large operand in a compound prefix adder. For a subtraction the
   incremented sum is taken, which completes the two's complement.
5. **Normalise and round.** Bit 55 of the sum picks one of two windows. The
   53-bit significand is rounded in the requested mode. A second compound
   adder supplies the increment. The exponent is `EL + hi - S_EFF`, plus one
   if rounding carries out.

### N-path (`fpa_npath`)

* A 2-bit adder predicts `delta mod 4` from the exponents' two low bits.
* The larger significand is `{FA,0}` or `{FB,0}`. The smaller one is inverted
  and aligned by at most one place: `{FBO,1}`, `{1,FBO}` or `{1,FAO}`.
* One compound adder forms the lazy difference `L + ~S` and its increment,
  with both operands sign-extended. If the sign bit is set, the magnitude is
  the complement of the sum. Otherwise it is the incremented sum. No
  separate negation step is needed.
* A leading-one detector and a left radix-8 barrel shifter normalise. The
  exponent becomes `EL - 1 - lz`.

### Approximate alignment shifters

Two parameters of `fp_adder` (and `approx_fpu_top`) trade accuracy for
shifter size:

* `RSHIFT_W = 54` keeps only the 54 bits down to the guard bit. Round and
  sticky are then never computed. With round-to-zero the result is at most one
  ulp from the exact result. This roughly halves the shifter.
* `CTRL_BITS = n < 6` saturates the shift amount at `2^n - 1`. Including the
  Align1 position, this gives a total right shift of at most `2^n`. Results
  stay exact while the exponent difference is in `[-(2^n - 1), 2^n]`.
  Outside that window the small operand is misaligned, and the error grows
  quickly. The fixed shift for `|delta| >= 64` is unchanged.

The published architecture describes these options only in prose. The
saturating behaviour and keeping the big-difference path are this
implementation's reading of them.

## Truncated multiplication

`array_multiplier` is a carry-save array. Row `r` of full adders adds
partial-product row `r` to the sum and carry vectors of the row above, and a
final carry-propagate adder merges them. Each row is written as one
bit-vector full-adder expression. With `H > 0` the `H` lowest columns of the
partial-product matrix are never built. The product is then the sum of all
partial products `x[i]y[j]` with `i + j >= H`. Its low `H` bits are zero, and
the result is always slightly too small: no compensation constant is added.

`fp_multiplier` uses it for the 53-bit significands:

* the sign is `s1 ^ s2`;
* `exp_unit` reduces `e1 + e2 - 1023` with one row of 3:2 compressors, then a
  compound adder delivers both the exponent and the exponent plus one;
* product bit 105 chooses the one-place right normalisation and the
  incremented exponent;
* the result is rounded and its exponent adjusted;
* overflow and underflow are checked last.

With `TRUNC_H = 46` the truncation only disturbs the round and sticky bits.
The rounded result is then at most one ulp from the exact result (the
testbench checks this on every product). Larger `H` saves more area, and the
error grows quickly past 47.

## Newton-Raphson division

`nr_divider` computes `N/D` for significands in [1,2). One 54 x 54 array
multiplier is shared under a fixed schedule. MUX1 picks from {ROM, D, R3} and
MUX2 from {X', N, R3, ~R4}:

| cycle | MUX1 | MUX2 | writes | meaning |
|---|---|---|---|---|
| 1 | - | - | ROM, X' regs | look up `C` with `D[51:42]`, form `X'` |
| 2 | C | X' | R3, R4 | seed `x0 = C * X'` |
| 3 | D | R3 | R4 | `D * x` |
| 4 | R3 | ~R4 | R3 | `x (2 - D x)` |
| 5 | D | R3 | R4 | `D * x` |
| 6 | R3 | ~R4 | R3 | reciprocal |
| 7 | R3 | N | R5 | quotient |

**Seed.** `recip_rom` holds `C = (X_m1 + 2^-11)^-2` for the 1024 possible
leading parts `X_m1 = 1.x1..x10`. This is a first-order Taylor expansion of
`1/X` about the middle of each interval. The entries are 20-bit fractions,
computed at elaboration:

    C * 2^20 = round(2^42 / (2049 + 2 i)^2)

The operand modifier keeps `x1..x10` and inverts `x11..x20`. `C * X'` is then
a seed good to about 20 bits, and two iterations reach the 54-bit word
length.

**Number format.** Every multiplier operand is 54 bits with one integer bit.
Product bits [106:53] are written back. `~R4` is a plain inversion, so it
gives `2 - Dx - 2^-53`, one unit short of the exact two's complement. The
quotient register `q` is the whole last product shifted left by one, so bit
107 has weight 1.

**Accuracy.** Two iterations on 54-bit words are used. The one's-complement
step and the product truncation all err downward. As a result the quotient
is within about 4 units of 2^-53 with an exact multiplier, and about 6 with
`TRUNC_H = 48`. After rounding, `fp_divider` results are usually one or two
ulp below the correctly rounded quotient, and sometimes exact. Exact cases
such as 3/3 come out as `1 - 2 ulp`. The method corrects itself, so
truncating the shared multiplier costs less accuracy here than in the
multiplier.

`fp_divider` adds the sign XOR, the exponent `e1 - e2 + 1023`, and its
decrement from `exp_unit` (`SUBTRACT = 1`). It also does the left
normalisation on bit 107, rounding and the range checks. A zero divisor
returns a signed infinity.

**Handshake.** Pulse `start` for one cycle while `busy` is low. Operands and
rounding mode are captured with `start`. `done` pulses seven clock edges
later. `y` then stays valid until the next `start`. A new `start` may be
given in the same cycle as `done`. An assertion flags a `start` while busy.

## Files

| File | Contents |
|---|---|
| `rtl/fp_pkg.sv` | `fp64_t`, `rmode_e`, rounding decision, overflow result |
| `rtl/compound_adder.sv` | Kogge-Stone adder giving `a+b` and `a+b+1` |
| `rtl/barrel_shifter_r8.sv` | two-level radix-8 shifter, `WIDTH`, `CTRL_BITS`, `LEFT` |
| `rtl/leading_one_detector.sv` | priority encoder for the N-path |
| `rtl/fpa_rpath.sv`, `rtl/fpa_npath.sv`, `rtl/fp_adder.sv` | adder |
| `rtl/array_multiplier.sv`, `rtl/exp_unit.sv`, `rtl/fp_multiplier.sv` | multiplier |
| `rtl/recip_rom.sv`, `rtl/nr_divider.sv`, `rtl/fp_divider.sv` | divider |
| `rtl/approx_fpu_top.sv` | the three units side by side |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_trunc_sweep` |

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `fp_adder`, top `ADD_RSHIFT_W` | `RSHIFT_W` | 118 | alignment shifter width (54 = approximate) |
| `fp_adder`, top `ADD_CTRL_BITS` | `CTRL_BITS` | 6 | shifter control bits (1..6) |
| `fp_multiplier`, top `MUL_TRUNC_H` | `TRUNC_H` | 46 | truncated columns (0..52) |
| `fp_divider`, top `DIV_TRUNC_H` | `TRUNC_H` | 48 | truncated columns (0..53) |
| `recip_rom`, `nr_divider` | `M` | 10 | seed table index bits (table 2^M x 2M) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. The
package is the only file that must be named explicitly; the rest is found
through `-y`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl -Itb \
        rtl/fp_pkg.sv tb/tb_approx_fpu_top.sv --top-module tb_approx_fpu_top
    ./obj_dir/Vtb_approx_fpu_top

Building a testbench that holds several 53 x 53 arrays takes one to two
minutes of C++ compilation; the simulations themselves run in seconds.

How the results are checked:

* **Adder.** The testbench compares against the simulator's own `real`
  arithmetic. The exact rounding error of each sum (TwoSum) decides the
  directed-mode answers, so all four modes are checked bit for bit.
* **Multiplier.** The testbench rounds the exact 106-bit product itself.
* **Divider.** Results are checked against `real` division, within the
  bounds above.
* **Top.** `tb_approx_fpu_top` runs all three units at their default
  configuration. It checks that every mechanism occurs at least once: both
  adder paths, the big-shift path, R-path normalisation, cancellation,
  multiplier normalisation and truncation error, divider left normalisation,
  back-to-back divisions, overflow and underflow.
* **Sweep.** `tb_trunc_sweep` reports the average and maximum error of the
  multiplier and the divider for several truncation depths. It also reports
  the adder's error for several shifter control-bit counts.

## Limits and departures

* The published equations for the R-path contain some inconsistencies. Where
  they conflict with the block diagram and the rest of the derivation, this
  RTL follows the diagram and the derivation:
  * the `IS_BIG` shift selection;
  * the large-operand preshift;
  * whether the compound adder's `+1` goes with subtraction;
  * the sticky bit under one's complement (the AND form described above).
* Rounding in the R-path uses a separate compound incrementer after
  normalisation. It is not merged into the significand adder.
* The divider's operand format and its placement of `C` and `X'` in the
  54-bit words are this implementation's choices.
* Denormals, infinities and NaNs are outside the scope of the design.
* There are no pipeline registers in the adder or the multiplier. Each is a
  single combinational stage, as in the published design.
