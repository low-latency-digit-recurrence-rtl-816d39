# Radix-4 reciprocal and reciprocal square root in half the cycles

This RTL computes `1/d` and `1/sqrt(d)` for a double-precision significand
(53 bits) with a radix-4 digit recurrence. A plain radix-4 recurrence needs 28
iterations for 53 bits. Here the recurrence stops after 14 digits. That gives
about 28 correct bits, and one Newton-Raphson step then doubles them. The
Newton-Raphson step is not a full multiplication. It is a second digit
recurrence that consumes each digit as soon as the first recurrence produces
it, so the two run in lockstep. The correction is finished one cycle after the
last digit. A result takes 15 clock cycles instead of 29. The cycle time stays
about the same, because the critical path is still the digit selection loop.
The price is a second datapath of roughly the same size as the first.

There are two designs, side by side under `rsr_top`:

* `rsr_unit` is the **combined unit**. It computes `1/d` (`op = 0`, `d` in
  [1/2,1)) or `1/sqrt(d)` (`op = 1`, `d` in [1/4,1)) with one digit-selection
  table shared by both operations.
* `recip_unit` is a **reciprocal-only unit**. Its digit-by-digit part is
  simpler: a 3-2 adder, no D/C registers, and a smaller selection table.

Both have an overlapped mode (the fast path) and an exact mode
(digit-by-digit only). Both always return the correctly rounded
round-to-nearest result.

## Number formats

| quantity | format |
|---|---|
| operand `d` | unsigned, 54 fraction bits (`d * 2^54`). For `1/d`, `d` is in [1/2,1): 53 significant bits, bit 0 = 0. For `1/sqrt(d)`, `d` is in [1/4,1): a significand shifted right by one for an odd exponent. |
| result | 54 bits: 2 integer + 52 fraction bits. The value is in (1,2]. `d = 1/2` and `d = 1/4` give exactly 2.0. |
| residual `w`, `D[j]` | two's complement, 8 integer + 58 fraction bits (66 bits). |
| `C[j]` | unsigned, 58 fraction bits. |
| approximation `E`/`H` | carry-save, 66-bit window with 59 fraction bits (see below). |

All widths are in `rtl/rsr_pkg.sv`. The guard bits (58 instead of 54, 8
integer bits) are this implementation's choice. With them, the truncation of
`C[j]` and the wrap-around of the carry-save vectors never affect a selected
digit or the approximation. Sign, exponent and IEEE-754 packing are outside
these units. The exponent of the result is `-e` (or `-e/2`, after making
`e` even) and is handled by the caller.

## The digit-by-digit recurrences (`rsr_dbd`, and the left half of `recip_unit`)

Radix 4, digits `p` in {-2,...,2}, residual kept in carry-save form:

* Reciprocal: `w[j+1] = 4 w[j] - p[j+1] d`. The digits form `Q`, with `Q -> 1/d`.
* Reciprocal square root:
  * `w[j+1] = 4 w[j] - p D[j] - p^2 C[j]`
  * `D[j+1] = D[j] + 2 p C[j]`
  * `C[j+1] = C[j] / 4`

  Here `D[j] = d P[j]` and `C[j] = d 4^-(j+1) / 2`. The digits form `P`, with
  `P -> 1/sqrt(d)`. This comes from requiring `w[j] = 4^j (1 - d P[j]^2)/2`.
  The term `p^2 C` is the only part that differs from a divider.

In the combined unit the reciprocal is the same datapath with `C = 0`, so `D`
stays equal to `d`. `D` is updated by a carry-propagate adder. Its estimate
for the selection comes from an 8-bit short adder over the top bits of `D[j]`
and `2pC[j]`, which runs in parallel with the long adder.

**Initial values.** The recurrence starts from a one-bit first approximation.
This keeps every later digit within {-2..2}:

| | start value | `w[0]` | `D[0]`, `C[0]` |
|---|---|---|---|
| `1/d`, d >= 3/4 | Q0 = 1 | 1 - d | D0 = d |
| `1/d`, d < 3/4 | Q0 = 2 | 1 - 2d | D0 = d |
| `1/sqrt d`, d >= 1/2 | P0 = 1 | (1 - d)/2 | D0 = d, C0 = d/8 |
| `1/sqrt d`, d < 1/2 | P0 = 2 | (1 - 4d)/2 | D0 = 2d, C0 = d/8 |

`w[0]` is built without an adder. The sum vector holds the constant plus the
bit inverse of the multiple of `d`, and the carry vector holds the missing
unit. The first digit is selected in the same (load) cycle. The reciprocal-only
unit instead starts from `w[0] = 1/4`, `Q0 = 0`. Its first digit then only
rebuilds the integer part (see *Departures*).

## Digit selection (`qsel_comb`, `qsel_recip`)

The digit is chosen from two estimates:

* a 7-bit estimate of `4w` (4 fraction bits, from a short adder over the
  carry-save vectors);
* the interval of `D` (or `d`).

It is compared against four thresholds `m2 > m1 > m0 > m-1`.

* The combined unit uses 16 intervals of width 1/32 for `D` in [1/2,1). An
  estimate outside that range is saturated to the first or last interval.
  This is needed because `D[j]` of the square-root recurrence moves towards
  `sqrt(d)` and its estimate can leave the range slightly.
* The reciprocal unit uses the classic 8-interval radix-4 division table.

One threshold of the published combined table is changed: `m-1` for `D` in
[26/32, 27/32) is -20/16, not -21/16. With -21 the square-root recurrence
leaves its convergence bound for `d` near 0.406 to 0.414 and produces wrong
digits. -20 still satisfies the containment condition for the reciprocal.
Both tables are checked exhaustively against the containment and continuity
conditions in `tb_qsel_comb` and `tb_qsel_recip`.

## The overlapped Newton-Raphson recurrence (`rsr_approx`, right half of `recip_unit`)

This is the least obvious part of the design. After `g = 14` digits the
Newton-Raphson steps would be:

* reciprocal: `E = Q (2 - dQ)`
* reciprocal square root: `H = P (3 - dP^2) / 2`

Both have an error that is quadratic in the error of `Q` or `P`. These values
can be written in terms of the residuals the digit recurrence already has.
Scaling by `16^j` and expanding one digit at a time gives recurrences with
only digit-times-vector products:

```
E[j+1] = 16 E[j] + p (2 * 4w[j]) - p^2 D[j]
H[j+1] = 16 H[j] + p (2 * 4w[j]) + p w[j+1] - p^2 D[j] / 2
```

Here `p = p[j+1]`, and the `w` and `D` values come straight from the
digit-by-digit datapath. `E[g]/16^g` and `H[g]/16^g` are the corrected
results. Each step is one radix-16 step of the approximation. It shifts by
16 because the correction has twice the precision of the digit.

Per cycle the combined unit forms:

* `p x 2*4w[j]`: digit multiplexers on both residual vectors, added to
  `16H` in a 4-2 adder;
* `-p^2 x (D or D/2)`: selected by the operation, added in a 3-2 adder;
* `p x w[j+1]`: forced to zero for the reciprocal, added in a second 4-2
  adder.

The units that complete the negated multiples go into the four free low bits
of the carry vector of `16H`. The digit-by-digit and the approximation
datapaths therefore have similar depth. The approximation does not lie on the
selection loop.

## Carry-save window and the approximation converter (`approx_conv`)

`H` grows by four bits per step and is never added up in full. Only a 66-bit
window is kept in carry-save form. Each step:

* The 7 bits leaving the top of the window (sum and carry fields) go through
  a 7-bit short adder. The result is one radix-16 digit plus a carry of 0..5
  into the previous digit.
* The window keeps a bias of 2 units (a constant `10` on top of the sum
  vector). This makes the digit handed over always non-negative, so the
  converter never has to borrow.
* The converter holds the last digit in a *pending* register until the next
  step has added its carry. The digits before it live in two shift registers
  `R` and `RP = R + 1`. A carry out of the pending digit selects `RP` instead
  of `R`, so no carry ever ripples.

After 14 steps the result is `R` or `RP`. The choice comes from the pending
digit and the top bits of the residual window: round up when
`pending + residual >= 1/2 ulp`.

**When the approximation cannot be rounded.** One Newton-Raphson step from
below can only undershoot, and the window truncations only lower it further,
so the approximation is always slightly *below* the true value. How far below
is set by the bound on the digit-recurrence residual:

* For `1/d`, the error is `d (1/d - Q)^2 <= (4/9) 2^-56`, about 7/256 ulp.
* For `1/sqrt(d)`, the error is `(3/2) y eps^2`, with `eps = w 4^-14`, at
  most about 11/256 ulp.
* Truncating the residual estimate adds up to 2/256 ulp.

Over 60,000 random operands per unit the measured error was 0 to 9/256 ulp.
So when the rounding value falls in
[112/256, 130/256) ulp, just under the halfway point, the converter raises
`ambig`. The controller then does not finish. It lets the digit-by-digit
recurrence continue to 28 digits, which is still running anyway, and returns
its exactly rounded result. That run takes 29 cycles instead of 15. Random
operands take this path in about 5% (combined unit) to 8% (reciprocal
unit) of runs. The band limits are parameters
(`AMB_LO`, `AMB_HI`) of `approx_conv`.

## Exact rounding of the digit-by-digit result (`otf_round`)

The signed digits are converted on the fly into `Q`, `Q - ulp` and `Q + ulp`
(three shift registers). No final carry-propagate addition is needed. After
28 digits:

1. The last two digits form a tail `t = 4 q27 + q28`.
2. Together with the sign and zero-ness of the final residual, `t` decides
   the result: round to nearest-even picks `Q + ulp` (t > 8, or t = 8 with a
   positive residual or a tie on an odd `Q`), `Q - ulp` (the mirror case), or
   `Q`.

The residual's sign and zero flag come from a full addition of its carry-save
vectors.

## Sequencing, interface and timing (`rsr_ctrl`)

* **Start.** `start` is accepted when the unit is not busy. `op` and `exact`
  are captured with it.
* **Load cycle.** The start cycle is the load cycle: initial values plus the
  first digit.
* **Iterations.** Then `iter` is high for 14 cycles (overlapped mode) or 28
  (exact mode or fallback).
* **Done.** `done` pulses in the cycle after the last iteration. In that
  cycle `result` is valid and `busy` is already low, so a new `start` can be
  accepted right away. `valid` stays high until the next start.
* **Ignored starts.** A `start` while busy is ignored.

| unit | overlapped | fallback | exact |
|---|---|---|---|
| `rsr_unit` | 15 | 29 | 29 |
| `recip_unit` | 16 | 30 | 30 |

Cycles are counted from the start edge to the `done` cycle. Reset (`rst_n`) is
asynchronous and active low. The controller asserts that a new run starts only
when idle and that `done` is never seen while busy.

## Departures from the published architecture

* **Selection table.** One entry of the combined selection table is changed
  (see *Digit selection*).
* **Reciprocal-only unit step count.** It runs 15 overlapped steps (16
  cycles), not 14, and 29 exact steps. Starting from `w[0] = 1/4` spends the
  first digit on the integer part. With 14 steps the remaining error (about
  2^-53.4) is too large to round 53 bits.
* **Combined unit step count.** The combined unit uses the published counts
  (14 / 28).
* **Datapath widths.** They are wider than the 56/57/58 bits shown for the
  original datapaths: 66-bit windows with 8 integer bits. This guarantees
  that the modulo wrap of the carry-save vectors is a multiple of the window
  size and never reaches a used bit.
* **Rounding test.** The test that decides whether the approximation can be
  rounded is this design's own (a one-sided band, above). The published
  scheme only says that such cases continue with the digit recurrence.
* **Start/done handshake and reset.** These are this design's own.

## Files

* `rtl/rsr_pkg.sv`: formats and types.
* `rtl/rsr_top.sv`: top level with both units.
* Combined unit:
  * `rtl/rsr_unit.sv`
  * `rtl/rsr_ctrl.sv`: sequencing, shared by both units.
  * `rtl/rsr_dbd.sv`: digit-by-digit datapath.
  * `rtl/rsr_approx.sv`: Newton-Raphson datapath.
  * `rtl/approx_conv.sv`: converter.
  * `rtl/otf_round.sv`: on-the-fly conversion and exact rounding.
  * `rtl/qsel_comb.sv`: selection.
* Reciprocal-only unit: `rtl/recip_unit.sv`, plus `rtl/qsel_recip.sv`.
* Adders: `rtl/csa32.sv` and `rtl/csa42.sv`.

Each block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary -Irtl -Itb --top-module tb_rsr_top \
    rtl/rsr_pkg.sv $(ls rtl/*.sv | grep -v rsr_pkg) tb/tb_rsr_top.sv
./obj_dir/Vtb_rsr_top
```

Use any other `tb_*` module name in the same way.

`tb_rsr_top` runs both units concurrently at their default sizes: 3000
operations each, random and corner operands, both operations and both modes.
It checks every result against exact integer arithmetic and every latency.
It also counts the mechanisms of the design and fails if one never occurs:

* each initial-value branch;
* every digit value;
* rounding to `Q + ulp` and to `Q - ulp`;
* carries into the converter registers;
* a rounding fallback in each unit;
* an ignored start.

The reference check needs no floating point. With `D = d*2^54` and `R` the
result in units of 2^-52, the result is correctly rounded exactly when
`(2R-1) D <= 2^107 <= (2R+1) D` (reciprocal), or the same with `(2R+-1)^2 D`
against `2^160` (reciprocal square root).

## How far it can be trusted

* **Results.** Every result checked by the testbenches was correctly rounded
  (round to nearest), in both modes and both units. This covers several
  thousand random operands plus the interval ends and the branch thresholds.
* **Fallback margin.** The safety of the overlapped mode rests on the error
  bound of the approximation: one-sided, estimated at 13/256 ulp at most, and
  measured at 9/256 ulp at most. The fallback band allows 16/256. This is a
  hand estimate, not a formal proof. Lowering `AMB_LO` trades a few more slow
  runs for more margin.
* **Exact-mode rsqrt.** `C[j]` is truncated as it shifts right. The final
  residual's sign is therefore exact for the reciprocal, and nearly exact for
  the reciprocal square root. No mismatch was seen.
* **Out-of-range operands.** Operands outside [1/2,1) (reciprocal) or
  [1/4,1) (reciprocal square root) are not detected.
* **Testbench coverage.** Each testbench was shown to fail when its block was
  broken on purpose. Examples: a dropped carry bit, a wrong threshold, an
  inverted rounding rule, a missing two's-complement unit, a dropped term of
  the approximation recurrence, an ignored fallback request.
