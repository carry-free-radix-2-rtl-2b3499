# Carry-free radix-2 subtractive divider

This is a digit-recurrence divider for normalized significands. It makes one
quotient digit per clock, and its critical path contains no carry-propagate
adder. Three ideas make that possible:

* **Signed-bit remainder.** The partial remainder is kept as a number whose
  digits are -1, 0 or +1. Each digit is stored as one bit of a *positive
  part* and one bit of a *negative part*. Adding or subtracting the divisor
  then only adds bits to one of the two parts, position by position.
* **Segment-wise digit adjustment.** The sums are brought back to single bits
  by small lookup tables, each covering four digits. A short second pass
  then moves the table carries between segments.
* **Divisor-free quotient selection.** The divisor is prescaled into
  [1, 1.5], in the manner of Svoboda. The next quotient digit can then be
  read straight off the leading digits of the remainder, without comparing
  against the divisor. The quotient digits are -1, 0 or +1. An on-the-fly
  converter turns them into binary as they arrive.

The default configuration is a 32-bit / 32-bit divider (`N = 32`).

## Numbers and formats

| Quantity | Format | Range |
|---|---|---|
| `x`, `d` (inputs) | unsigned fixed point 1.(N-1), MSB must be 1 | [1, 2) |
| prescaled `X`, `D` | 1.(N+1), two extra fraction bits | `D` in [1, 1.5] |
| remainder `R` | `RW` signed-bit digits, digit *i* has weight 2^(i-(N+1)) | \|R\| < 1 |
| `q` (output) | unsigned fixed point 1.(N-1), truncated | (0.5, 2) |

For `N = 32` the remainder has `RW = 36` digits. That is 33 fraction digits,
plus digits of weight 1, 2 and 4, so the word splits into nine four-digit
segments. The digits of weight 2 and 4 are headroom: the digit adjustment can
produce them transiently, and the rewrite step clears them again.

The signs travel separately: `q_sign = x_sign ^ d_sign`. Exponent handling is
not part of this unit.

## One iteration

Let `R` be the remainder held in the register and `q` the digit chosen in the
previous clock. Each clock computes:

```
W = 2R                              (first clock: W = X, q = +1)
S = W - q*D                         cfd_addsub        digits 0..2 in each part
P = adjust(S.pos), N = adjust(S.neg) cfd_digit_adjust  back to one bit per digit
R' = refresh(P, N)                  cfd_refresh       cancel +1/-1 pairs
R' = rewrite(R')                    cfd_rewrite       normalise the leading digits
q' = leading digit of R'            cfd_qsel          next digit and operation
```

The first clock subtracts the divisor from the dividend and fixes the leading
quotient digit at 1. Every later clock appends the previous `q` to the
quotient.

### Add/subtract without carries

The binary divisor is treated as a signed-bit number whose negative part is
all zeros. The three operations are:

* subtract (`q = +1`): add `D` to the negative part;
* add (`q = -1`): add `D` to the positive part;
* shift (`q = 0`): leave both parts alone.

Each position adds at most two bits, giving a digit 0..2 that is held in two
bits. Nothing travels between positions.

### Digit adjustment

Each part (positive and negative) is adjusted on its own. The part is cut
into segments of four digits, and each segment is handled in two passes:

1. **Table.** The eight bits of the segment address a 256-entry table. Each
   entry is the five-bit binary value `sum(d_i * 2^i)`. For example, digits
   1 0 0 2 give `01010`, and digits 2 2 2 2 give the largest entry, `11110`.
   Bit 4 of the entry is the segment's carry into the segment above. The
   table is a constant computed when the design is elaborated, so
   synthesis turns it into a ROM. A divider holds 18 of them: 9 segments
   for each of the two parts.
2. **Carry pass.** A small adder under the table adds the carry from the
   segment below to the table's four low bits.

A segment can itself send a carry upward in two ways: its table entry had
bit 4 set, or its low bits were `1111` and a carry came in. The two cannot
happen together, because no entry is above `11110`. A segment whose low bits
are `1111` therefore passes an incoming carry straight on. A carry can thus
run through several such segments. This is the only path longer than one
segment, and it is a chain of 4-bit increments rather than a word-wide
adder. The adjustment is exact: the output is the binary value of the input
digits.

### Refresh

After adjustment, `P - N` is the remainder. Where both parts hold a 1 at the
same position, the two cancel: `rp = P & ~N` and `rn = N & ~P`. The result is
again a signed-bit number with no position set in both parts.

### Rewrite and quotient selection

This is the least obvious part of the design. The digit pair `1, -1` has the
same value as `0, 1`, and `-1, 1` the same as `0, -1`. The rewrite applies
this pair rule from the top of the word downward, one pair at a time: from
the (4, 2) weight pair down to the (1/2, 1/4) pair. For `N = 32` that is four
chained stages. The value never changes.

Two facts make the resulting selection rule safe:

* **Leading digits are cleared.** Suppose the value is below half the weight
  of the top digit and that digit is nonzero. Then the digit that follows
  must have the opposite sign, so one pair rewrite clears the top digit.
  Because `|R| < 1`, applying this down to weight 1 leaves every digit above
  weight 1 at zero.
* **Selection.** After the rewrite no pair among weights 1, 1/2 and 1/4 has
  opposite signs. The next digit `q` is the weight-1 digit if it is nonzero,
  otherwise the weight-1/2 digit:
  - If the weight-1 digit is +1, then `R > 1/2`.
  - If the weight-1 digit is 0 and the weight-1/2 digit is +1, then
    `R > 1/4`.
  - In both cases `2R` lies in (1/2, 2), so `2R - D` lies in (-1, 1) for
    every `D` in [1, 1.5].
  - If both digits are 0, then `|R| < 1/2`, and `2R` stays inside (-1, 1)
    as it is.
  - The negative cases are symmetric.

So `|R| < 1` holds for every iteration. That bound is what sizes the word,
and the divisor is never inspected. Assertions in `cfd_divider` check it at
run time, together with "no carry out of the top segment".

### Prescaling

The bound above needs `D <= 1.5`. When `d > 1.1b`, both operands are
multiplied by 0.75, computed as `v/2 + v/4`. This brings `d` into
(1.125, 1.5) and leaves the quotient unchanged. `d = 1.1b` exactly is not
scaled. The first remainder `X - D` then already satisfies `|R| < 1`.

## Quotient conversion and final correction

`cfd_otf` keeps two registers, `Q` and `QM = Q - 1 ulp`, and appends each
digit by shifting:

| digit | new Q | new QM |
|---|---|---|
| +1 | `Q,1` | `Q,0` |
| 0 | `Q,0` | `QM,1` |
| -1 | `QM,1` | `QM,0` |

After the last clock, `Q` is the quotient to N digits (leading 1 plus N-1
selected digits), and the remainder `R` satisfies
`x/d = Q + 2^-(N-1) * R / D`. If `R` is negative, the truncated quotient is
`QM`. The sign of a signed-bit number is the sign of its leading nonzero
digit. `cfd_sd_sign` finds that digit with a priority search, so `q` is the
exact truncation `floor(x * 2^(N-1) / d) / 2^(N-1)`. The same search gives
`exact` (the remainder is zero).

## Interface and timing (`cfd_divider`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a division; taken when `busy` is low |
| `x_sign`, `x` | in | 1, N | dividend sign and significand |
| `d_sign`, `d` | in | 1, N | divisor sign and significand |
| `busy` | out | 1 | division in progress |
| `done` | out | 1 | one-clock pulse: result valid |
| `q_sign`, `q` | out | 1, N | quotient sign and truncated quotient |
| `exact` | out | 1 | remainder is zero |
| `prescaled` | out | 1 | operands were multiplied by 0.75 |

Timing:

* The clock edge that sees `start` captures the prescaled operands. The
  operands need to be valid only at that edge.
* N iteration clocks follow, one digit each, and `done` is high in the next
  clock. So a 32-bit division takes 32 clocks plus the start clock.
* `q`, `q_sign`, `exact` and `prescaled` hold until the next `start`.

Every iteration takes one clock, whatever digit was selected. A zero digit
(shift only) is not given a shorter step.

## Module map

| File | Role |
|---|---|
| `rtl/cfd_pkg.sv` | shared types: `dig2_t` (two-bit digit), `qdigit_e` (+1/0/-1), `rem_digits()` |
| `rtl/cfd_divider.sv` | top: registers, datapath wiring, correction, assertions |
| `rtl/cfd_ctrl.sv` | IDLE / ITER / DONE sequencer with iteration counter |
| `rtl/cfd_prescaler.sv` | range test and 0.75 scaling |
| `rtl/cfd_addsub.sv` | carry-free add/subtract of the divisor |
| `rtl/cfd_digit_adjust.sv` | row of segments for one part |
| `rtl/cfd_da_segment.sv` | one four-digit segment: table plus carry adder |
| `rtl/cfd_refresh.sv` | +1/-1 cancellation |
| `rtl/cfd_rewrite.sv` | chained leading-pair rewrite |
| `rtl/cfd_qsel.sv` | quotient digit from the leading digits |
| `rtl/cfd_otf.sv` | on-the-fly conversion (Q, QM) |
| `rtl/cfd_sd_sign.sv` | sign and zero test of the final remainder |

The parameters are `N` (operand width, default 32) and `SEG` (digits per
segment, default 4). The word length `RW` is derived from them. `N` has
been simulated at 8, 10 and 32. An `N` that is a multiple of 4 gives whole segments
without padding.

## Where this design makes its own choices

The overall step order comes from the algorithm this divider implements:
prescale, convert to signed bits, subtract, adjust, refresh, rewrite, select
and convert. So do the four-digit table-based segments and the three
selection cases. The following points are this implementation's own
decisions:

* **Carry between segments.** The algorithm treats the second adjustment
  pass as one step with no further carry. In fact a `1111` segment that
  receives a carry does carry again. This design lets that carry continue
  into the next segment, which keeps the result exact.
* **Rewrite depth.** Rewriting only the single top pair is not enough to
  bound the remainder. The rule is therefore applied over the top four
  pairs, and selection reads the weight-1 and weight-1/2 digits.
* **Formats.** Operand and quotient formats, the remainder word length and
  the final correction by remainder sign are this design's.
* **Interface.** The handshake, one iteration per clock and the reset style
  are this design's.
* **Prescaling.** The 0.75 product uses an ordinary adder.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_cfd_divider`: the default 32-bit divider. It runs directed corner
  cases plus 20 000 random divisions, including divisors near 1, near 2,
  short divisors and equal operands. It compares results with 64-bit integer
  division and checks the N-clock latency. It also counts every mechanism
  and fails if any of them never occurred: prescaling, subtract, add and
  shift steps, rewrites, table carries, carries through `1111` segments, the
  final correction and exact results.
* `tb_cfd_divider_small`: `N = 8`, all 16 384 operand pairs.
* Unit benches: the prescaler (integer products), the add/subtract stage
  (value and per-digit checks) and the segment (exhaustive over 81 digit
  patterns, each with and without a carry in). Also the word adjustment,
  refresh, rewrite (value kept, leading digits cleared), selection (the next
  remainder stays in (-1, 1) for D = 1 and 1.5), the on-the-fly converter,
  the sign test and the controller sequence.

To run one with plain Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/cfd_pkg.sv tb/tb_cfd_divider.sv \
          --top-module tb_cfd_divider -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. The testbench
`tb_cfd_divider` watches a few internal signals of the divider
hierarchically (`dut.u_adj_p.g_seg[*]...`) to count mechanisms. If you rename
instances, update it.

## Size

A coarse synthesis of the 32-bit divider gives about 460 word-level cells
and 217 flip-flops. It also has 18 ROMs of 256 x 5 bits: the segment tables,
9 segments for each of the two parts.
