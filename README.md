# Mixed decimal64 / binary64 redundant floating-point adder

This is a pipelined floating-point adder/subtractor. One datapath handles IEEE 754-2008
**decimal64** and IEEE 754 **binary64** operands, and the radix can change from one operation
to the next. It is built on one idea: the significand is kept as **signed digits in [-6, 6]**.

- Decimal operands use radix 10.
- Binary operands use radix 8: three binary bits make one octal digit.

In this representation the significand addition is *carry-free*. Each digit position sends at
most one transfer (-1, 0 or +1) to its left neighbour, and the chain stops there. The adder's
delay therefore does not depend on the 16-digit precision. The same 4-bit digit cell serves
both radices: only the correction constant it adds depends on the radix. The rest of the
datapath reuses the same structure:

- the exponent difference, swap and alignment shifters;
- the sticky logic;
- the sign and leading-digit detection.

The design is a five-stage pipeline that accepts one operation per clock. Each result appears
five cycles after its operands.

## Number format

Operands and results are not IEEE encodings. They use an unpacked internal format
(`mfa_pkg::mfp_t`, 99 bits). Converting from and to the IEEE interchange formats is left to
the surrounding system.

| field | bits | meaning |
|-------|------|---------|
| `special` | 3 | 0 none, 1 infinity, 2 signalling NaN, 3 quiet NaN, 4 zero |
| `sign` | 1 | sign of the number. The significand value itself is never negative. |
| `sig` | 80 | 20 signed digits, 4-bit two's complement each, values in [-6, 6] |
| `lzc` | 5 | decimal only: leading-zero count of the 16-digit coefficient |
| `exp` | 10 | exponent with bias 398 |

The 20 digits of `sig`, from most to least significant:

| digit | name | decimal64 | binary64 |
|-------|------|-----------|----------|
| 19 | binary addendum | 0 | integer part, high octal digit |
| 18 | decimal addendum | 0 or 1 (coefficient of 10^16 after an overflowing sum) | integer part, low octal digit |
| 17..2 | MainStream | the 16-digit coefficient | fraction octal digits |
| 1 | SLSD | 0 | fraction octal digits holding the last bits |
| 0 | LSD | 0 | fraction octal digits holding the last bits |

**Decimal64.** The value is `(-1)^sign * C * 10^(exp-398)`, where C is the value of digits
18..2. The leading-zero count `lzc` travels with the operand, so the adder never has to count
leading zeros before it aligns.

**Binary64.** The value is `(-1)^sign * S * 8^(exp-398)`, where S is the value of digits 19..0
divided by 8^18. S is always normalized into [1, 8), which puts 1 to 7 in the integer part. A
binary64 number `1.f * 2^e` becomes octal exponent `floor(e/3)` and significand
`1.f * 2^(e mod 3)`. The 53 significand bits therefore start at one of three bit offsets.

The **Group_ID** records which offset applies. The binary64 LSB sits at a different place in
each group:

| Group_ID | integer part | LSB of the binary64 significand |
|----------|--------------|---------------------------------|
| 1 | 1 | bit 2 of the LSD |
| 2 | 2-3 | bit 0 of the SLSD |
| 3 | 4-7 | bit 1 of the SLSD |

A binary operand is accepted in any redundant form of that value. The most significant
non-zero digit must be positive.

## The signed-digit cell (`sd_digit_cell`)

The cell produces `x ± y + t_in = radix * t_out + s`, with `s` in [-6, 6] and `t_out` in
{-1, 0, +1}. It works in two steps.

**1. Interim sum and transfer decision.** A 4-bit adder forms x + y (or x + ~y for a
subtraction). Flag logic then decides whether this interim sum must be corrected.

- If x and the signed y have opposite signs, or either is zero, the sum is in range and no
  correction is needed.
- Otherwise the 4-bit interim code is compared with a threshold. Positive operands use a
  threshold above 5. Negative operands use a threshold below -5. A subtraction uses thresholds
  shifted by one, because ~y = -y - 1.
- The transfer takes the sign of the operands.

**2. Correction digit.** A second 4-bit adder adds one of four correction digits. Each is
derived from `O = t_in + sub`:

- `O` itself;
- `O - 10`;
- `O + 10`;
- `O ± 8`, the binary case. It is formed by inverting the top bit of `O`.

Only this last step knows the radix.

The cell never outputs two adjacent digits that are both +6 or both -6. The rounding blocks
rely on this: a rounding increment moves at most one digit beyond the rounding position.

`sd_adder` chains 21 cells. Every cell works in parallel; a transfer only reaches the next cell.

## Datapath frame

Inside the adder the significand is 21 digits wide. It is the 20-digit `sig` with one
**extension digit** added below it:

```
frame digit:  20      19      18..3        2      1      0
decimal   :   0     addendum  MainStream  guard  round   E
binary    :  int-hi  int-lo   fraction    SLSD   LSD    EXT
```

The extra digit has two uses:

- decimal rounding gets a guard digit, a round digit and one more digit (E);
- a binary subtraction with an exponent difference of one stays exact.

Anything shifted out of the frame is summarized by a **sticky bit** and a **sticky sign**.
Because digits are signed, the discarded part can be negative. Its sign decides whether the
kept part is slightly too large or slightly too small.

## Pipeline (`mixed_fp_adder`)

| stage | work |
|-------|------|
| 1 | Exponent difference and swap (`exp_swap`). Shift amounts (`shift_amount`). Both barrel shifters (`align_shifter`). Sticky bit and sign for every possible shift, selected by the right shift amount (`sticky_gen`). Infinity/NaN rules (`special_cases`). |
| 2 | 21-digit signed-digit add/subtract (`sd_adder`). The radix is selected per operation. |
| 3 | On the sum CR1 (`cr1_detect`): sign, digit-wise negation to a magnitude, leading-digit position, decimal final-carry and shift-left detection. Three decimal rounding blocks run in parallel (`dec_round`). |
| 4 | Decimal final correction (`dec_final_correction`). Binary normalization and Group_ID (`bin_normalize`). |
| 5 | Binary rounding (`bin_round`). The result is chosen: special, decimal or binary. |

Timing and control:

- `in_valid` travels down a five-bit valid pipeline. Only the valid bits are reset
  (asynchronous, active-low `rst_n`).
- Data registers are not reset.
- There is no stall and no back-pressure. Decimal and binary operations can follow each other in
  any order.
- Three operations issued on consecutive cycles finish seven cycles after the first one entered.
  The end-to-end testbench checks this.

## Decimal path

**Alignment** (`shift_amount`) avoids a variable-width significand by shifting the
larger-exponent operand X left first.

- The left shift is `min(d, lzc_X)`, where d is the exponent difference. It only moves out
  leading zeros.
- Y is then shifted right by whatever is left of d.
- The tentative exponent is `E_X - left_shift`.
- The result is exact whenever the operands overlap. This follows the IEEE preferred-exponent
  rule.
- A zero X takes Y's exponent.

**Three outcomes of the addition.** After the addition the 16-digit result window can be in
one of three places:

| case | condition | result digits | exponent |
|------|-----------|---------------|----------|
| final carry | an effective addition that reached 10^16 in the addendum | one digit higher | +1 |
| shift left | an effective subtraction whose result lost its leading digit, while Y had been shifted right | one digit lower | -1 |
| otherwise | | frame digits 18..3 | unchanged |

**Parallel rounding.** `cr1_detect` flags both special cases. Meanwhile three `dec_round`
blocks round all three windows in parallel, and `dec_final_correction` picks one. Each
`dec_round` works as follows:

- It looks at the window's tail: `10*guard + round`, plus the sign of the next digit or, if that
  digit is zero, of the sticky part.
- It decides -1, 0 or +1 for the window's last digit by the IEEE rule of the rounding mode.
- The tail can be negative, so "rounding down" can mean taking one away from the window.
- It returns the rounded last two digits. A digit pushed to ±7 passes one unit to its neighbour.

**Final correction** then:

- writes the selected rounded digits into the result;
- turns a coefficient of exactly 10^16 into 10^15 and adds one to the exponent;
- handles overflow: an exponent beyond 369 gives infinity or ±(10^16 - 1)·10^369, depending on
  mode and sign;
- makes an exact zero result +0, or -0 only when rounding toward -infinity (IEEE rule);
- computes the result's leading-zero count from the rounded coefficient.

## Binary path

Binary operands are always normalized, so X is never shifted left and Y is shifted right by
the whole exponent difference. After the addition:

1. `bin_normalize` uses the leading-digit position from `cr1_detect`.
   - It shifts the magnitude so the integer part lands in frame digits 20..19.
   - A right shift by one digit moves the lowest digit into the sticky part.
   - It computes the octal exponent.
   - It takes the Group_ID from the normalized integer part.
2. `bin_round` rounds at the binary64 LSB position of that group.
   - It forms the low part `T = 64*SLSD + 8*LSD + EXT`.
   - It splits T into a multiple of the LSB weight (32, 64 or 128 units) and a remainder.
   - It rounds that multiple by the mode, again allowing a negative remainder.
   - It writes the result back into SLSD and LSD.
3. A significand that rounds up to 8 becomes 1, and the exponent goes up by one.
4. Overflow gives infinity or the largest finite binary64 number (2 - 2^-52)·2^1023, depending on
   mode and sign. Overflow means an octal exponent above 341, or 341 with an integer part of 2
   or more.

The result significand is redundant. Bits below the binary64 LSB are zero in value, though not
necessarily digit by digit. Converting it to binary64 gives the correctly rounded IEEE result.

## Rounding modes

`rmode_t`: 0 round to nearest, ties to even; 1 round to nearest, ties away from zero; 2 toward
+infinity; 3 toward -infinity; 4 toward zero; 5 away from zero. All six apply to both radices.

## Special values

- Any NaN operand gives a quiet NaN. The payload is not kept.
- Infinity minus infinity (effective signs opposite) gives a quiet NaN.
- Infinity plus a finite value gives that infinity. When it is B, a subtraction flips its sign.
- A zero operand goes through the normal datapath with a zero significand, so the decimal
  preferred exponent comes out right.

No exception flags are produced.

## Where this design goes beyond or departs from the original description

The architecture follows a published design. It keeps the digit set, the cell structure, the
operand format, the block diagram, the three parallel decimal rounding blocks and the
five-stage split. The following are choices made here:

- **Extension digit.** The datapath is 21 digits wide, one more than the operand format.
- **Cell correction decision.** The cell picks between its "above threshold" and "below
  threshold" tests by whether either operand is negative. The published equation makes this
  choice differently, and that version gives an out-of-range digit for 0 + (-1). With this
  change all 2028 input combinations of the cell give correct results.
- **Rounding logic.** Rounding decisions, decimal and binary, are computed from the numeric
  value of the discarded digits. The original uses hand-written case lists. The result is the
  IEEE rounding in both cases.
- **Magnitude before rounding.** The sign of CR1 is resolved and CR1 is negated before
  rounding, in stage 3. The rounding blocks therefore always see a magnitude.
- **Group_ID timing.** The Group_ID is taken after binary normalization, not during
  leading-digit detection.
- **Added behaviour.** Several behaviours are this design's own choices, where the original
  description gives no rule:
  - the post-rounding carry (10^16 or 8);
  - overflow to infinity or to the largest finite number;
  - the sign of a zero result;
  - the output leading-zero count;
  - ties-away and away-from-zero rounding.
- **Not implemented:** binary64 subnormals and underflow, exception flags, NaN payloads, and
  conversion between IEEE interchange encodings and the internal format.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | method |
|-----------|--------|
| `tb_sd_digit_cell` | exhaustive (all digit pairs, transfers, add/subtract, both radices) |
| `tb_sd_adder` | random frames, compared with integer arithmetic; also checks the no-adjacent-±6 property |
| `tb_exp_swap`, `tb_shift_amount`, `tb_align_shifter`, `tb_sticky_gen` | random, against integer or arithmetic references |
| `tb_special_cases` | exhaustive table of classes, signs and operation |
| `tb_cr1_detect` | random redundant sums of both signs and radices |
| `tb_dec_round` | exhaustive over the digits that matter, all modes and signs |
| `tb_dec_final_correction`, `tb_bin_normalize`, `tb_bin_round` | random, against integer references |
| `tb_mixed_fp_adder` | end to end, described below |

The end-to-end `tb_mixed_fp_adder` runs the top module at its default size. It sends
50000 random decimal64 and binary64 operations in a mixed stream. For each one it computes the
exact rounded IEEE result with 128-bit integer arithmetic and compares. It also checks:

- the latency of every result;
- the three-operation burst.

It counts the mechanisms it exercised and fails if any of them never occurred:

- final carry;
- shift left;
- negative CR1;
- non-zero sticky part;
- rounding up;
- rounding ties;
- post-rounding carry;
- exact zero;
- NaN and invalid operation;
- infinity;
- overflow;
- binary right and left normalization;
- decimal left alignment;
- radix switches;
- the burst.

To run one testbench with plain Verilator, list the package first and the other RTL files
after it. `-Wno-fatal` keeps the testbenches' width warnings from stopping the build:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/mfa_pkg.sv tb/tb_util_pkg.sv \
          $(ls rtl/*.sv | grep -v mfa_pkg) tb/tb_mixed_fp_adder.sv --top-module tb_mixed_fp_adder
./obj_dir/Vtb_mixed_fp_adder
```

The end-to-end test runs in well under a second once built.

## Files

- `rtl/mfa_pkg.sv`: sizes, the operand format, enums and small rounding helpers.
- `rtl/sd_lead.sv`: shared sign and leading-digit scan over a signed-digit vector, used by
  `cr1_detect`, `dec_final_correction`, `bin_normalize` and `bin_round`.
- `rtl/<block>.sv`: one file per block named above. The top module is `mixed_fp_adder`.
- `tb/tb_util_pkg.sv`: integer helpers for the testbenches, including conversion between
  values and random redundant encodings.
- `tb/tb_<block>.sv`: one testbench per block.

## Lint notes

Verilator reports only unused signals, and they are intentional:

- outputs of the shared `sd_lead` scan that a particular instance does not need;
- the transfer out of the top digit of the adder, which can never be non-zero for operands in
  this format;
- low digits that a window does not use;
- control bits that are not needed in the last stage.
