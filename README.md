# Combined BID decimal64 / binary64 floating-point divider

This is a sequential divider with one digit-recurrence datapath that handles
two kinds of division:

* **binary64** (IEEE 754 double precision) divisions, at radix 16;
* **decimal64** divisions whose significands use the BID ("binary integer
  decimal") encoding, at radix 10.

In BID the decimal significand is an ordinary unsigned binary integer
(0.105 is stored as 105 x 10^-3). That means one residual datapath, written
in binary two's complement carry-save form, can serve both formats: only the
radix, the quotient-digit multiples and the selection constants change.
One control bit, `is_bfp`, picks the radix for each operation.

The architecture comes from the paper "A Combined Decimal and Binary
Floating-point Divider". It has:

* a BID normalization unit with one shared rectangular multiplier;
* a retimed recurrence that splits each quotient digit as
  q = k*q_H + q_L, with selection by comparison and a speculative q_L;
* an on-the-fly conversion and rounding unit;
* a counter/controller, an exponent-update block and sign logic.

The paper leaves several parts to earlier work that it does not reproduce:
the insides of the normalization unit, the radix-10 selection constants,
and how the decimal dividend is scaled. This design fills those parts in
with its own choices. They are marked as such below and in each file's
header.

Rounding is roundTiesToEven only.

## Latency

| phase | radix 10 (decimal) | radix 16 (binary) |
|---|---|---|
| normalization | 4 | - |
| initialization | 1 | 1 |
| recurrence | 17 | 14 |
| rounding digit | 1 | 1 |
| rounding | 1 | 1 |
| **start to done** | **24** | **17** |

These are the paper's cycle counts, and the RTL meets them exactly. Take
the clock edge that samples `start` as edge 0. `done` then rises on edge 24
for decimal or edge 17 for binary. A decimal division whose quotient
becomes exact at the preferred exponent finishes earlier (see
[Exact decimal quotients](#exact-decimal-quotients-and-the-preferred-exponent)).

## Top-level interface (`combined_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | while idle: latch the operands and begin |
| `is_bfp` | in | 1 | 1 = binary64 (radix 16), 0 = BID decimal64 (radix 10) |
| `sx`, `sd` | in | 1 | signs of the dividend and divisor |
| `ex`, `ed` | in | 11 | biased exponents (bias 1023 for binary, 398 for decimal) |
| `mx`, `md` | in | 54 | significands: a BID integer below 10^16, or the binary 1.f with the hidden 1 at bit 52 |
| `busy` | out | 1 | a division is in progress |
| `done` | out | 1 | one-cycle pulse: the result is valid |
| `sq` | out | 1 | sx xor sd |
| `eq` | out | 13 | biased quotient exponent, signed, not range-checked |
| `mq` | out | 54 | quotient significand: binary 1.f (2^52 <= mq < 2^53), or a non-normalized BID integer |
| `exact_stop` | out | 1 | this decimal division ended early because its quotient was exact |

The results stay valid from `done` until the next `start`.

The divider does not handle these cases. Nothing checks for them, so the
caller must keep them out:

* zero, infinite, NaN or subnormal operands;
* exponents that overflow or underflow the format.

## How the operands are scaled

The recurrence computes q = w[0]/d one digit at a time, using
w[j+1] = r*w[j] - q_{j+1}*d. This only works if two conditions hold:

* d is normalized, so that a small table of comparison constants can cover
  it. Here d must lie in [1,2).
* |w[0]| <= rho*d. The redundancy factor rho is 7/9 for radix 10 (digits
  -7..7) and 2/3 for radix 16 (digits -10..10).

All datapath numbers are two's complement fixed point with 60 fraction
bits. The residual is 66 bits wide: 6 integer bits and 60 fraction bits.

### Binary

The significands 1.f are already in [1,2) and only need aligning to the
60-bit fraction. As in the paper, the initial residual is always
w[0] = x/16, and the unit always produces 15 radix-16 digits. A compare at
initialization sets `x_lt_d`, which moves the rounding point:

* **x >= d:** the quotient x/d lies in [1,2), and the first digit is its
  integer part. The first 14 digits hold exactly 53 significant bits. The
  15th digit is the rounding digit, with rounding amount U = 8 (half a
  digit).
* **x < d:** the quotient lies in [1/2,1), and the first digit is zero.
  The 53rd significant bit is then bit 3 of the 15th digit. The rounding
  unit keeps that bit and rounds the three bits below it (U = 4). The
  exponent is lowered by one.

### Decimal (`bid_normalize`)

A BID significand can have anywhere from 1 to 16 digits. The unit first
multiplies each significand by a power of ten that makes it a 16-digit
integer:

* `lod` finds the bit length of the significand.
* `exp10_table` turns the bit length into a digit count: an estimate, then
  one compare against a power of ten. It returns the shift e = 16 - digits
  and the multiplier 10^e.
* `rect_mult` is the single 57 x 32 multiplier. Significands of 10 or more
  digits are at least 2^32, so their multiplier 10^e fits in 32 bits. Below
  2^32 (signal `th`) the two multiplier operands are swapped, so the small
  operand always takes the 32-bit port.

The dividend and the divisor pass through the same multiplier on
consecutive cycles, giving x16 and d16. In the fourth cycle, the divisor is
multiplied once more by shift and add:

* by 10 if x16 < d16;
* by 100 otherwise.

After this step x16/d'' always lies in [0.01, 0.1). Both values are then
shifted left by the same 1 to 7 bits, which puts d'' in [1,2). A common
power-of-two scale does not change the quotient, so the decimal digits are
unaffected.

The recurrence starts from w[0] = x. Its first digit is 0 or 1, the next
16 digits hold the 16 significant digits, and the 18th is the rounding
digit. The paper gives only the block diagram of this unit. The target
range, the exact digit count, the multiply by 10 or 100 and the final
alignment are this design's own.

## Recurrence and digit selection (`recurrence`, `sel_function`, `mk_table`)

Each cycle performs two subtractions:

```
v = r*w - q_H*(k*d)     k = 5 (radix 10), k = 4 (radix 16)
w = v   - q_L*d         q_L in -2..2;  q_H in -1..1 (r10) or -2..2 (r16)
```

Both are done in 3:2 carry-save adders. A negative multiple enters the adder
inverted, and the +1 goes into the free LSB of the carry vector.

* The divisor multiple 5d is computed once, at initialization. The radix-16
  multiples 4d and 8d are plain shifts.
* The registers hold r*w, not w. A 4:2 carry-save stage computes it as
  8w + 2w for radix 10, or 8w + 8w for radix 16.
* The sign-and-zero detector adds the two registered vectors to get the
  final residual's sign and whether it is zero.

### Selecting q_H

The selection function takes the top 14 bits of both carry-save vectors
(6 integer and 8 fraction bits). Their sum, y, estimates r*w. q_H comes
from comparing y with +-m_H2 and +-m_H1. Only the positive constants are
stored; the negative thresholds are their negations.

### Selecting q_L

At the same time, the unit estimates v for every candidate value of q_H:
y plus the top bits of -q_H*k*d, which are precomputed at initialization.
It compares each estimate with +-m_L2 and +-m_L1, then keeps the q_L that
belongs to the q_H actually chosen.

### Estimate errors

* The q_H estimate is low by less than 2/256.
* Each q_L estimate is low by less than 3/256.

### Constants

The constants are in units of 1/8 and depend on the divisor interval. That
interval is given by the three fraction bits after d's leading 1.

| d | 1.000 | 1.001 | 1.010 | 1.011 | 1.100 | 1.101 | 1.110 | 1.111 |
|---|---|---|---|---|---|---|---|---|
| r16 m_H2 | 50 | 56 | 66 | 68 | 72 | 80 | 88 | 88 |
| r16 m_H1 | 16 | 16 | 20 | 20 | 24 | 24 | 28 | 28 |
| r16 m_L2 | 13 | 14 | 16 | 17 | 18 | 20 | 22 | 22 |
| r16 m_L1 | 4 | 4 | 5 | 5 | 6 | 6 | 7 | 7 |
| r10 m_H1 | 21 | 24 | 26 | 29 | 31 | 34 | 36 | 39 |
| r10 m_L2 | 13 | 14 | 16 | 17 | 19 | 21 | 22 | 23 |
| r10 m_L1 | 4 | 5 | 5 | 6 | 6 | 7 | 7 | 8 |

The radix-16 rows are the paper's. The paper does not list its radix-10
constants, so the radix-10 rows are this design's own.

Each constant has to satisfy a containment condition. The threshold
between digits q-1 and q must be at least (k*q - c - rho)*d_max. Adding the
estimate error, it must be at most (k*(q-1) + c + rho)*d_min. Here c = 2
for the q_H step and c = 0 for the q_L step.

Both tables were checked against these conditions for the estimate errors
above. The radix-16 constants pass them too. `tb_mk_table` repeats the
check in integer arithmetic.

## Conversion and rounding (`convert_round`)

The quotient is accumulated as a plain binary integer, Q <- r*Q + digit.
The signed digit is sign-extended and added to 8Q + 2Q or 8Q + 8Q, so a
negative digit simply borrows from Q. No separate Q-1 register is needed.

Each digit is held back one cycle before it is added. This delay gives the
rounding step time to act on the last kept digit, q_R. During that step,
the rounding digit B and the sign and zero flags of the final residual
choose among q_R - 1, q_R and q_R + 1 (the MZP select):

```
t = B - w_sign                      tail below q_R, in digit units
if t < 0: use q_R - 1, t += r       borrow
round up if t > r/2, or t == r/2 and (residual != 0 or the kept digit is odd)
```

This is the paper's rule: add R = U - w_sign - (w_zero AND NOT LSB(q_R)) to
B and test the result against r and 0. There is one difference, in the
exact tie below q_R (B = -r/2, residual 0). There the printed rule picks
the odd neighbour, while this design picks the even one.

In the binary x < d case (input `half`), U is 4 and bit 3 of the tail t is
kept as one more quotient bit. The rule above is applied to bits 2..0 of
t, with the tie at 4 broken towards an even kept bit. If the kept bit is 1
and the tail rounds up, the carry moves into q_R. The result is
2*(16*Q + q_R') + kept bit, where q_R' is again q_R - 1, q_R or q_R + 1.

Two cases could in principle overflow the result:

* a rounded binary quotient of 2^53;
* a rounded decimal quotient of 10^16.

`exp_update` corrects both. With this operand scaling, neither case can
actually occur.

## Exact decimal quotients and the preferred exponent

For an exact decimal quotient, IEEE 754-2008 requires the representation
whose exponent is closest to the preferred exponent Ex - Ed. After j
digits, the quotient's exponent equals the preferred one when
j = jp = e_d - e_x, where e_x and e_d are the powers of ten applied during
normalization.

The controller watches the zero flag of the residual. It stops the
recurrence at the first j >= 1 where both of these hold:

* the residual is zero;
* j >= jp.

It then goes straight to the rounding cycle. The digit that arrives there
as B is 0 and the flag shows a zero residual, so nothing is rounded.
`count` tells the exponent unit how many digits were kept:

* decimal: eq = Ex - Ed + 398 + e_d - e_x - count
* binary: eq = Ex - Ed + 1023 - (x < d)

Binary divisions always run every iteration.

## Files

| file | contents |
|---|---|
| `rtl/div_pkg.sv` | shared widths, biases, iteration counts, `pow10()` |
| `rtl/combined_divider.sv` | top: operand registers, wiring, sign |
| `rtl/div_controller.sv` | counter and sequencer, early stop |
| `rtl/bid_normalize.sv` | decimal normalization (4 cycles) |
| `rtl/lod.sv`, `rtl/exp10_table.sv`, `rtl/rect_mult.sv` | its leading-one detector, digit count / 10^e table, and 57x32 multiplier |
| `rtl/recurrence.sv` | residual datapath, 5d precompute, 4:2 stage |
| `rtl/sel_function.sv`, `rtl/mk_table.sv`, `rtl/szd.sv` | digit selection, constants, sign-and-zero detection |
| `rtl/convert_round.sv` | on-the-fly conversion and rounding |
| `rtl/exp_update.sv` | exponent and carry-out renormalization |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_combined_divider` runs the top at its default parameters. It starts
with directed cases, such as:

* 1/1;
* 0.105/5;
* 1/3;
* decimal half-way ties;
* extreme digit counts;
* binary 1/1.5.

It then runs 3000 random divisions, mixing decimal and binary. In a quarter
of the decimal ones the dividend is a small multiple of the divisor (reduced
below 10^16), so many of their quotients are exact. Each result (sign, exponent,
significand) is compared with a reference computed in the testbench by
wide-integer division:

* binary: RNE of x*2^52/d, or x*2^53/d when x < d.
* decimal: RNE to 16 digits, or, for an exact quotient, the fewest digits
  whose exponent does not exceed the preferred one.

The testbench also checks the latency: 24 or 17 cycles, or fewer than 24
for an early stop. It counts how often each mechanism occurs and fails if
one never does:

* both radices;
* the multiplier operand swap, both ways;
* divisor scaling by 10 and by 100;
* binary x < d (rounding inside the last digit, U = 4);
* early stop;
* all three rounding choices;
* a half-way tie.

The unit testbenches each check one property against an independent
reference:

* `tb_sel_function`: the next residual stays within rho*d, for 20000
  random divisors and residuals at random carry-save splits.
* `tb_recurrence`: r^n*w[0] - Q*d equals a residual bounded by rho*d, whose
  sign and zero flags match the detector.
* `tb_convert_round`: the rounded result agrees with RNE computed on the
  assimilated integer.
* `tb_div_controller`: the phase lengths and the early-stop rules.

To simulate one testbench with Verilator, run from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/div_pkg.sv \
    tb/tb_combined_divider.sv --top-module tb_combined_divider -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The package file must come
first, because the other modules import it.

## Changing the design

* **Widths and iteration counts** live in `rtl/div_pkg.sv`. The residual
  width `RES_W` must keep at least 6 integer bits, and `RES_FRAC` must hold
  every bit of the aligned divisor. Otherwise the zero test stops being
  exact.
* **Selection constants** are in `rtl/mk_table.sv`. If you change them,
  rerun `tb_mk_table` (containment conditions) and `tb_sel_function`.
  `recurrence` also asserts |w| <= rho*d after every step, so a bad constant
  shows up at once in any simulation that runs divisions.
* **Other rounding modes** would only change the `up` and `borrow` decision
  in `convert_round`. The unit already has the final residual's sign and
  zero flags and the three candidate digits.

## Departures and limits

* **Normalization internals.** Only the block diagram is followed: operand
  mux, LOD, 10^e table, the RMX/RMY swap, one multiplier and 4 cycles. The
  diagram's "+5"/"exp10" boxes and its one-bit post-shift (P59, db2) are
  replaced by an exact digit count, the multiply by 10 or 100, and a 1-7
  bit alignment.
* **Widths.** The residual is 66 bits instead of 64, and x and d are 61
  bits instead of 55 and 59. The normalized decimal divisor carries up to
  59 significant fraction bits, and the residual must stay exact for the
  zero test.
* **Radix-10 selection constants** are this design's own.
* **Lower tie rounding** goes to even, as described above.
* **Gate-level structure.** The comparators in the selection function, the
  detector's adder and the multiplier are written as word-level arithmetic,
  not as the comparator/CSA trees a hand design would use.
* **Not covered:** special operands, exponent range handling, and rounding
  modes other than roundTiesToEven.
