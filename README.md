# A dual-radix decimal / binary floating-point engine

Financial software needs decimal floating point (DFP). In software each
decimal64 operation takes tens to hundreds of cycles on a binary FPU. This
engine runs the common decimal64 operations in hardware on BCD significands:
addition and subtraction, multiplication and division. It also runs binary64
division, so a binary FPU can hand that operation off too.

The main idea is that radix-10 and radix-16 digit-recurrence division are
nearly the same algorithm. Both are written as

    v[j] = r*w[j-1] - qH*(k*d)
    w[j] = v[j]     - qL*d          quotient digit q = k*qH + qL

with r = 10, k = 5, qH in {-1,0,1} for decimal and r = 16, k = 4,
qH in {-2..2} for binary. In both cases qL is in {-2..2}. One datapath of 18
four-bit digits serves both radices. A single bit, `radix10`, selects BCD or
hexadecimal digit arithmetic in the adders, the multiple generator, the
quotient converter and the final adder. The decimal multiplier reuses the
same carry-save adders. It accumulates one partial product per cycle.

This is the architecture of the paper "Decimal Engine for Energy-Efficient
Multicore Processors" ("UniPro" there). The RTL here is an independent
implementation. The paper leaves several algorithms open, and those are this
design's own choices. They are listed under
[Departures and open points](#departures-and-open-points).

| operation   | format                    | cycles |
|-------------|---------------------------|--------|
| DFP add/sub | decimal64, 16 BCD digits  | 5      |
| DFP mul     | decimal64                 | 20     |
| DFP div     | decimal64                 | 23     |
| BFP div     | binary64, normal operands | 18     |

A cycle count is the number of clock edges from the edge that accepts `start`
to the edge that raises `done`. The engine is not pipelined. A new operation
may start in the cycle in which `done` is high.

## Interface

`unipro` (in `rtl/unipro.sv`) has these ports:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `op` | in | start an operation; `op` is an `op_e`: `OP_DFP_ADD`, `OP_DFP_SUB`, `OP_DFP_MUL`, `OP_DFP_DIV`, `OP_BFP_DIV` |
| `x`, `y` | in | operands (`operand_t`); `x` is the dividend |
| `busy`, `done` | out | operation running; one-cycle result-valid pulse |
| `result` | out | result (`operand_t`), held until the next operation ends |
| `overflow`, `underflow`, `div_by_zero` | out | result exponent out of range; zero divisor |

An `operand_t` is a packed struct `{sign, exp[10:0], sig[63:0]}` and has two
uses:

* **decimal64:** `exp[9:0]` is the biased exponent (bias 398), and `sig`
  holds 16 BCD digits with digit 0 in `sig[3:0]`. The value is
  (-1)^sign * sig * 10^(exp-398). Significands are not normalized, as
  decimal64 allows. The conversion from the densely packed (DPD) encoding to
  BCD is not part of the engine.
* **binary64:** `exp` is the IEEE biased exponent and `sig[51:0]` the
  fraction. Only normal numbers are handled.

Operands are latched at the accepting edge, so `x` and `y` need to be valid
only in that cycle. All results are rounded to nearest, ties to even.

## Datapath

The datapath has four stages around a small controller:

* **Set-up:** operand latches and registers `Mx` and `My`, each 18 digits.
* **Normalization:** a leading non-zero digit detector (`lnzd`) and a 32-digit
  left-only barrel shifter (`bcd_shifter`).
* **Recurrence:** the multiple generator `bcd_precomp` forms 2m, km and 2km.
  The multiplexers `pp_mux` are called PPH and PPL. Two dual-radix
  carry-save adders (`dr_csa`) follow, and the residual or partial product is
  kept in carry-save form in `Ws` (digits) and `Wc` (one carry bit per
  digit). The multiplexers are fed by the multiplier recoding
  (`mul_recode`) or by the quotient-digit selection (`qds`).
* **Conversion:** the carry-propagate adder `dr_cpa`, the register `Zu` and
  the on-the-fly quotient converter `otf_conv`.

`sign_exp` computes the signs and exponents. `controller` steps through one
phase per cycle:

```
DFP add/sub : NORM1 NORM2 ITER            CPA       ROUND
DFP mul     : INIT  ITER x16              CPA NRES  ROUND
BFP div     : INIT  ITER x15              CPA       ROUND
DFP div     : NORM1 NORM2 INIT ITER x18   CPA       ROUND
```

### The dual-radix carry-save digit

`dr_csa_digit` adds two 4-bit digits and a carry bit. Two small adders run in
parallel. One computes `a+b+ci`. The other computes `(a+4)+(b+2)+ci`, which
is the same sum plus 6. In radix 10 the carry out of the second adder means
that the sum is 10 or more. The digit is then the second adder's low four
bits, which equal sum-10, with carry 1. Otherwise the digit is the plain sum
with carry 0. In radix 16 the plain adder gives both digit and carry. The
digit sum is at most 9+9+1, so a carry-save number needs only one carry bit
per digit.

A carry-save number here is a digit word plus a carry bit for each position.
The carry out of digit i is stored as the carry of position i+1. The carry
input of position 0 is then free. It is used to inject the +1 of a
complemented (negative) multiple.

### Division (both radices)

All residual arithmetic is modulo r^18. In radix 10 that is a 10's-complement
residual and in radix 16 a two's-complement one. Left shifts and carry-save
additions are exact modulo r^18. Because the residual always stays within half
the divisor, its sign can be read back without ambiguity.

Each iteration works as follows:

1. `qds` reduces `Ws`+`Wc` to one signed number. It picks qH as the nearest
   integer to r*w/(k*d), clipped to the digit set. Then it picks qL as the
   nearest integer to v/d, clipped to {-2..2}. This keeps |w| <= d/2, which is
   inside the convergence bound of both radices (7/9 and 10/16).
2. PPH is -qH*k*d and PPL is -qL*d. Both come from the divisor multiples d,
   2d, kd and 2kd, complemented when positive.
3. The first adder adds PPH to r*w. The radix shift is a one-digit shift of
   `Ws` and `Wc`. The second adder adds PPL.
4. `otf_conv` appends q to Q and to QM = Q - 1 ulp without propagating a
   carry.

After the last iteration the conversion stage assimilates the residual. If
the residual is negative the quotient is QM, otherwise Q. A non-zero residual
is the sticky bit.

**DFP div:** divisor and dividend are first normalized so that their leading
digit is digit 15, using the shifter in two cycles. If the normalized dividend
is smaller than the divisor it is shifted one more digit. The divisor is held
as d*100 and the recurrence starts from w[0] = x/100. After 18 iterations the
quotient has 17 digits: 16 result digits and one rounding digit.

The result exponent is ex - ey + lz(y) - lz(x) - extra - 15, where `extra` is
the additional shift. The quotient is normalized (16 significant digits), not
given the IEEE preferred exponent.

**BFP div:** the divisor 1.f is held with 56 fraction bits and the recurrence
starts from w[0] = x/16. Fifteen radix-16 iterations give 60 quotient bits.
That is 53 result bits plus at least two guard bits, and the residual gives
the sticky bit.

### Multiplication

The multiplier digits are consumed from the least significant end. Each digit
y is recoded as y = yH + yL with yH in {0,5,10} and yL in {-2..2}:

| y  | 0 | 1 | 2 | 3  | 4  | 5 | 6 | 7 | 8  | 9  |
|----|---|---|---|----|----|---|---|---|----|----|
| yH | 0 | 0 | 0 | 5  | 5  | 5 | 5 | 5 | 10 | 10 |
| yL | 0 | 1 | 2 | -2 | -1 | 0 | 1 | 2 | -2 | -1 |

So only x, 2x, 5x and 10x are needed. In BCD, 2x and 5x are digit-local, with
no carry chain:

* (2x)_i = (2x_i mod 10) + [x_(i-1) >= 5]
* (5x)_i = 5(x_i mod 2) + floor(x_(i-1)/2)

Each cycle computes W = (W + x*y_j)/10. The digit that drops off the bottom
is already a final BCD digit. That holds because position 0 never receives a
stored carry after the addition. These digits are collected as the low half of
the product.

**The tricky part** is that the negative yL multiples are added as
10's-complement words modulo 10^18. The stored carry-save pair therefore
stands either for the true partial sum T or for T + 10^18, and a right shift
must not turn that extra 10^18 into garbage.

The true partial sum is below 1.1*10^17 and the carry word is below
1.12*10^17. So the top digit of `Ws` is at most 1 in the first case and at
least 8 in the second. The shift fills the vacated top digit with 9 in the
second case and with 0 in the first. That is a sign extension of the
10's-complement word, and it keeps the pair exact.

After 16 iterations the high half is assimilated. The 32-digit product is then
normalized by `lnzd`/`bcd_shifter` if it has more than 16 digits, and rounded.
A product of 16 digits or fewer is returned exactly with exponent ex+ey.

### Addition and subtraction

The two operands go through the normalization stage in two cycles. A is the
operand whose leading digit has the larger weight, meaning its exponent minus
its leading zeros. A is shifted so that its leading digit is digit 16 of `Mx`.
Digit 17 is zero headroom and digit 0 is a guard digit. B is shifted to the
same digit weights. The shifter only shifts left, so the right shift of B is a
smaller left shift from the bottom of the 32-digit shifter. When both leading
digits have the same weight, the larger magnitude is placed in `Mx`.

One carry-save step then adds ±`My` through the PPL multiplexer, and the
carry-propagate adder assimilates the sum. The sum is rounded to 16 digits
from digit 16, or from digit 17 if the addition carried into it. If a
subtraction cancelled digit 16, the 16 digits from digit 15 down to the guard
digit are returned without rounding.

## Departures and open points

These are the points where the paper is silent, or where this RTL differs
from it:

* **Quotient-digit selection.** The paper defers it to other work. Here it
  is an exact comparison on the fully assimilated residual. This is correct,
  but it is large and has a long path compared with a selection table on a
  few leading digits. Replacing `qds` with such a table is the obvious
  improvement. Its ports already give qH and qL separately.
* **DFP-div latency:** 23 cycles. The paper's text says 23 and its results
  table says 25.
* **BFP-div initialization:** w[0] = x/16 rather than the paper's x/r^2. With
  x/256, fifteen digits do not leave a rounding bit for quotients below 1.
* **DFP-div with a dividend smaller than the divisor.** The dividend is
  shifted one extra digit before the recurrence. The paper instead uses the
  normalization stage after the recurrence without giving details.
* **Choice of the larger addend:** by leading-digit weight, not by raw
  exponent. With the raw exponent, an operand with many leading zeros can
  push the other one out of the shifter.
* **DFP add precision.** Digits of the smaller addend below the guard digit
  are dropped (truncation, no sticky bit). A sum that cancels is shifted back
  up by at most one digit, so deep cancellation leaves leading zeros. These
  results can differ from IEEE 754 in the last digit.
* **Not handled:** the IEEE preferred exponent (the paper does not implement
  it either), infinities, NaNs and subnormals. An out-of-range exponent only
  raises `overflow` or `underflow`, and the exponent field keeps its low bits.
  A zero divisor only raises `div_by_zero`.
* **MUL LSD conversion.** The paper shows a converter for the digit leaving
  the multiplier. With the carry convention used here that digit is already
  BCD, so the converter is just the collecting shift register.

## Files

| file | block |
|------|-------|
| `rtl/unipro_pkg.sv` | types (`op_e`, `phase_e`, `operand_t`), constants, cycle counts |
| `rtl/unipro.sv` | top: stages, registers, rounding |
| `rtl/controller.sv` | phase sequencer |
| `rtl/sign_exp.sv` | signs, exponents, addend alignment |
| `rtl/dr_csa.sv`, `rtl/dr_csa_digit.sv` | dual-radix carry-save adder and its digit |
| `rtl/dr_cpa.sv` | dual-radix carry-propagate adder |
| `rtl/bcd_precomp.sv` | multiples 2m, km, 2km |
| `rtl/mul_recode.sv` | multiplier digit recoding |
| `rtl/pp_mux.sv` | multiple selection and complement |
| `rtl/qds.sv` | quotient-digit selection |
| `rtl/otf_conv.sv` | on-the-fly quotient conversion |
| `rtl/lnzd.sv` | leading non-zero digit detector |
| `rtl/bcd_shifter.sv` | 32-digit left barrel shifter |

Each module has a self-checking testbench `tb/tb_<module>.sv`.

`tb/tb_unipro.sv` runs the engine end to end at its only size and checks the
results and latencies of about 8000 operations:

* Decimal operations are checked against reference values computed with
  128-bit integer arithmetic. For addition the reference uses the same
  truncation of the smaller addend as the hardware.
* Binary64 divisions are checked against the simulator's own `real` division.

It also fails if any datapath mechanism was never exercised: an addition
carry, an operand swap, a truncated addend, a cancelled sum, rounded and exact products, the
extra dividend shift, a negative final residual, negative quotient digits,
round-up and rounding overflow.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/unipro_pkg.sv rtl/*.sv \
          tb/tb_unipro.sv --top-module tb_unipro
./obj_dir/Vtb_unipro
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. The
end-to-end test runs in well under a second. To run a block test, use its
testbench file and top module name instead, e.g. `tb/tb_qds.sv` and
`--top-module tb_qds`.
