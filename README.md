# Single-precision floating-point unit: add, subtract, multiply, divide

This is a small floating-point unit for IEEE 754 single-precision (32-bit)
numbers. It adds, subtracts, multiplies and divides. Each operation uses
the textbook algorithm as its own datapath:

* **Add and subtract** use the classic aligned-significand adder. It takes
  the exponent difference and swaps the operands so that the larger exponent
  comes first. It then right-shifts the smaller significand, adds the two in
  two's complement, normalises with a leading-one detector and a left barrel
  shifter, and rounds. Denormal numbers are supported, and there are four
  rounding modes.
* **Multiply** XORs the signs and adds the exponents, removing one bias. It
  multiplies the 24-bit significands, normalises once and truncates.
* **Divide** XORs the signs and subtracts the exponents, adding back the
  bias. It divides the significands by restoring binary division, producing
  one quotient bit per clock.

All of it is synthesizable SystemVerilog with no vendor primitives.

## Number format

An operand has a sign bit S, an 8-bit exponent field E stored in excess-127
form, and a 23-bit fraction F. A normal number (E = 1..254) has the value
(-1)^S x 1.F x 2^(E-127). The values of E have these meanings:

| E     | F        | meaning                                          |
|-------|----------|--------------------------------------------------|
| 0     | 0        | signed zero                                      |
| 0     | nonzero  | denormal, (-1)^S x 0.F x 2^-126 (adder only, see below) |
| 255   | 0        | signed infinity                                  |
| 255   | nonzero  | NaN; every NaN the unit produces is `0x7FC00000` |

`fpu_pkg` declares the number as the packed struct `fp32_t` (`sign`, `exp`,
`frac`). It also declares the opcode and rounding-mode enums.

## Using `fpu_top`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`, `rst_n`| in  | 1     | clock; synchronous active-low reset |
| `start`       | in  | 1     | take `fpu_op`, `rmode`, `opa` and `opb` on this clock |
| `fpu_op`      | in  | 3     | `000` add, `001` subtract (opa − opb), `010` multiply, `011` divide (opa / opb); `1xx` is unused |
| `rmode`       | in  | 2     | `00` nearest-even, `01` toward zero, `10` toward +inf, `11` toward −inf (add and subtract only) |
| `opa`, `opb`  | in  | 32    | operands |
| `busy`        | out | 1     | a division is running; `start` is ignored |
| `done`        | out | 1     | one-clock pulse; `out` and the flags are valid |
| `out`         | out | 32    | result; held until the next operation completes |
| `overflow`    | out | 1     | the exponent went past 254 |
| `underflow`   | out | 1     | see the per-unit definitions below |
| `div_by_zero` | out | 1     | a finite nonzero number was divided by zero |
| `invalid`     | out | 1     | NaN operand, inf − inf, 0 × inf, 0/0, inf/inf, or an unused opcode |

**Timing.** A latency of *n* means `done` is high in the *n*-th clock after
the clock in which `start` is high.

| operation                     | latency | issue rate          |
|-------------------------------|---------|---------------------|
| add, subtract, multiply, `1xx`| 2       | one per clock        |
| divide                        | 28      | next start accepted when `busy` falls |

The adder and the multiplier are combinational and register their result.
`fpu_top` registers the result of whichever unit finished into `out`, which
adds one clock. Only one unit can finish in any clock, and an assertion in
`fpu_top` checks this. Unused opcodes return the NaN with `invalid` set.

## The adder datapath

`fp_adder` wires together the stages listed below, one module each. Subtraction is
the same datapath with the sign of `num_b` inverted at the input. Widths are
for single precision.

1. **Exponent difference** (`fpadd_exp_diff`). The 8-bit exponent fields are
   subtracted. `shift_amt` is the absolute difference and `sign_d` is set
   when A has the smaller exponent. A denormal has exponent field 0 but
   the true exponent of field 1, so field 0 is mapped to 1 first. This lets
   denormals align with no special case.
2. **Swap multiplexer** (`fpadd_swap_mux`). It restores the implicit bit
   (1 for a normal number, 0 for a denormal), giving 24-bit significands.
   It then sends the operand with the greater exponent to
   `mant_grt`/`exp_grt` and the other to `mant_less`. The swap depends on
   the exponents only. When the exponents are equal, the "greater" operand
   can have the smaller significand. Step 5 corrects this.
3. **Alignment barrel shifter** (`fpadd_align_shifter`). It shifts
   `mant_less` right by `shift_amt` in stages of 1/2/4/8/16. The shift runs
   inside a 27-bit field: 24 significand bits, then guard, round and sticky
   bits. Every 1 shifted out below the round bit is ORed into the sticky
   bit. A shift of 27 or more leaves only the sticky bit.
4. **Effective operation and inverter** (`fpadd_effective_op`,
   `fpadd_inverter`). Unlike signs mean the significands are subtracted. For
   a subtraction the aligned smaller significand is bit-inverted. Both
   operands are 28 bits wide: a carry bit, 24 significand bits and 3 GRS
   bits.
5. **Two's complement adder** (`fpadd_twos_adder`). It computes
   `grt + less' + cin`, where `cin` = 1 for a subtraction completes the two's
   complement. Both inputs are below 2^27, so for a subtraction bit 27 of
   the sum is its sign. A negative sum is inverted and incremented to give
   its magnitude, and the result sign flips. This happens only when the
   exponents were equal and the second significand was larger. For an
   addition, bit 27 is the carry.
6. **Normaliser** (`fpadd_normalizer`). It uses the leading-one detector
   `fpadd_lod` and the left barrel shifter `fpadd_left_shifter`. The hidden
   bit belongs at bit 26.
   * If there is a carry into bit 27, the normaliser shifts right by one
     (the lost bit joins the sticky bit) and adds 1 to the exponent.
   * Otherwise it shifts left by (leading zeros − 1) and subtracts the same
     amount from the exponent. Only a subtraction whose exponents differ by
     0 or 1 can need a left shift of more than one place. No sticky
     information exists in that case, so the shift is exact.
   * The left shift stops at exponent 1. If the leading one has not reached
     bit 26 by then, the result is a denormal and its exponent field is
     written as 0.
7. **Rounder** (`fpadd_rounder`). Here the mantissa sum and the exponent
   sum are computed. The 24-bit significand is rounded using guard (G),
   round (R) and sticky (S):

   | `rmode` | round up when            |
   |---------|--------------------------|
   | `00`    | G and (R or S or LSB) — ties go to even |
   | `01`    | never (truncate)         |
   | `10`    | positive and G\|R\|S      |
   | `11`    | negative and G\|R\|S      |

   A carry out of the rounding increment gives 10.000…. The rounder shifts
   this back one place and adds 1 to the exponent. A denormal that rounds up
   to 1.000… becomes the smallest normal number. If the exponent reaches
   255, `overflow` is set. The result is then infinity, or ±max-finite
   (`0x7F7FFFFF`) when the mode rounds toward zero for that sign. This is
   the IEEE 754 rule. In this unit `underflow` means the result is a
   denormal. Addition of denormals is always exact, so no accuracy is lost
   there.

Special operands bypass the datapath. A NaN operand, or infinities of
opposite effective sign, give the NaN with `invalid` set. Otherwise an
infinite operand is passed through unchanged. An exact zero from a
subtraction is +0, or −0 in round-toward-−infinity. A sum of two zeros with
the same sign keeps that sign.

All four rounding modes give correctly rounded IEEE 754 results, denormals
included. The testbench compares against an exact big-integer model of the
sum.

## Multiplier (`fp_multiplier`)

* The sign is `sign1 XOR sign2`.
* The biased exponent is `e1 + e2 − 127`, computed in 10 bits so that
  overflow and underflow are visible.
* The 48-bit product of the two 24-bit significands is in [1, 4). If bit 47
  is set, the product is shifted right by one and the exponent incremented.
  Bits 46..24 (bit 47 set) or 45..23 (bit 47 clear) become the fraction.
* The lower bits are **discarded** (truncation toward zero). `rmode` does
  not affect the multiplier.
* If the exponent is above 254, the result is ±infinity with `overflow`.
* If the exponent is below 1, the result is ±0 with `underflow`.
* **A zero exponent field is read as zero, so denormal operands are
  flushed.**
* 0 × inf and NaN operands give the NaN with `invalid`. inf × finite gives
  ±infinity.

## Divider (`fp_divider`)

* The sign is `sign1 XOR sign2`. The biased exponent is `e1 − e2 + 127`.
* The significands S1 and S2 are divided by **restoring division**:
  * A 25-bit partial remainder starts at S1.
  * Each clock it is compared with S2 by subtraction. If the difference is
    not negative, the quotient bit is 1 and the difference is kept.
    Otherwise the quotient bit is 0 and the remainder is kept. The
    remainder then doubles.
  * After 25 steps, q = floor(S1 · 2^24 / S2), which lies in (2^23, 2^25).
  * If q[24] is 0 (S1 < S2), the fraction is q[22:0] and the exponent is
    decremented. Otherwise it is q[23:1].
  * An assertion checks that the remainder stays below 2·S2.
* The quotient is truncated.
* Overflow and underflow are handled as in the multiplier.
* x/0 gives ±infinity with `div_by_zero`. 0/0, inf/inf and NaN give the NaN
  with `invalid`. inf/x gives ±inf, and 0/x and x/inf give ±0.
* As in the multiplier, denormal operands count as zero.

Control is a three-state machine (idle, divide, done). `start` loads the
operands. `busy` is high for 26 clocks: 25 division steps and one clock to
register the result. `done` pulses in the 27th clock after start, and special
operands take the same time. Through `fpu_top` the latency is 28.

## Which parts follow the algorithm and which are this design's choices

These follow the standard algorithms the design implements:

* the adder's stage order and the function of each stage, including
  denormal handling at the input and round-to-nearest-even as the default;
* the multiplier's exponent arithmetic, normalisation, truncation, and
  overflow to infinity / underflow to zero;
* the divider's sign, exponent and bit-by-bit compare-and-subtract
  division;
* the operation codes `000`–`011` and a 2-bit rounding-mode field.

These are this design's own choices:

* The encoding of rounding modes `01`, `10` and `11`. `01` is
  round-toward-zero, which matches what the multiplier does anyway.
* The guard/round/sticky width, and limiting normalisation at exponent 1
  so that denormal sums are exact.
* Overflow results in the directed modes, zero signs, NaN and infinity
  handling, and the `0x7FC00000` NaN.
* Flushing denormal operands in the multiplier and divider.
* The remainder-doubling form of the divider, 25 quotient bits, one bit per
  clock.
* The start/busy/done handshake, the extra output register in `fpu_top`, the
  flag set, and the treatment of opcodes `1xx`.
* A 9-bit compare in the exponent-difference stage. The multiplier and
  divider compute exponents in 10 bits instead of with separate 8-bit adders
  and subtractors.

## Known limitations

* The multiplier and divider truncate. Their results can be 1 ulp below
  the correctly rounded IEEE 754 value, and `rmode` has no effect on them.
* The multiplier and divider flush denormal operands to zero. They never
  produce a denormal: results that are too small become ±0 with `underflow`.
* There is no inexact flag on the ports. The rounder computes one
  internally.
* There is no pipelining beyond the output registers. The adder and the
  multiplier are single-cycle combinational paths: 24×24 multiply, barrel
  shifters and leading-one detector.
* The format is fixed at 8-bit exponent and 23-bit fraction (`fpu_pkg`).

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_fp_adder`: 40,000 random and directed add/subtract operations in all
  rounding modes. Operands are biased toward close exponents, denormals,
  near-overflow values, all-ones fractions, infinities and NaNs. Results are
  compared with `fp_ref_pkg::ref_add`. That model converts both operands to
  exact 300-bit integers in units of 2^-149, adds them, and rounds once. It
  has no alignment, GRS or normalisation logic in common with the hardware.
* `tb_fp_multiplier` and `tb_fp_divider` compare with truncating models that
  use plain integer multiply and divide. The divider testbench also checks
  the 27-clock latency and that a `start` while busy is ignored.
* Each adder stage has its own test:
  * exhaustive over all exponent pairs for the exponent-difference stage;
  * every shift amount for both barrel shifters;
  * every leading-one position for the detector;
  * property checks of value preservation and normal form for the
    normaliser;
  * a direct rounding model for the rounder.
* `tb_fpu_top` runs the whole unit at its only configuration:
  * It starts with four reference operations: 10 + 5 with round mode 00,
    10 − 5 with 10, 10 × 5 with 01, and 10 / 5 with 00.
  * It then makes 20,000 random start attempts back to back. About 7,500 are
    accepted; the rest arrive while the divider is busy and must be
    ignored.
  * A scoreboard checks every result, flag and completion clock.
  * It counts these events and fails if any never occurs: operand swap,
    effective subtraction, negative sum, carry normalisation, left
    normalisation, rounding carry, denormal result, product normalisation,
    quotient below one, overflow, underflow, divide by zero, invalid, and
    ignored start.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv --top-module tb_fpu_top
./obj_dir/Vtb_fpu_top
```

Replace `tb_fpu_top` with any other `tb_*` name. Each testbench runs in well
under a second.

## Files

| file | contents |
|------|----------|
| `rtl/fpu_pkg.sv` | `fp32_t`, opcode and rounding-mode enums, NaN/inf helpers |
| `rtl/fpu_top.sv` | operation select, handshake, result/flag register |
| `rtl/fp_adder.sv` | adder/subtractor: stage wiring, special cases, output register |
| `rtl/fpadd_exp_diff.sv`, `fpadd_swap_mux.sv`, `fpadd_align_shifter.sv`, `fpadd_effective_op.sv`, `fpadd_inverter.sv`, `fpadd_twos_adder.sv`, `fpadd_lod.sv`, `fpadd_left_shifter.sv`, `fpadd_normalizer.sv`, `fpadd_rounder.sv` | adder stages |
| `rtl/fp_multiplier.sv` | truncating multiplier |
| `rtl/fp_divider.sv` | sequential restoring divider |
| `tb/fp_ref_pkg.sv` | reference models and operand generator |
| `tb/tb_*.sv` | one testbench per module |
