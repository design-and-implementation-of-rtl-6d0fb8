# 8-tap block FIR filter built from radix-4 Booth multipliers and carry look-ahead adders

This is a finite impulse response filter,

    y[n] = h0·x[n] + h1·x[n-1] + ... + h7·x[n-7]

that handles a **block of four samples every clock**. It takes four new input samples per
clock and produces the four matching outputs. Speed comes from two places:

* **Parallelism.** Each of the four outputs has its own row of multipliers and adders, so the
  filter's throughput is four samples per clock.
* **Fast arithmetic units.**
  * Every product is formed by a **radix-4 (modified) Booth multiplier**. An 8 × 8 product
    then needs four partial products instead of eight.
  * Every sum is formed by a **two-level carry look-ahead adder (CLA)**, whose carries do not
    ripple through the bits.

There is also an **iterative radix-4 Booth multiplier**. It is a shift-and-add unit with a
control counter, it accepts signed or unsigned operands, and it sits beside the filter as a
standalone 8 × 8 multiplier.

All of it is synthesizable SystemVerilog-2017. Every module has a self-checking testbench.

## Top level: `fir_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `xi0` .. `xi3` | in | 8 | input block, two's complement. `xi0` is the **newest** sample x[n], `xi3` is x[n-3] |
| `o1` .. `o4` | out | 16 | outputs. `o1` = y[n] (the output at the time of `xi0`) … `o4` = y[n-3] |
| `mul_start` | in | 1 | pulse: load the operands and start the standalone multiplier |
| `mul_a`, `mul_b` | in | 8 | multiplicand and multiplier |
| `mul_a_signed`, `mul_b_signed` | in | 1 | 1 = that operand is two's complement, 0 = unsigned |
| `mul_busy`, `mul_done` | out | 1 | multiplication running; one-cycle pulse when the product is loaded |
| `mul_product` | out | 16 | product, held until the next one completes |

Filter timing: one block is accepted on every rising edge. The outputs are registered, so
`o1..o4` show the result for the block sampled on the previous edge: **latency 1 clock,
throughput 4 samples per clock**.

Reset clears the delay line and the outputs. The filter then behaves as if every earlier
sample had been zero.

## How the block filter works (`block_fir8`)

An output y[n-k] needs the eight samples x[n-k] … x[n-k-7]. Across the four outputs of a block
that is 4 + 7 = 11 consecutive samples:

    window w[j] = x[n-j],  j = 0..10
    w[0..3]  = current block   (x[0..3] = xi0..xi3)
    w[4..10] = hist[0..6]      (the 7 samples before the block, in registers)

    y[k] = Σ_{t=0..7} h[t] · w[k+t]        k = 0..3

Each of the four `y[k]` has its own row of 8 `booth_r4_mult` instances. The row's products are
summed by a direct-form chain of 7 `cla_adder`s, as in the textbook direct-form FIR:
`((p0+p1)+p2)+...`. That makes 32 multipliers and 28 adders in all.

On every clock the window moves forward by one block: `hist[j] <= w[j]` for j = 0..6. The
delay line is the only state apart from the output registers, 7 × 8 + 4 × 16 = 120 flip-flops.

Arithmetic is two's complement throughout:

* 8-bit samples times 8-bit coefficients give 16-bit products.
* The sums are kept to 16 bits and wrap on overflow. The default coefficients cannot overflow:
  |y| ≤ 12 · 128.

Parameters: `TAPS` (8), `BLOCK` (4), `N` sample width (8; outputs are 2N bits) and `COEFFS`
(h[0] first). `BLOCK = 1, TAPS = 4` gives the plain one-sample-per-clock direct-form filter,
with registered output.

### Coefficients

The default is `h = {2, 1, 1, 2, -1, 1, 2, 2}`, set in `fir_pkg::DEFAULT_COEFFS` and in the
default of `block_fir8`. **These values are this design's own choice**, fitted to a reference
simulation of the filter.

In that reference, three input blocks are each held steady for many clocks:

| xi0 xi1 xi2 xi3 | o1 o2 o3 o4 (settled) |
|---|---|
| 3 3 5 2 | 32 31 30 37 |
| 1 2 3 4 | 30 24 22 24 |
| 5 6 9 8 | 76 68 64 72 |

When a block is held, the delay line fills with copies of it. The output then settles to a
circular convolution of the block with the pair sums h[m] + h[m+4].

The twelve numbers above are matched **exactly** by pair sums (1, 2, 3, 4), with `xi0` read as
the newest sample. The opposite sample order would need pair sums (1, 4, 3, 2). These numbers
fix only the pair sums, not the eight taps. The default splits each sum so that every tap is
non-zero and one tap is negative. That way the test exercises all 32 multipliers and both signs
of the Booth recoding.

To use your own filter, override `COEFFS`. For example:

```systemverilog
block_fir8 #(.COEFFS('{8'sd3, -8'sd5, 8'sd7, 8'sd9, 8'sd9, 8'sd7, -8'sd5, 8'sd3})) u (...);
```

## Radix-4 Booth multiplier, combinational (`booth_r4_mult`)

The multiplier `b` is padded with a 0 below bit 0. It is then read in overlapping triplets
{b(2i+1), b(2i), b(2i−1)}, each of which selects a digit of −2..+2:

| triplet | digit | partial product |
|---|---|---|
| 000, 111 | 0 | 0 |
| 001, 010 | +1 | +A |
| 011 | +2 | +2A (A shifted left) |
| 100 | −2 | −2A |
| 101, 110 | −1 | −A |

How the partial products are formed and summed:

* `booth_pp_gen` sign-extends A to 2N bits and doubles it when the digit is ±2.
* For a negative digit it negates the value with `twos_complement` (invert, then add 1 on a
  CLA).
* Partial product i is shifted left by 2i.
* The N/2 partial products are summed by a chain of N/2 − 1 CLAs.

For N = 8 that is 4 partial products and 3 adders. The product of two N-bit two's-complement
numbers is exact in 2N bits. The unit has no clock.

## Radix-4 Booth multiplier, iterative (`booth_seq_mult`)

This is a register-and-adder datapath sequenced by a step counter:

* **A**, the partial-product register.
* **Q**, the multiplier, with an extra bit **Q(−1)** below it.
* **B**, the multiplicand, and its 2's complement −B.
* One CLA and an arithmetic right shift.

Each step:

1. Read {Q1, Q0, Q(−1)} and use the table above to add 0, ±B or ±2B to A.
2. Shift {A, Q, Q(−1)} right arithmetically by two places.

Each step therefore retires two multiplier bits. After the last step the high half of the
product is in A and the low half is in Q.

Signed and unsigned operands can be mixed. Both operands are first extended by two bits, with
the sign bit or a zero according to `a_signed` / `b_signed`. The unit then runs an exact signed
M × M multiplication with M = N + 2. For N = 8 that is **5 steps**.

Handshake timing:

* **Edge 0:** while idle, `start` loads the operands. The operand inputs are not looked at
  again.
* **Edges 1..5:** one step each. `busy` is high during these cycles.
* **Edge 5:** `product` is loaded and `done` pulses for one cycle.

A `start` pulse while the unit is busy is ignored.

## Carry look-ahead adder (`cla_adder`, `cla4`, `cla_lookahead4`, `cla_full_adder`)

* `cla_full_adder` forms P = A⊕B, G = A·B and S = P⊕C. It does not compute a carry of its own.
* `cla_lookahead4` computes C1..C4 of a 4-bit group directly from P, G and C0. It uses the
  expanded form of C(i+1) = G(i) + P(i)·C(i). It also outputs the group propagate
  PG = P3P2P1P0 and the group generate GG.
* `cla4` is four cells plus one generator.
* `cla_adder` (16 bits by default) is four `cla4` groups whose PG/GG feed a second
  `cla_lookahead4`. That generator computes each group's carry in. Its interface:
  * ports `i_add1[15:0]`, `i_add2[15:0]`, `o_result[16:0]`;
  * the top result bit is the carry out;
  * there is no carry input.

Wider instances (WIDTH a multiple of 4, above 16) chain several second-level generators. The
tests use a 24-bit one; the 2N-bit adders inside the multipliers are 16 bits, and the iterative
multiplier's is 12 bits.

## Where this design makes its own choices

The arithmetic units follow their usual textbook form. The following points were not given
for the filter and were decided here:

* **Filter structure.** The source describes the filter only as 8 taps, 4-sample blocks and
  block-based direct form. The fully parallel window structure above is the simplest structure
  that does this.
* **Coefficients and sample order.** See the Coefficients section above.
* **Number format.** Two's complement with 16-bit wrap-around sums. The registered outputs,
  the reset behaviour and the iterative multiplier's start/busy/done handshake are choices too.
* **Booth multiplier in the taps.** The taps use a combinational Booth multiplier, so that
  every tap delivers a product every clock. The iterative multiplier is kept as a separate unit.
* **Signed/unsigned support.** In the iterative unit it is done by extending the operands by
  two bits. This costs one extra step over N/2.
* **Results not reproduced.** Area, delay, power and FPGA-utilisation results for these units
  are not reproduced by this RTL.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `fir_pkg.sv` | widths, tap/block counts, default coefficients |
| `fir_top.sv` | top level |
| `block_fir8.sv` | block FIR filter |
| `booth_r4_mult.sv`, `booth_pp_gen.sv`, `twos_complement.sv` | combinational Booth multiplier |
| `booth_seq_mult.sv` | iterative Booth multiplier |
| `cla_adder.sv`, `cla4.sv`, `cla_lookahead4.sv`, `cla_full_adder.sv` | carry look-ahead adders |

`tb/` holds one self-checking testbench per block. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cla_lookahead4`, `tb_cla4` | exhaustive (512 cases each) |
| `tb_cla_adder` | corner cases and 20 000 random pairs, at 16 and 24 bits |
| `tb_booth_r4_mult` | all 65 536 signed 8 × 8 pairs, plus random 16 × 16 pairs. It also confirms that every Booth digit occurs |
| `tb_booth_seq_mult` | all four signedness combinations, extreme and random operands, the 5-cycle latency, busy/done behaviour, and that a start while busy is ignored |
| `tb_block_fir8` | default and extreme-coefficient filters against a sample-by-sample model. Covers the three reference blocks and their settled outputs, 3000 random blocks with wrap-around, and a reset in mid-stream |
| `tb_fir_direct4` | the filter configured as a one-sample-per-clock 4-tap direct form (`BLOCK = 1`, `TAPS = 4`) against a model |
| `tb_fir_top` | end to end at the default size. Runs the filter and the multiplier concurrently, and counts that each mechanism (reset, settled reference blocks, signedness modes, Booth digits, ignored start) occurs |

## Simulating

From the project root, for example:

```sh
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/fir_pkg.sv tb/tb_fir_top.sv \
          --top-module tb_fir_top -o sim && ./obj_dir/sim
```

Swap in any other testbench name the same way. `fir_pkg.sv` must come first, because the
modules that use the package are found through `-y`. Verilator lint:
`verilator --lint-only -Wall -Irtl -y rtl rtl/fir_pkg.sv rtl/fir_top.sv`. The only warnings it
reports are unused carry-out bits of adders whose result is kept to 16 bits, and package
constants that a given module does not use.
