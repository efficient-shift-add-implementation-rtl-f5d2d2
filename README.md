# Multiplierless 4-tap FIR filter with Sklansky adders, and a clock-gated LFSR

A fixed-coefficient FIR filter does not need multipliers. Every coefficient is a
constant, so each product `h * x` can be rewritten as a sum of shifted copies of
`x`. The shifts are wiring, so a product costs only the adders between those
copies. This design builds a small direct-form FIR filter in this way:

```
finalout = 1*x + 3*x1 + 4*x2 + 3*x3        (5-bit samples, 9-bit result)
```

Here `x` is the sample captured at the last clock edge and `x1..x3` are the three
before it. The coefficient 1 is a wire and 4 is a two-place shift. Each 3 is one
subtraction (`4x - x`). The filter therefore needs 2 adders for the products and
3 for the sum, and no multiplier. Every adder is a Sklansky parallel-prefix
adder.

Next to the filter, but not connected to it, is a second small circuit: a
4-stage LFSR whose clock passes through an integrated clock-gating cell, so that
its flip-flops switch only in the cycles where they are enabled.

## Block structure

```
shift_add_fir_top
├── fir_filter                 clk, reset, data1[4:0] -> finalout[8:0]
│   ├── delay_line             4 x 5-bit D flip-flops: x, x1, x2, x3
│   ├── shift_add_mult  x4     x*h as shifted terms, chained on Sklansky adders
│   │   └── sklansky_adder     (one per nonzero digit after the first)
│   └── adder_tree             (mul0+mul1) + (mul2+mul3)
│       └── sklansky_adder  x3
└── gated_lfsr                 lfsr_clk, lfsr_reset, lfsr_run -> lfsr_q[3:0]
    ├── gate_ctrl              divide-by-2 enable
    ├── icg_cell               latch + AND
    └── lfsr4                  x^4 + x^3 + 1, parallel 4-bit output
```

`fir_pkg` holds the filter's sizes, its coefficient vector, the recoding enum
and the constant functions that recode a coefficient into digits.

## The filter

### Timing

The filter takes one sample per rising edge of `clk`. `finalout` is
combinational from the four tap registers; there is no output register. A
sample captured at edge *n* appears in `finalout` with weight `h0 = 1` right
after that edge. Its weights 3, 4 and 3 follow after edges *n+1* to *n+3*, and
the sample leaves the sum after edge *n+4*. With `data1` held at 3 from reset,
the outputs are 3, 12, 24, 33. If `data1` then changes to 5, they are 35, 41,
49, 55. The clock period is bounded by one shift-add product plus two levels of
the adder tree.

`reset` is synchronous and active high. It clears the four taps, so `finalout`
reads 0.

### Shift-add constant multipliers (`shift_add_mult`)

The constant is recoded at elaboration time into digits d_k ∈ {−1, 0, +1}, and
the product is Σ d_k·(x << k). There are two recodings:

* `RECODE_BINARY` uses the constant's own bits. It needs only additions, one
  per `1` bit after the first.
* `RECODE_CSD` (default) uses canonical signed digits: no two nonzero digits
  are adjacent. For constants with runs of ones this needs fewer operations.
  For example, 15 = 16 − 1 needs 1 operation instead of 3. On average the
  binary form needs about b/2 add/subtracts for a b-bit constant and CSD about
  b/3. Neither form is always optimal: 45 needs 3 either way, while the best
  known network needs 2.

The terms are added starting from the most significant nonzero digit, which is
always +1 in CSD. A −1 digit is a subtraction, done as `a + ~b` with carry-in 1
on the same Sklansky adder. All products are carried at 9 bits (`OUT_W`)
modulo 2^9. The chain is built in a generate loop from the constant functions
`recode_digit`/`top_digit` in `fir_pkg`, so any non-negative coefficient works.
A coefficient of 0 produces a constant 0.

The filter's coefficients fit in 5-bit fields (`COEF_W`). Samples are unsigned
by default. `SIGNED_IN = 1` sign-extends them instead, which turns the filter
into a two's-complement one with the same adders. Only the extension of the
5-bit sample changes, because everything after it is modular arithmetic.

### Sklansky adder (`sklansky_adder`)

The adder works in three stages:

1. **Pre-calculation:** the bit propagate `p = a ^ b` and generate
   `g = a & b` terms. The carry-in is folded into the group generate of bit 0.
2. **Carries:** a prefix tree of ⌈log2 W⌉ levels. At level *l*, every bit in
   the upper half of each 2^l-bit block merges its (G, P) pair with the pair of
   the top bit of the lower half:
   `G = G_i | P_i & G_j`, `P = P_i & P_j`. This builds 2-bit, then 4-bit, then
   8-bit adders from two halves each. After the last level, `G_i` is the carry
   out of bit *i*. The cost is fan-out: the top bit of a lower half drives the
   whole upper half, so fan-out doubles at each level.
3. **Sum:** `sum = p ^ {G[W-2:0], cin}` and `cout = G[W-1]`.

The default width is 8. Inside the filter the adders are instantiated at the
filter's 9-bit result width.

### Adder tree (`adder_tree`)

This is a generic binary tree. The N inputs are padded with zeros to a power of
two and added in pairs, level by level. For the filter it computes
`add0 = mul0 + mul1`, `add1 = mul2 + mul3` and `finalout = add0 + add1`.

One point departs from the reference. There, the tree is described as 8-bit
adders whose carry-out forms a 9-bit result. Here every node is a full 9-bit
adder. For unsigned 5-bit samples and {1, 3, 4, 3} the results are identical,
because no intermediate sum reaches 256. The wider nodes also keep the tree
exact for other coefficients or for signed samples.

## The clock-gated LFSR

`gate_ctrl` counts clock cycles modulo `DIV` (default 2). It raises `en` in the
last cycle of each period, and only while `run` is high. `en` comes from
flip-flops, so it changes shortly after a rising edge of the clock.

`icg_cell` turns `en` into `gclk`. A bare `clk & en` would produce a shortened
pulse whenever `en` rises while `clk` is high. The cell therefore holds `en` in a
latch that is transparent only while `clk` is low, and ANDs the latched value
with `clk`. `gclk` carries whole clock pulses only, and stays low while the
enable is off.

`lfsr4` is clocked by `gclk`. It is a Fibonacci LFSR with feedback
`q[3] ^ q[2]` (x^4 + x^3 + 1, maximal length, period 15). It shifts one place
per gated pulse, and all four stages are the output. Its reset is asynchronous
and loads `0001`, so reset works even while the gated clock is stopped. With
the defaults and `run` high, the LFSR steps on every second rising edge of
`lfsr_clk`; with `run` low it holds its state.

## Top-level ports (`shift_add_fir_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `reset` | in | 1 | filter clock and synchronous reset (active high) |
| `data1` | in | 5 | filter input sample |
| `finalout` | out | 9 | filter output |
| `lfsr_clk`, `lfsr_reset` | in | 1 | LFSR clock and asynchronous reset (active high) |
| `lfsr_run` | in | 1 | enable request for the gated clock |
| `lfsr_q` | out | 4 | LFSR state |
| `lfsr_gate_en` | out | 1 | enable at the gating cell, for observation |

## Where this departs from, or fills in, the reference description

* The coefficients {1, 3, 4, 3} and the pairing of the adder tree come from
  signal values of a reference simulation. The tap values, products and sums
  printed there agree with each other.
* Signedness: the reference text speaks of sign extension for signed products,
  while its synthesis figures (unsigned 5×2-bit multipliers) and waveform
  (positive values) point to unsigned samples. The default is unsigned;
  `SIGNED_IN` provides the other reading.
* The reference synthesis maps the two ×3 taps to small multipliers. Here they
  are shift-and-subtract blocks, as the multiplierless method intends.
* Tree adders are 9 bits wide instead of 8-bit adders with a carry-out (see
  above).
* These details are not specified in the reference and are this design's own
  choices:
  * combinational output;
  * reset polarity and type;
  * CSD as the default recoding;
  * the carry-in on the adder;
  * the latch in the clock-gating cell;
  * the divide-by-2 ratio and the `run` input;
  * the LFSR polynomial and seed.
* Not built:
  * the "variable partition hybrid form" structure: no partitioning or
    structure is specified, and the filter described is direct form;
  * common-subexpression sharing across multipliers: direct form has no
    common multiplicand;
  * a separate controller: the filter needs no sequencing beyond clock and
    reset;
  * a carry-select stage after the 8-bit Sklansky adders, which the
    reference mentions in passing without specifying it;
  * the processor system used to drive the design on an FPGA board.

## Simulation

Every file in `rtl/` is one module or package. Each testbench in `tb/` checks
itself and ends by printing `TB_RESULT checks=<n> failures=<n>`. The testbenches
use delays, so Verilator needs `--timing`. For example, the end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_shift_add_fir_top rtl/fir_pkg.sv tb/tb_shift_add_fir_top.sv
./obj_dir/Vtb_shift_add_fir_top
```

| testbench | what it checks |
|---|---|
| `tb_sklansky_adder` | all 131072 input combinations at 8 bits; exhaustive at 5 bits; random at 13 bits |
| `tb_shift_add_mult` | constants 0, 1, 3, 4, 7, 11, 15, 23, 31, 45 in binary, CSD and signed form, every 5-bit sample; CSD digit counts |
| `tb_delay_line` | tap contents against a history of the samples, including a reset mid-stream |
| `tb_adder_tree` | 3, 4 and 8 inputs, random and all-ones |
| `tb_fir_filter` | step 3→5 (33, 55), impulse response 1, 3, 4, 3, full scale 341, 2000 random samples; the unsigned/CSD and signed/binary variants |
| `tb_icg_cell` | gclk edges only at matching clk edges, no glitch when en changes in the high phase, pulse count |
| `tb_gate_ctrl` | enable phase for DIV = 2 and 3, run low |
| `tb_lfsr4` | sequence, all 15 nonzero states, period, asynchronous reset |
| `tb_gated_lfsr` | one step per enabled cycle, none with run low |
| `tb_shift_add_fir_top` | both circuits at default parameters; counts that every mechanism occurred (reset, step, impulse, full scale, subtracting taps, gated pulses, divider hold-off, run stop, LFSR period and reset) |

To change the filter, edit `COEFFS`, `DATA_W` and `OUT_W` in `fir_pkg`, or
override `H`, `DATA_W_P` and `OUT_W_P` on `fir_filter`. Make sure that
`OUT_W` holds the largest possible sum, `(2^DATA_W − 1)·Σh`, or the output wraps
modulo 2^OUT_W. The tap count `NTAPS` is a package constant, and the width of
`H` follows it.
