# NEON: an FIR filter built from approximate reversible adder cells

NEON is a direct-form FIR filter for error-tolerant signal processing (image
and video pipelines, where a slightly wrong pixel goes unnoticed). It saves
power by replacing every full adder in the filter's summation chain with a
much cheaper *approximate* full adder. That cell is a single reversible
Toffoli gate, and it leaves just one garbage output, which is a goal of
reversible logic design.

This repository holds synthesizable SystemVerilog for the whole filter and its
parts: the Toffoli gate, the approximate full-adder cell, the word-wide
approximate adder, the tapped delay line and the tap multipliers. Each has a
self-checking testbench.

## The approximate full-adder cell

A Toffoli gate maps `(A, B, C)` to `(A, B, (A & B) ^ C)`. The map is
one-to-one, so the gate is reversible. The approximate full adder feeds it
`(A, B, Cin)` and reads its outputs as:

| output          | value             |
|-----------------|-------------------|
| sum             | `B`               |
| carry out       | `(A & B) ^ Cin`   |
| garbage         | `A`               |

Comparison with an exact full adder:

| A B Cin | exact S C | cell sum | carry `AB^Cin` | carry `A` |
|---------|-----------|----------|----------------|-----------|
| 0 0 0   | 0 0       | 0 ok     | 0 ok           | 0 ok      |
| 0 0 1   | 1 0       | 0        | 1              | 0 ok      |
| 0 1 0   | 1 0       | 1 ok     | 0 ok           | 0 ok      |
| 0 1 1   | 0 1       | 1        | 1 ok           | 0         |
| 1 0 0   | 1 0       | 0        | 0 ok           | 1         |
| 1 0 1   | 0 1       | 0 ok     | 1 ok           | 1 ok      |
| 1 1 0   | 0 1       | 1        | 1 ok           | 1 ok      |
| 1 1 1   | 1 1       | 1 ok     | 0              | 1 ok      |

The sum is right in 4 of the 8 cases. Either carry form is right in 6 of the 8.

**Two forms of the carry.** The published description gives the carry in two forms:

- The gate-level drawing takes the carry from the Toffoli gate's third output, `AB ^ Cin`.
- The cell's truth table reads it as plain `A`.

Both keep `sum = B` and leave one garbage output. The default,
`CARRY_MODE = CARRY_TOFFOLI`, is the gate-level form. `CARRY_MODE = CARRY_A`
gives the truth-table form, in which `AB ^ Cin` becomes the garbage output.
The enum is defined in `neon_pkg`. The parameter reaches every cell from the
top.

## What the cell does to a word adder and to the filter

`approx_adder` puts one cell at each bit position and ripples the carry from
bit 0 upward. Each cell's sum is its `B` input, so the carry never reaches a
sum bit:

- The word sum `s` is exactly operand `b`.
- Operand `a` and the carry input `ci` only affect the carry out `co`.
- In `CARRY_A` mode, `co` is simply `a[WIDTH-1]`.

The filter chains `N` such adders as the direct form does:

    psum_0 = b_0 * x[n]
    psum_k = approx_add(A = psum_{k-1}, B = b_k * x[n-k], Ci = c_in[k]),  k = 1..N
    y[n]   = psum_N

So **`y[n]` is bit for bit `b_N * x[n-N]`**. The other taps show up only in the
adders' carry outputs `c_out[k]`. This follows from the cell equations, not
from any choice made here, and the testbenches check it exactly. Against a true
FIR sum, the output's mean relative error in the testbenches' random runs is
about 0.84 to 0.97, depending on order and carry mode. Judge the design's
accuracy against your application with that in mind. To experiment with other
cells, change `approx_full_adder`; the rest of the hierarchy does not depend
on its equations.

## Filter structure and timing

```
x_in ──┬── z^-1 ──┬── z^-1 ── ... ──┬── (delay_line, ORDER registers)
       │          │                 │
      ×b_0       ×b_1              ×b_N      (tap_multiplier, exact)
       │          │                 │
       └──A  [adder 1] S──A [adder 2] ... S──A [adder N] S── y_out
             B┘  Ci Co       B┘ Ci Co              B┘ Ci Co
```

Ports of `neon_fir`:

| port       | dir | width              | meaning |
|------------|-----|--------------------|---------|
| `clk`      | in  | 1                  | clock |
| `rst_n`    | in  | 1                  | asynchronous active-low reset; clears the delay line |
| `en`       | in  | 1                  | sample enable: the delay line shifts on rising edges with `en` high and holds otherwise |
| `x_in`     | in  | `DATA_W`           | input sample `x[n]`, unsigned |
| `coeff`    | in  | `COEF_W` × `ORDER+1` | coefficients `b_0 .. b_N`, unsigned, unpacked array `[0:ORDER]` |
| `c_in`     | in  | `[ORDER:1]`        | carry into bit 0 of adder `k` |
| `y_out`    | out | `ACC_W`            | filter output `y[n]` |
| `c_out`    | out | `[ORDER:1]`        | carry out of adder `k` |

Timing:

- There is no output register and no pipelining. `y_out` and `c_out` are
  combinational from `x_in`, `coeff`, `c_in` and the delay line.
- A new sample is taken on every rising edge with `en` high.
- Because only the last tap reaches `y_out`, a sample reaches the output
  exactly `ORDER` enabled edges after it is applied. The testbenches check
  this latency with an impulse.
- The critical path is one multiplier, then the carry ripple through all `N`
  adders of `ACC_W` cells each. The sum path is only wires.

## Parameters

| parameter    | default         | meaning |
|--------------|-----------------|---------|
| `ORDER`      | 16              | filter order `N`: `N` delays, `N+1` taps, `N` adders |
| `DATA_W`     | 16              | sample width |
| `COEF_W`     | 16              | coefficient width |
| `ACC_W`      | `DATA_W+COEF_W` | adder width; the products are cut to it |
| `CARRY_MODE` | `CARRY_TOFFOLI` | which Toffoli output the cells use as carry |

The filter was evaluated at orders 8, 12 and 16, with input widths of 8, 12
and 16 bits respectively. The defaults are the largest of these. Smaller sizes
are parameter overrides.

## Sources and choices

Taken from the published design:

- the Toffoli gate and its equations;
- the cell (`sum = B`, one garbage output) and both forms of its carry;
- the filter structure: delay chain, one gain per tap, `N` approximate adders
  chained left to right, with `A` as the running sum and `B` as the product;
- separate carry in and carry out on each adder, as drawn;
- the orders and input widths.

Chosen here, because the published description is silent on them:

- the ripple-carry organisation of the word adder;
- unsigned arithmetic;
- exact, full-width combinational tap multipliers (only the adders are
  approximate);
- the coefficient width and the adder width;
- coefficients supplied on input ports;
- the enable, and the asynchronous reset to zero;
- bringing each adder's carry in and carry out to the top as ports. The
  drawing leaves them unconnected.

The cells' garbage outputs are kept as a named internal net in `neon_fir`,
which is why lint reports it as unused.

Not covered: the power, delay and energy figures reported for the filter, and
its use of the adder inside ISCAS benchmark circuits. These come from
transistor-level and standard-cell tools and from external netlists, not from
RTL.

## Files

`rtl/`:

| file                    | contents |
|-------------------------|----------|
| `neon_pkg.sv`           | `carry_mode_e` |
| `toffoli_gate.sv`       | 3×3 Toffoli gate |
| `approx_full_adder.sv`  | approximate cell (one Toffoli gate) |
| `approx_adder.sv`       | `WIDTH`-bit ripple chain of cells |
| `delay_line.sv`         | `z^-1` chain with enable and reset |
| `tap_multiplier.sv`     | exact product `b_i * x[n-i]` |
| `neon_fir.sv`           | the filter (top) |

`tb/`:

| file                       | checks |
|----------------------------|--------|
| `tb_toffoli_gate.sv`       | all 8 inputs; the gate is a bijection |
| `tb_approx_full_adder.sv`  | all 8 inputs in both carry modes; 4/8 exact sums and 6/8 exact carries |
| `tb_approx_adder.sv`       | 2000 random and corner operands against a bit-serial model, both modes |
| `tb_delay_line.sv`         | random stream with random enable; reset in mid-stream |
| `tb_tap_multiplier.sv`     | 2000 random and extreme operands |
| `tb_neon_fir.sv`           | filter at its default size: `y_out` and all `c_out` every cycle against a bit-level model of the adder chain; impulse latency; hold, reset, carries |
| `tb_neon_fir_orders.sv`, `fir_order_harness.sv` | the same checks at order 8 / 8-bit, 12 / 12-bit, 16 / 16-bit, and order 8 with `CARRY_A` |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. The filter testbenches also count each mechanism they
exercise: shift, hold, reset, impulse latency, carry out set, carry in used.
They count a failure for any mechanism that never occurred. They print the
mean relative error against the exact FIR sum for information only.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/neon_pkg.sv \
  --top-module tb_neon_fir tb/tb_neon_fir.sv -o sim
./obj_dir/sim
```

Replace `tb_neon_fir` with any other testbench name. Put `rtl/neon_pkg.sv`
first whenever a file uses the package. For lint only:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/neon_pkg.sv rtl/neon_fir.sv
```

All testbenches finish in well under a second.
