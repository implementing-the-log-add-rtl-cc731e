# Log-add unit: adding probabilities without leaving the log domain

A speech recogniser keeps its probabilities as logarithms, so that the
many products of an HMM search become additions. Gaussian-mixture
likelihoods are the exception: their components must be *summed* in the
linear domain. Converting each operand with `exp`, adding, and taking the
`ln` of the result needs two large tables or two CORDIC units, plus a number
format for values as small as 10^-3072.

This unit avoids the conversion with the identity

    ln(A + B) = ln(A) + ln(1 + B/A)

With the operands ordered so that A >= B, the second term depends only on
the *difference* of the two log values and lies between 0 and ln 2. One
8192-word × 11-bit table (11 Kb), two comparators, a 4-way mux and two
subtractors are enough. The unit is a 4-stage pipeline that takes one
addition per clock.

## Number format

A probability P is held as the unsigned 24-bit integer

    x = round(-K ln P),   K = 2371.8

K is the HTK scale factor: with it, a 16-bit value spans probabilities
from 10^-12 to 1. At 24 bits the range reaches about 10^-3072. A larger
integer means a *smaller* probability, and 0 is probability 1. Values
produced for HTK models with this K can be used directly. A 16-bit value
zero-extended to 24 bits is a valid operand.

With x = -K ln A and y = -K ln B the unit returns

    -K ln(A + B) = min(x, y) - T(|x - y|),   T(d) = K ln(1 + exp(-d/K))

The smaller integer is the larger probability, so taking the minimum is
the "swap so that A >= B" step. The difference d = |x - y| is -K ln(B/A),
which is never negative. T(d) is the magnitude of K ln(1 + B/A). The term
is negative in the signed formulation, so the unit subtracts it.

## The correction table (the core of the design)

T(d) starts at K ln 2 = 1644 for d = 0. It first falls by one for every two
steps of d, then ever more slowly. Two properties keep the table small:

* **The LSB of d is dropped.** Neighbouring even and odd d differ in T by
  less than one, so the table is addressed by `d[13:1]`. Entry i holds
  `round(K ln(1 + exp(-2i/K)))`: 1644 at i = 0, 2 at i = 8191. Its largest
  value fits in 11 bits.
* **Beyond the table, T takes only three values.** Above d = 16384 the
  rounded correction is 2, drops to 1 at 17471 and to 0 at 20077. Two
  comparators handle that range instead of a wider table.

The range test `d < 16384` is not a magnitude comparator. It is a NOR of
bits 23..14 of d, which is cheaper. The mux then selects:

| select (`tsel_e`) | condition on d                 | T(d)                 |
|-------------------|--------------------------------|----------------------|
| `SEL_TABLE` (a)   | bits 23..14 all zero           | table word `d[13:1]` |
| `SEL_TWO` (b)     | 16384 <= d < 17471             | 2                    |
| `SEL_ONE` (c)     | 17471 <= d < 20077             | 1                    |
| `SEL_ZERO` (d)    | d >= 20077                     | 0                    |

The table contents are not stored as a data file. `logadd_rom` computes
them from the formula above in an `initial` loop (`$ln`, `$exp`). Verilator
and yosys both turn this into an initialised 8192 × 11 memory, which maps
onto one FPGA block RAM.

**Accuracy.** The output is within 1 of the exact rounded correction for
every d. The test bench checks the whole adder against the real-valued
`min - K ln(1 + exp(-d/K))` to within 1.5. With exact rounding the steps
to 1 and to 0 would come one step earlier (at 17470 and 20076). The limits
used here, 17471 and 20077, are the published cut-offs and keep the error
below 1.

## Pipeline and timing

```
 in_a,in_b ─► [1] logadd_order ──min──► [2] delay ──► [3] delay ──► [4] logadd_sub ─► out_sum
                compare, swap,    │                                    min - T, clamp   out_sat
                d = |a - b|       └─d─► [2] table read  ─► [3] mux ─T─┘
                                        NOR + 2 comparators  (table / 2 / 1 / 0)
                                        → registered select
```

| stage | module         | work                                                     |
|-------|----------------|----------------------------------------------------------|
| 1     | `logadd_order` | comparator, operand swap, d = \|a - b\|                  |
| 2     | `logadd_table` | synchronous table read; NOR and comparators → select     |
| 3     | `logadd_table` | 4-way mux, T registered                                  |
| 4     | `logadd_sub`   | min - T, clamped at 0                                    |

* Latency: a result appears exactly **4 clocks** after its operands.
  `out_valid` rises on the fourth rising edge after the one that sampled
  `in_valid`.
* Throughput: one operation per clock. There is no stall and no
  back-pressure. `in_valid` may have gaps and only travels with the data.
* An assertion in `logadd` checks that each valid result is no larger
  than the smaller operand it came from.
* Reset: `rst_n` is synchronous and active low. It clears only the valid
  pipeline. Data registers are not reset because nothing reads them while
  they are invalid.

## Interface of the top, `logadd`

| port        | dir | width | meaning                                         |
|-------------|-----|-------|-------------------------------------------------|
| `clk`       | in  | 1     | clock                                           |
| `rst_n`     | in  | 1     | synchronous reset, active low                   |
| `in_valid`  | in  | 1     | operands valid this cycle                       |
| `in_a`      | in  | WIDTH | -K ln(A)                                        |
| `in_b`      | in  | WIDTH | -K ln(B)                                        |
| `out_valid` | out | 1     | result valid                                    |
| `out_sum`   | out | WIDTH | -K ln(A + B)                                    |
| `out_sat`   | out | 1     | T exceeded min(a, b); result clamped to 0       |

`WIDTH` defaults to 24. Shared constants (K, table size, cut-offs,
latency) and the mux-select enum are in `logadd_pkg`.

## What is specified and what was chosen here

These follow the published algorithm: the number format and K, the 24-bit
width, the ordering step, the 8192 × 11 table with the LSB of d dropped,
the NOR range test, the constants 2, 1 and 0 with their cut-offs, the
final subtraction, and the total latency of 4 cycles.

These are this implementation's own choices:

* How the 4 cycles are split into stages (table above).
* The table entry for address i is the rounded correction at the even
  difference 2i. Only the first value (1644) was given.
* The synchronous table read, and computing the contents at
  initialisation.
* The valid bit, the reset and the one-per-cycle operation.
* Equal operands are not swapped. Either order gives the same result.
* **Clamping.** When A + B > 1, min - T would go below 0 and underflow.
  This happens only for likelihoods above 1, never for true probabilities.
  Here the result is clamped to 0 and `out_sat` is raised.
* Signed log values (probabilities above 1) are not supported. Every
  operand is an unsigned 24-bit integer.

The surrounding recogniser, which produces the mixture components and
consumes the sums, is not part of this RTL. The unit's operand and result
ports are its interface to it.

## Files

| file                        | contents                                         |
|-----------------------------|--------------------------------------------------|
| `rtl/logadd_pkg.sv`         | constants and the `tsel_e` mux-select enum       |
| `rtl/logadd_order.sv`       | stage 1: compare, swap, difference               |
| `rtl/logadd_rom.sv`         | 8192 × 11 correction table                       |
| `rtl/logadd_table.sv`       | stages 2-3: table, range test, mux               |
| `rtl/logadd_sub.sv`         | stage 4: final subtractor with clamp             |
| `rtl/logadd.sv`             | top: the pipeline                                |
| `tb/logadd_ref_pkg.sv`      | reference model used by the test benches         |
| `tb/<module>_tb.sv`         | one self-checking test bench per module          |

## Verification

Each test bench computes its expected values independently with real
arithmetic. Each ends with a line `TB_RESULT checks=N failures=M`.

* `logadd_rom_tb` reads all 8192 words. It checks each word against the
  rounded formula and against the exact correction at both even and odd d.
  It also checks that the table never rises, the end values 1644 and 2, and
  the one-cycle read.
* `logadd_table_tb` streams every d from 0 to 25000, the range limits and
  random 24-bit values. It checks T, the mux select and the two-cycle
  latency, and requires all four mux inputs to be used.
* `logadd_order_tb` and `logadd_sub_tb` check their stages with random and
  corner-case operands, including the all-ones operand and the clamp.
* `logadd_tb` runs the whole unit at its default size. It sends 20 000
  additions of 24-bit operands with random gaps, then 5 000 of 16-bit
  operands and checks every result against the
  reference model and the exact value. It checks the 4-cycle latency of
  each result, that reset suppresses output, and a mixture sum
  0.5 + 0.25 + 0.125 + 0.125 = 1. It counts swaps, each of the four table
  ranges, clamps, idle cycles and back-to-back operations, and fails if
  any never occurred.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/logadd_pkg.sv tb/logadd_ref_pkg.sv tb/logadd_tb.sv --top-module logadd_tb
./obj_dir/Vlogadd_tb
```

Use the same command with another `*_tb` for a single module. Every test
finishes in well under a second.

## Changing the design

* **Another K or table size.** `logadd_rom` computes its contents from `K`,
  `ADDR_W` and `DATA_W`. The constant-2/1/0 ranges in `logadd_table`
  (`CUT_TWO`, `CUT_ONE`) must then be recomputed. They are the d at which
  round(K ln(1 + exp(-d/K))) first drops to 1 and to 0. The table must
  reach far enough that T is at most 2 at its end, which is
  d = 2^(ADDR_W+1).
* **Narrower operands.** `WIDTH` can be reduced to 16 down to
  `ADDR_W + 2`. The NOR then covers the bits above `ADDR_W`.
* **Different pipelining.** The stage registers are in the sub-modules.
  The top's valid shift register and its two-register delay of the
  smaller operand must match the total.
