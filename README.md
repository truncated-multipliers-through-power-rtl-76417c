# Power-gated truncated multiplier and a 16-tap FIR filter built from it

A fixed-point multiplier is usually sized for the worst-case precision, yet
many signal-processing tasks can live with fewer correct low-order bits for
long stretches of time. This design makes the precision of an 8x8-bit
two's-complement multiplier selectable at run time: the least significant
columns of its partial-product array are grouped into power domains, and a
domain that is not needed is isolated and then switched off by a sleep
transistor. With its k lowest columns off the unit behaves like a hardware
truncated multiplier; with all of them on it is an exact multiplier. The same
hardware therefore offers full precision when it matters and a truncated,
lower-power mode when it does not.

The default configuration has two power domains of four columns each
(granularity g = 4), giving k = 0, 4 or 8 truncated columns. Sixteen of these
multipliers make up a transposed-form FIR filter with 8-bit samples and
coefficients and a 16-bit output, where one controller sets the truncation
of all of them on the fly.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/dpa_pkg.sv` | package `dpa_pkg` | default sizes, power-domain state type, the maximum-error formula |
| `rtl/dpa_mult.sv` | `dpa_mult` | the power-gated truncated multiplier (combinational) |
| `rtl/pg_ctrl.sv` | `pg_ctrl` | sequencer of isolation and SLEEP for each power domain |
| `rtl/coef_bank.sv` | `coef_bank` | coefficient registers of the filter |
| `rtl/dpa_fir.sv` | `dpa_fir` | top: 16-tap FIR filter with power-gated multipliers |
| `tb/tb_*.sv` | | one self-checking testbench per module |

## The multiplier array and where it is cut

`dpa_mult` forms the partial products in Baugh-Wooley form. For operands a
and b, the dot in column i+j is a[i]&b[j]; the dots where exactly one of i, j
is the sign position 7 are inverted, and two constant ones sit in columns 8
and 15 to correct the sign extension. Column c (0..14) thus holds
min(c, 14-c)+1 dots, plus the constants.

The dots are reduced *column by column*. At each level, every column taller
than two bits is cut into groups of three bits, each feeding a full adder;
a leftover pair goes to a half adder and a leftover single bit passes
through. Sums stay in their column and carries move one column up. For 8x8
operands four levels bring every column down to two bits, and a ripple-carry
adder over those two rows produces the 16-bit product. The adder allocation
is computed at elaboration by constant functions (`height`, `n_fa`, `n_ha`,
`n_pass`), so the generate loops build the exact cell structure for any N.

The point of the column organisation is that a column's cells only talk to
the column above through carries. Columns 0..KMAX-1 (KMAX = 8) are gated:
column c belongs to domain c/G. All cells of a column belong to its domain:
the partial-product AND gates, every reduction adder and the final-adder
cell. A signal leaves a domain in only two ways:

* a carry from the top column of the domain into the next column up, at
  every reduction level and in the final adder;
* the product bits of the domain's own columns.

An isolation gate sits on each of these. While `iso[d]` is high it clamps the
signal to 0. With domains 0..k/G-1 isolated, the product equals the exact
product minus the value of every dot in columns below k. The error is
never negative and at most

    eps_max(k) = sum_{j=0..k} (2^(k-j) - 1) * 2^j      (1, 5, 17, 49, ..., 1793)

units of the product LSB, which is `dpa_pkg::eps_max`.

Isolation clamps to 0 by choice. Clamping to 1 would also isolate the domain,
but the product would then have a different, biased error.

### Modelling an unpowered domain

In a logic simulator, switching off a domain's supply changes nothing unless
it is modelled. With `SLEEP_MODEL = 1` (the default), every cell of a domain
whose `sleep[d]` is high drives the constant `DRIFT` (1) in place of its logic
value. This stands for floating nodes. A run then shows that the result stays
correct only because the isolation gates clamp the domain's outputs. Set
`SLEEP_MODEL = 0` to get the bare multiplier with its isolation gates. That is
the netlist to synthesize: the sleep transistors and virtual supply rails are
physical-design objects that are added later, from power intent.

`dpa_mult` asserts the one rule that keeps the design safe: a domain may be
asleep only while it is isolated.

### Granularity

`G` sets the columns per domain. G = 4 is the main configuration. It puts
isolation gates on the critical path in only two places, at the column 3→4
and 7→8 boundaries. G = 1 gives one domain per column and every k from 0 to
8, at the cost of an isolation gate on each column edge, on the carry path.
G = 2 also works. G must divide KMAX.

## Power-mode sequencing (`pg_ctrl`)

Each domain goes through four states, one clock per step:

```
             request off               (next clock)
   ON  ───────────────────▶ ISO ───────────────────▶ OFF
 iso=0,sleep=0          iso=1,sleep=0            iso=1,sleep=1
   ▲                                                  │
   │        (next clock)                 request on   │
   └─────────────────────── WAKE ◀────────────────────┘
                        iso=1,sleep=0
```

* Power-off takes two clocks: the outputs are isolated, then the sleep
  transistor is turned off.
* Power-on takes two clocks: the sleep transistor is turned back on, then
  isolation is released.
* If a request is withdrawn while a domain is in ISO or WAKE, the domain goes
  back the way it came. Isolation is therefore never released while the
  domain is unpowered.

Assertions in `pg_ctrl` check three rules:
* SLEEP is high only when isolation is high;
* SLEEP rises only after a cycle of isolation;
* isolation falls only after a cycle of restored power.

`k_req` is given in product bits and must be a multiple of G. `k_eff` is the
truncation actually present at the multiplier outputs in the current cycle,
equal to G times the number of isolated domains. It follows a request to
truncate more after one clock, and a request to truncate less after two.
`busy` is high while a sequence is in progress. Reset (active-low,
asynchronous) selects full precision.

## The FIR filter (`dpa_fir`)

The filter is in transposed form. The sample `x` is broadcast to all 16
multipliers. The product with the last coefficient a15 goes into the first
delay register. Each following stage adds its own product to the register on
its left and stores the sum. The stage with a0 drives `y` directly, without a
register:

    y(t) = a0*x(t) + a1*x(t-1) + ... + a15*x(t-15)

* **Sampling.** A sample is taken at each clock edge where `x_valid` is high.
  The delay registers shift only then. `y` belongs to the sample currently on
  `x`.
* **Width.** The adder chain is 16 bits wide and wraps modulo 2^16. Scale the
  coefficients so that the output fits.
* **Precision changes.** All 16 multipliers share one `pg_ctrl`, and their
  domain signals leave the top as `pd_iso` and `pd_sleep`: in silicon,
  `pd_sleep` drives the sleep transistors. Samples may keep flowing during a
  precision change. Each product then carries the truncation in force at the
  clock where it was formed, which `k_eff` reports.
* **Coefficients.** `coef_bank` holds the coefficients. Write one per clock
  with `coef_we`, `coef_addr` and `coef_data`. Each register's load enable is
  its only condition, so clock-gating insertion during synthesis turns the
  bank into registers whose clocks stop once loading is done.

## Accuracy

The multiplier testbench measures the mean error for random operands. It
agrees closely with the figures published for this scheme.

| k | mean error, this RTL (ulp) | published mean (ulp) | eps_max |
|---|---|---|---|
| 1 | 0.2 | 0.2 | 1 |
| 2 | 1.2 | 1.2 | 5 |
| 3 | 4.3 | 4.2 | 17 |
| 4 | 12.2 | 11.2 | 49 |
| 5 | 31.9 | 28.3 | 129 |
| 6 | 81.3 | 73.4 | 321 |
| 7 | 190 | 180.1 | 769 |
| 8 | 576 | 561.6 | 1793 |

The mean errors are exact over all operand pairs for k = 4 and 8 (g = 4).
For the other k they come from 4000 random pairs (g = 1). The small
differences from the published figures come from the choice of random
operands.

For the filter with random full-range coefficients and samples, the mean
output error is about 197 ulp at k = 4, against 211 published. At k = 8 it is
about 9500 ulp, against 1210 published. The published filter's coefficients
and input signal are not known. The k = 8 figure depends strongly on them,
because with random operands the two sign-inverted dots of column 7 are 1
three times in four.

## How far it can be trusted

Each testbench computes its expected values on its own, never from the design
under test:

* **`tb_dpa_mult`** works out the reference from the operands: the exact
  product minus the Baugh-Wooley dots below column k. It runs all 65536
  operand pairs at k = 0, 4 and 8 (g = 4), with the gated domains both asleep
  and awake. It runs random pairs for every k from 0 to 8 (g = 1), and checks
  each result against eps_max.
* **`tb_pg_ctrl`** checks `iso`, `sleep`, `busy` and `k_eff` cycle by cycle.
  It covers every transition between k = 0, 4 and 8, withdrawn requests, and
  random transitions for g = 1.
* **`tb_coef_bank`** checks writes, address decoding and holding.
* **`tb_dpa_fir`** runs the top at its default parameters. It uses its own
  reference filter and its own model of when a truncation takes effect. It
  compares `y` and `k_eff` every cycle through about 3000 samples, with all
  six changes between k = 0, 4 and 8. It counts the mechanisms exercised:
  loading, power-off, power-on, samples at each k, samples during a sequence
  and idle cycles. Each one must occur at least once.

What is not covered:

* Timing, power and area are not modelled. The benefit of the design is
  physical: the supply of the gated cells is removed.
* The RTL only shows that the logic is correct in every power state. The
  timing of the sleep transistors and the behaviour of the virtual supply
  belong to the physical implementation.

## Where this design makes its own choices

The scheme itself is taken as published:
* the column-wise two's-complement array with sign correction;
* clustering cells by column into domains of g columns;
* isolation where signals leave a gated domain;
* the isolate/sleep/wake/de-isolate order with one clock per step;
* the sizes: 8x8 bits, 8 gateable columns, g = 4, 16 taps, a 16-bit output.

The following are this design's own choices:

* **Sign correction.** The Baugh-Wooley form, with the correction constants
  in columns 8 and 15.
* **Reduction.** The greedy per-level adder allocation, which gives four
  levels for 8x8, and a ripple-carry final adder.
* **Isolation.** The clamp value is 0. The product bits of gated columns are
  isolated too, not only the carries.
* **Simulation.** The drift-value model of an unpowered domain.
* **Controller.** A single controller shared by all the filter's
  multipliers; the `k_eff`, `busy` and abort behaviour; reset to full
  precision.
* **Interfaces.** The coefficient load port, the `x_valid` sample strobe, the
  wrap-around 16-bit accumulation, and the absence of input and output
  registers.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes by
itself. With Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/dpa_pkg.sv rtl/coef_bank.sv rtl/pg_ctrl.sv rtl/dpa_mult.sv rtl/dpa_fir.sv \
  tb/tb_dpa_fir.sv --top-module tb_dpa_fir -o sim
./obj_dir/sim
```

For the other testbenches, replace the last file and the top module with
`tb_dpa_mult`, `tb_pg_ctrl` or `tb_coef_bank`; the package and the module
under test are enough. Each run takes under a second.

To change the configuration, override `G` (1, 2 or 4), `KMAX`, `N` or `TAPS`
on `dpa_fir` or `dpa_mult`. The adder tree, the isolation points and the
number of domains follow automatically. `k_req` must stay a multiple of `G`.
