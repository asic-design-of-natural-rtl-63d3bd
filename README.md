# Natural-frequency feature extractor for atrial-fibrillation detection

Atrial fibrillation (AF) changes the shape of the ECG from beat to beat. One
feature that separates AF from normal sinus rhythm is the *natural frequency* of
a second-order system fitted locally to the signal. For a short window of
samples, treat the ECG `x(t)` as the response of a second-order system and
estimate its squared natural frequency from the first four time derivatives:

```
            x'' * x'''' - (x''')^2
omega^2 =  ------------------------
            x'  * x'''  - (x'')^2
```

This RTL computes that ratio in hardware from a window of five samples. The
derivatives are replaced by backward finite differences with time step `t`.
The samples are `a = x_n` (newest), `b = x_{n-1}`, `c`, `d`, `e = x_{n-4}`
(oldest):

```
m = x'    = (b - a) / t
n = x''   = (c - 2b + a) / t^2
p = x'''  = (d - 3c + 3b - a) / t^3
q = x'''' = (e - 4d + 6c - 4b + a) / t^4

w = (n*q - p*p) / (m*p - n*n)          (w is omega^2; no square root is taken)
```

The reference time step is `t = 4`. The same function is built in three
architectures. They trade area against time. All three follow a published
high-level-synthesis study ("ASIC Design of Natural Frequency of ECG Signal for
Atrial Fibrillation Detection Module using High-Level Synthesis Approach"):

| | Design 1 | Design 2 (preferred) | Design 3 |
|---|---|---|---|
| module | `nf1_top` | `nf2_top` | `nf3_top` |
| style | single cycle | single cycle | multi-cycle, one multiplier/divider and one adder/subtractor per module |
| `t` | run-time input | fixed, `t = 2**LOG2_T = 4` | fixed, `t = 4` |
| throughput | one window per clock | one window per clock | one window per 11 clocks |
| result | half a clock after the sampling edge | half a clock after the sampling edge | `done` 11 rising edges after `start` |
| division by `t^k` | multipliers and dividers | binary-point shift | binary-point shift |

Design 2 is the one to use: it is as fast as Design 1 and has no arithmetic
on `t`. Design 1 keeps `t` programmable. Design 3 shows the smallest datapath
per module.

## Structure

Every architecture has the same five sub-modules, plus a top that wires them:

```
 a b c d e ──┬──► m-module ──m──┐
             ├──► n-module ──n──┤
             ├──► p-module ──p──┼──► w-module ──► w, w_err
             └──► q-module ──q──┘
```

The m-, n-, p- and q-modules work side by side on the same window. The
w-module combines their outputs. `natural_frequency_module` puts the three
architectures next to each other. They share clock and reset and nothing else,
so you can drive and compare them independently.

| file | contents |
|---|---|
| `rtl/nf_pkg.sv` | widths, fixed-point types, `nf_window_t`, `nf_result_t`, the saturating divider function |
| `rtl/nf1_{m,n,p,q}.sv`, `rtl/nf1_top.sv` | Design 1 |
| `rtl/nf2_{m,n,p,q}.sv`, `rtl/nf2_top.sv` | Design 2 |
| `rtl/nf_w_sc.sv` | single-cycle w-module, shared by Designs 1 and 2 |
| `rtl/nf3_{m,n,p,q,w}.sv`, `rtl/nf3_top.sv` | Design 3 |
| `rtl/natural_frequency_module.sv` | top: the three designs side by side |
| `tb/nf_ref_pkg.sv` | reference model used by all testbenches |
| `tb/tb_*.sv` | self-checking testbenches |

## Number formats

The algorithm is written in real numbers. The hardware uses two's-complement
fixed point:

| quantity | type | format | why |
|---|---|---|---|
| samples `a..e` | `nf_sample_t` | 16-bit signed integer (`XW`) | ADC-sized samples |
| `m, n, p, q` | `nf_fix_t` | 32-bit, 8 fraction bits (`FRAC`), Q23.8 | with `t = 4` the largest divisor is `t^4 = 256`, so all four are exact |
| products, `n*q - p*p`, `m*p - n*n` | `nf_prod_t` | 64-bit, 16 fraction bits | full precision, cannot overflow |
| `w` | `nf_w_t` | 32-bit, 16 fraction bits (`WFRAC`), Q15.16 | |
| `t` (Design 1) | `nf_t_t` | 8-bit unsigned (`TW`) | |

`w = (num << 16) / den` is computed on 80 bits and truncated toward zero. If
the denominator is zero, `w = 0` and `w_err = 1`. An all-zero window does
this. In real arithmetic it gives 0/0. If the quotient does not fit in Q15.16,
`w` saturates and `w_err = 1`. This can only happen with a denominator a few
LSB from zero. In Designs 2 and 3 the divisions by `t^k` are exact. In Design 1
they are exact for `t` = 1, 2 or 4 and truncate toward zero for other `t`. `t = 0`
gives zero derivatives, and so `w_err = 1`.

For the reference windows, the three designs produce these values (×256 for
`m..q` and ×65536 for `w` give the integers on the ports):

| a b c d e | m | n | p | q | w |
|---|---|---|---|---|---|
| 23 42 70 11 23 | 4.75 | 0.5625 | -1.5 | 0.9921875 | 0.22736 |
| 54 20 35 30 13 | -8.5 | 3.0625 | -1.078125 | 0.30078125 | 1.12273 |
| 10 34 42 50 19 | 6 | -1 | 0.25 | -0.21484375 | 0.30469 |

## Designs 1 and 2: single cycle, two clock edges

The m/n/p/q-modules register on the **rising** edge. The w-module `nf_w_sc` is
fully combinational: four multipliers, two subtractors and a divider. It
registers on the **falling** edge. A window applied before rising edge *k*
shows up as follows:

```
clk     ‾‾|__|‾‾|__|‾‾
           k
x      ==W0==X==W1==X==
m..q   ------X W0 -----X W1
w      ---------X W0 -----X W1      (half a period after edge k)
```

So each window takes one clock period from input to `w`, and a new window can
come every cycle. The half-cycle w stage leaves the multipliers and the
divider only half a clock period. At a real clock rate this is the critical
path. Register `w` on the rising edge instead if you would rather have a full
period and one cycle of extra latency.

Design 1 forms `t^2, t^3, t^4` with multipliers inside each module. It divides
with a general divider. Design 2 knows `t = 2**LOG2_T`. Dividing by `t^k` only
moves the binary point. The integer numerator is shifted left by
`FRAC - k*LOG2_T`. `LOG2_T` must satisfy `4*LOG2_T <= FRAC`. An elaboration
check enforces this.

## Design 3: multi-cycle, one operator pair per state

In Design 3 each sub-module may use **one multiplier/divider and one
adder/subtractor per clock cycle**. It computes its equation as a small
sequence of register transfers. `R1`, `T1` and `T2` are the module's own
accumulators. A divide by `t^k` is an exact shift:

| module | states | schedule |
|---|---|---|
| `nf3_m` | 1 | S1: `m <- (b - a)/4` |
| `nf3_n` | 2 | S1: `R1 <- c - 2b`; S2: `n <- (R1 + a)/16` |
| `nf3_p` | 3 | S1: `R1 <- d - 3c`; S2: `R1 <- R1 + 3b`; S3: `p <- (R1 - a)/64` |
| `nf3_q` | 4 | S1: `R1 <- e - 4d`; S2: `R1 <- 6c + R1`; S3: `R1 <- R1 - 4b`; S4: `q <- (R1 + a)/256` |
| `nf3_w` | 5 | S1: `T1 <- n*q`; S2: `T1 <- T1 - p*p`; S3: `T2 <- m*p`; S4: `T2 <- T2 - n*n`; S5: `w <- T1/T2` |

Each sub-module has a `start`/`done` handshake. On the rising edge that sees
`start` while idle, the module executes S1 with its inputs as they are. The
remaining states follow on the next edges. The last state writes the result
and raises `done`. `done` and the result then hold until the next start. A
`start` that arrives while the module is in S2 or later is ignored.

The controller in `nf3_top` sequences one operation:

```
edge  1      start seen while idle: window stored in the input registers,
             start pulse to m/n/p/q
edges 2-5    m, n, p, q run concurrently; m is done after edge 2, n after 3,
             p after 4, q after 5
             (the controller waits for all four done flags; they are ignored
             in the cycle of the start pulse because they are still high
             from the previous operation)
edges 6-10   w-module S1..S5, started in the same cycle all four are done
edge 11      done rises, busy falls; y holds the result
```

While `busy` is high, the window inputs and `start` are ignored. The window
used is the one stored at edge 1. A `start` held high runs back-to-back
operations, one every 11 cycles. The outputs `y.m..y.q` come straight from the
sub-modules. `y.w` and `y.w_err` come from the w-module. `done` is the
controller's flag.

The controller has two assertions: the w-module is only started when all four
derivatives are ready, and `done` and `busy` are never high together.

## Interfaces

All resets are synchronous and active low (`rst_n`), and clear every register.
The falling-edge register of `nf_w_sc` is also reset on the falling edge.

`natural_frequency_module #(LOG2_T = 2)`:

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | logic | clock, reset |
| `d1_x`, `d1_t` | in | `nf_window_t`, `nf_t_t` | Design 1 window and time step |
| `d1_y` | out | `nf_result_t` | Design 1 `{m, n, p, q, w, w_err}` |
| `d2_x` | in | `nf_window_t` | Design 2 window |
| `d2_y` | out | `nf_result_t` | Design 2 results |
| `d3_start`, `d3_x` | in | logic, `nf_window_t` | Design 3 start and window |
| `d3_y`, `d3_done`, `d3_busy` | out | `nf_result_t`, logic, logic | Design 3 results and status |

`nf_window_t` is a packed struct `{a, b, c, d, e}` with `a` in the top bits.
`nf_result_t` is `{m, n, p, q, w, w_err}`. To use a single architecture,
instantiate `nf1_top`, `nf2_top` or `nf3_top` directly. They have the same
ports without the prefixes.

## Where this RTL departs from, or adds to, the published design

- **Fixed point instead of real numbers.** The published waveforms show real
  values. The formats above are this design's. They reproduce the published
  values to within one LSB of `w`.
- **The output is `omega^2`.** The derivation gives omega squared. The
  published results are the ratio itself, and so is `w` here.
- **`p` divides by `t^3`.** This is what the `t = 4` substitution (divide by
  64) and the published `p` values require.
- **q-module S3 subtracts `4*b`.** This is the term the q equation needs after
  S2 has added `6*c`.
- **Design 3 has one multiplier/divider and one adder/subtractor per
  sub-module, not one in total.** The sub-modules are described as
  concurrent, with 1/2/3/4/5 states and 11 cycles in all. A single shared pair
  of units would need at least 10 states for m..q alone.
- **Schedules.** Only the q-module schedule and the state counts are given.
  The m, n, p and w schedules above are this design's, within those state
  counts.
- **Handshakes, reset, zero-denominator and saturation behaviour, widths** are
  this design's choices. The falling-edge w register is used only in the
  single-cycle designs. Design 3 is entirely rising-edge.
- **Not modelled:** FPGA mapping, clock rate and resource counts. The
  published figures come from one vendor tool and device. The only timing
  given is the cycle count, which this RTL matches.

## Verification

Each testbench checks its block against `tb/nf_ref_pkg.sv`. That model
recomputes `m..q` with 64-bit integers and `w` in double precision, and allows
±1 LSB on `w`. Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | covers |
|---|---|
| `tb_nf1_mnpq`, `tb_nf2_mnpq` | derivative modules; one-edge latency; reference windows; random windows over several ranges; Design 1 with `t` in 0..9 |
| `tb_nf3_mnpq` | Design 3 derivative modules; `done` after exactly 1/2/3/4 edges; start while busy ignored |
| `tb_nf_w_sc` | falling-edge timing of `w`; zero denominator; saturation |
| `tb_nf3_w` | 5-edge latency; held results; zero denominator; saturation |
| `tb_nf1_top`, `tb_nf2_top` | one window per cycle end to end; `m..q` after the rising edge, `w` after the falling edge |
| `tb_nf3_top` | `done` exactly 11 edges after `start`; busy; windows and starts during busy ignored; back-to-back and gapped operations |
| `tb_natural_frequency_module` | all three designs on one stream at default parameters; Design 1 against Design 2 for `t = 4`; counts that every mechanism happened (per-cycle windows, `t != 4`, falling-edge updates, 11-cycle operations, ignored starts, zero denominators, saturation) |

Simulate a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_natural_frequency_module \
    -y rtl -y tb +libext+.sv rtl/nf_pkg.sv tb/nf_ref_pkg.sv tb/tb_natural_frequency_module.sv
./obj_dir/Vtb_natural_frequency_module
```

Replace the top-module name and the last file to run another testbench. To
lint one module, run
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/nf_pkg.sv rtl/<module>.sv`.

The derivative outputs have constant low bits in Designs 2 and 3. For example,
`m` is always a multiple of 1/4, so its 6 lowest bits are zero. Synthesis
removes them.
