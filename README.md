# Complex-gain digital predistorter with a Newton-Raphson complex divider

A radio power amplifier compresses and rotates large signals: its gain falls
and its phase shifts as the drive amplitude rises (AM-AM and AM-PM
distortion). That spreads energy into neighbouring channels. A digital
predistorter sits in front of the amplifier at complex baseband and applies
the opposite distortion, so the cascade of predistorter and amplifier is
linear.

This RTL implements the complex-gain form of that idea, taken from the
Complex Gain Memory Predistortion (CGMP) method. Each sample is multiplied by
a complex gain read from a table indexed by the sample's power. The table
learns from the amplifier's own output: for every sample, the ratio of wanted
to obtained output tells how far off the stored gain is. Forming that ratio
needs a complex division, which FPGA fabric does not offer. Most of the logic
in this design is therefore a pipelined complex divider built from
multipliers, using a Newton-Raphson reciprocal.

The memory-effect compensation branches of the full CGMP method are **not**
included (see "Departures and gaps"). What is here is the memoryless
complex-gain predistorter, with its table adaptation and divider.

## Block overview

```
              +---------------------- cgmp_predistorter ----------------------+
 x ──────────►│ |x|^2 ─► index ─► gain_lut ─► complex_mult (x*G) ─► z ───────►│──► z to amplifier
              │                      ▲                              │         │
              │                      │ write G'                     ▼         │
              │                 G' = G + mu(G*r - G) ◄── complex_mult (G*r)   │
              │                      ▲                      ▲                  │
              │  sync_fifo (x, index, G) ──► complex_divider r = x / y         │
 y ──────────►│──────────────────────────────────┘                             │◄── y from amplifier
              +----------------------------------------------------------------+

 complex_divider = complex_mult (a*conj b) + |b|^2
                   ─► divisor_scaler ─► nr_reciprocal ─► div_postscaler
```

| File | Role |
|---|---|
| `rtl/cgmp_pkg.sv` | Sample and gain formats, `sample_t`, `gain_t`, unity gain |
| `rtl/cgmp_predistorter.sv` | Top: forward path, table initialisation, feedback pairing, adaptation |
| `rtl/gain_lut.sv` | Gain table, one read and one write port |
| `rtl/complex_mult.sv` | Pipelined complex multiplier, optional conjugate |
| `rtl/complex_divider.sv` | Complex divider: prescale, Newton-Raphson, postscale |
| `rtl/divisor_scaler.sv` | Normalises the divisor into [0.5, 1) |
| `rtl/nr_reciprocal.sv` | Unrolled Newton-Raphson reciprocal |
| `rtl/div_postscaler.sv` | Quotient = numerator x reciprocal, shifted back, rounded, clipped |
| `rtl/sync_fifo.sv` | Small FIFO used to pair feedback with sent samples |

## Number formats

| Quantity | Format | Note |
|---|---|---|
| Samples `x`, `z`, `y` | I and Q, 16-bit signed Q1.15 | full scale ±1.0 |
| Gains in the table | I and Q, 16-bit signed Q2.14 | range ±2.0, unity = 16384 |
| Divider output `x / y` | Q2.14 | clipped at ±2, flagged |
| Newton-Raphson words | unsigned, `RW` = 20 fraction bits | divisor Q0.20, reciprocal Q2.20 |

These widths are this design's choice; the method does not fix them.

## The forward path

For every accepted input sample:

1. `|x|^2` (Q2.30) is formed and registered. Its bits [29:22] address the
   256-entry table. Powers of 1.0 or more use the last entry. Addressing by
   power avoids a square root, and it gives the high-amplitude region, where
   the amplifier compresses, the finest resolution.
2. The table is read (synchronous RAM).
3. `x * G` is formed at full precision.
4. The product is rounded back to Q1.15, clipped, and registered as `z`.

Latency from `x` to `z` is 4 cycles, one sample per cycle, with no stalls.

After reset, the table is filled with unity gain, one entry per cycle, for
256 cycles. `in_ready` is low during that time and `in_valid` is ignored.
Until adaptation changes the table, `z` equals `x` exactly.

## How the table learns

The feedback input `y` is the amplifier output brought back to baseband and
divided by the wanted linear gain. If the cascade were linear, `y` would equal
`x`. For a sample that used table entry `G`, the corrected gain is

```
r  = x / y                       (complex divider)
G' = G + mu * (G * r - G),       mu = 2^-MU_SHIFT  (default 1)
```

When `y == x`, `r` is 1 and the entry stays as it is. When the amplifier
compresses (`|y| < |x|`), `|r| > 1` and the gain grows. When it rotates the
phase, `r` rotates the gain back. `mu` is the convergence gain factor. With
the default `mu = 1` the entry is simply replaced by `G * x / y`; against a
noiseless amplifier model this settles within two passes over the signal.
With noisy feedback, a smaller step (`MU_SHIFT` > 0) averages the noise out
but needs more passes: at `mu = 1/4`, the rarely visited high-amplitude
entries of a high peak-to-average signal take about 20 passes.

Pairing feedback with samples: every sample that leaves while `adapt_en` is
high pushes its context (`x`, table address, gain used) into a 16-entry FIFO.
Each feedback sample pops one context. The loop delay through the amplifier
therefore does not need to be known: any delay of up to 16 samples in flight
is absorbed. The feedback must arrive in order, one sample per sent sample.

An update is skipped (`skip_pulse`) when:

- the sample fell into table entry 0 (`MIN_IDX`), where `x` and `y` are so
  small that the ratio is mostly quantisation noise;
- the divider clipped its result; or
- the feedback was exactly zero.

Other status outputs:

- `fb_orphan` flags feedback that arrived with no sample waiting.
- `fifo_full` flags a sample sent while the FIFO was full. That sample is not
  used for adaptation. A full FIFO means the loop delay is longer than the
  FIFO, and later feedback is paired with the wrong samples. Drop `adapt_en`
  to flush and resynchronise, and enlarge `FB_AW`.
- Dropping `adapt_en` flushes the FIFO and ignores feedback.

Timing: `upd_pulse` or `skip_pulse` rises `NR_ITERS + 6` = 11 cycles after the
cycle that presents the feedback sample, and the table is written at the end
of that cycle. The adaptation path takes one feedback sample per cycle.

Entries that are still in flight use the gain that was read when their sample
went out. Several updates to one entry that fall within one loop delay plus
about 15 cycles therefore start from the same old value, and the last write
wins. This can slow convergence, but the point it converges to (`y == x`) is
unchanged.

## The complex divider (hardest part)

The quotient of two complex numbers is rewritten so that only one real
reciprocal is needed:

```
a / b = a * conj(b) / |b|^2
```

The pipeline, one division per cycle, has a latency of `NR_ITERS + 5` = 10
cycles:

| Stage | Cycles | What happens |
|---|---|---|
| numerator and divisor | 1 | `complex_mult` with `CONJ_B = 1` gives `a*conj(b)` (33 bits). `|b|^2` is formed as a 32-bit unsigned word. |
| prescale (`divisor_scaler`) | 1 | A leading-one detector finds bit position `lead` of `|b|^2`. The word is shifted so that this bit is on top, and the top 20 bits become `d`, a fraction in [0.5, 1). The integer divisor is `d * 2^(lead+1)`. |
| reciprocal (`nr_reciprocal`) | `NR_ITERS + 1` | Start value `x0 = 48/17 - 32/17 * d` (worst relative error 1/17). Then `x(k+1) = x(k) * (2 - d * x(k))` once per stage. The number of correct bits doubles each step. |
| postscale (`div_postscaler`) | 2 | Multiply the numerator by the reciprocal. Shift right by `RW + 1 + lead - OUT_F`, round half up, clip to `OUT_W` bits. |

Why this works: `a` and `b` share one binary point, so `a*conj(b)` and `|b|^2`
also share one. Their ratio then depends only on the integer words and the
shift `lead`. The postscaler's shift puts the result directly in the Q2.14
output format.

Accuracy: the test of 4096 random divisions shows every in-range quotient
within 1 LSB of the exact value, with a worst squared error of about 0.52
LSB². With the linear start value, three iterations would already reach the
20-bit word. Five are kept, matching the divider this design follows, and
`NR_ITERS` can be lowered to save two multiplier stages per iteration.

Special cases:

- `b == 0` gives `q = 0` with `dz` set.
- A quotient outside ±2 is clipped to the largest word of that sign, with
  `sat` set.

Each iteration of `nr_reciprocal` uses two multipliers, about 20x22 bits.

## Departures and gaps

Departures from the source method:

- **No memory-effect compensation.** The full method adds branches that
  compensate the amplifier's memory effects, in two variants: a full one and
  a simplified one. They are not implemented here. Against an amplifier with strong memory effects, this predistorter
  corrects only the static AM-AM and AM-PM curves.
- **The table has a separate write port.** The reference implementation used
  a single-port RAM. A second port lets adaptation run while samples flow.
- **This design's own choices:** the adaptation step form and its size, power
  addressing with 256 entries, all word widths, the linear Newton-Raphson
  start value, rounding and clipping, the pairing FIFO and the skip rules.

Not part of the RTL:

- the amplifier;
- the converters and RF up- and down-conversion;
- the instruments and the FPGA co-simulation link.

The ports `z` (to the amplifier chain) and `y` (from the feedback receiver)
are where these connect.

## Parameters

`cgmp_predistorter`:

| Parameter | Default | Meaning |
|---|---|---|
| `LUT_AW` | 8 | table address width (256 entries) |
| `MU_SHIFT` | 0 | adaptation step 2^-MU_SHIFT |
| `FB_AW` | 4 | pairing FIFO depth 2^FB_AW |
| `MIN_IDX` | 1 | entries below this are not adapted |
| `RW` | 20 | Newton-Raphson fraction bits |
| `NR_ITERS` | 5 | Newton-Raphson iterations |

`complex_divider`:

| Parameter | Default | Meaning |
|---|---|---|
| `IN_W` | 16 | input width |
| `OUT_W` | 16 | output width |
| `OUT_F` | 14 | output fraction bits |
| `RW` | 20 | Newton-Raphson fraction bits |
| `NR_ITERS` | 5 | Newton-Raphson iterations |
| `TAG_W` | 1 | sideband width |

`OUT_F` must not exceed `RW + 1`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_complex_mult` | 2000 random and extreme operand pairs, plain and conjugate, against 64-bit integer products; 1-cycle latency |
| `tb_divisor_scaler` | zero, every single-bit and random divisors: leading-one position, normalised word, zero flag |
| `tb_nr_reciprocal` | 3000 divisors streamed back to back: within 4 LSB of 1/d, start value within 1/17, latency 6 |
| `tb_div_postscaler` | random numerators and divisors against floating point: 1 LSB, clipping, zero divisor |
| `tb_complex_divider` | 4096 back-to-back divisions against floating point: 1 LSB in range, clip and `sat` out of range, `dz`, order, latency 10 |
| `tb_sync_fifo` | random push/pop/clear traffic against a reference queue: head word, full, empty, ignored overflow and underflow |
| `tb_gain_lut` | fill and read-back, then random mixed traffic including same-word read-during-write (old data) |
| `tb_cgmp_predistorter` | end to end, at default parameters, against the behavioural amplifier model `tb/pa_model.sv` (see below) |

The amplifier model compresses as `r / (1 + 0.5 r^2)` and rotates by
`0.5 r^2 / (1 + r^2)` radians. The end-to-end test:

1. Sends a block of 1024 random samples (amplitude up to 0.5) once with
   adaptation off, then five times with it on.
2. Checks that the amplifier error `|y - x|^2` drops by more than 20 dB. In
   practice it drops -8.6 dB after pass 1 and -39.5 dB from pass 2 on.
3. Checks the 4-cycle and 11-cycle timings and the 256-cycle initialisation.
4. Cuts the feedback to overflow the FIFO, flushes it, and injects orphan
   feedback.

Every mechanism must be seen at least once: initialisation, predistortion,
update, skip, FIFO full and orphan feedback.

`tb_cgmp_workloads` measures spectral regrowth, which is what predistortion is
for. It builds three periodic 1024-sample signals from random QPSK symbols on
DFT bins, each scaled to a peak of 0.55:

- a wide OFDM-like band;
- two carriers, spaced like a two-carrier WCDMA signal;
- a narrow single carrier.

Each signal goes through a freshly reset predistorter and the amplifier
model. A DFT of the amplifier output gives the power in the neighbouring band
relative to the in-band power (adjacent-channel leakage). The test requires
at least 20 dB of improvement after five passes. Measured:

| Signal | Leakage without predistortion | After 5 passes |
|---|---|---|
| wide band | -37.1 dB | -66.6 dB |
| two carriers | -40.9 dB | -73.0 dB |
| narrow carrier | -32.4 dB | -66.7 dB |

The amplifier model has no memory. An amplifier with memory effects would
leave more residual leakage, because this predistorter corrects only the
static curves.

Running a testbench with plain Verilator (5.x), from the folder holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cgmp_pkg.sv rtl/*.sv tb/pa_model.sv tb/tb_cgmp_predistorter.sv \
    --top-module tb_cgmp_predistorter -Mdir obj_tb
./obj_tb/Vtb_cgmp_predistorter
```

For a block testbench, replace the last file and the top name, for example
`tb/tb_complex_divider.sv` and `tb_complex_divider`. Every file in `rtl/` also
lints under `verilator --lint-only -Wall` with no warnings other than
unused constants of the shared package.
