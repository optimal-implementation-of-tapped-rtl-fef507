# Tapped-delay-line time-to-digital converter for UltraScale-class FPGAs

This design measures the time between two digital edges, START and STOP, with a resolution of a
few picoseconds. It uses only ordinary FPGA logic: a 500 MHz clock (T_CLK = 2 ns) and carry
chains used as delay lines.

- **Coarse time:** a counter gives the time in whole clock periods.
- **Fine time:** within the period, each edge runs into a chain of CARRY8 carry primitives. A
  flip-flop behind every tap records how far the edge got before the next clock edge.
- **Calibration:** the taps are unequal, so each recorded position is turned into picoseconds
  through a calibration table. The table is built on chip by a statistical code density test.

Two configurations are built from the same RTL:

| Configuration | Lines per channel | Decoder | Notes |
|---|---|---|---|
| High precision (default) | 4 parallel lines (`NTDL = 4`) | `sum1s` (counts ones) | Simulated intervals show about 1 ps r.m.s. error. |
| Low area | 1 line (`NTDL = 1`) | `Log2` (finds the most significant one) | Parameter setting: `NTDL = 1`, `DECODER = DEC_LOG2`. |

The delay lines are **behavioural models**. Real carry chains can only be placed on a device, so
the model gives each tap a delay and each sampling flip-flop a clock skew. Everything after the
taps is synthesizable RTL.

## Block overview

```
           start_ext  stop_ext      clk1 --> hit_gen (internal START/STOP pairs)
                |        |                      |
                +---- mux (sel_internal) -------+
                |        |
   coarse_counter ---+---+-----------------+
                |    |                     |
         tdc_channel (START)        tdc_channel (STOP)
           4 x tdl_carry8             (same)
           tdl_sampler
           4 x decoder_sum1s | decoder_log2
           adder_tree
           calibrator
                |                          |
                +------ interval_meas -----+
                            |
                        histogram
```

| Module | Role |
|---|---|
| `tdc_pkg` | Decoder select enum, calibrator state enum, tree-depth function. |
| `tdl_carry8` | Behavioural model of a 60 × CARRY8 (480-tap) delay line, with tap dispersion, clock skew and the ultra-wide bin. |
| `tdl_sampler` | One flip-flop per tap on the TDC clock. Detects a new hit and latches the coarse count of the sampling edge. |
| `decoder_sum1s` | 512-input pipelined population count (9 stages). |
| `decoder_log2` | 512-input pipelined binary search for the highest one (9 stages). |
| `adder_tree` | Sums the decoded positions of the parallel lines in ⌈log2 NTDL⌉ pipelined stages. |
| `coarse_counter` | Free-running N_CC-bit counter on the TDC clock. |
| `calibrator` | Code density histogram, then the calibration table, then lookup of each code. |
| `tdc_channel` | One complete channel, from hit to timestamp. |
| `interval_meas` | Subtracts START from STOP timestamps (Nutt method). |
| `histogram` | Histogram of the intervals in RAM, 15.625 ps per bin. |
| `hit_gen` | START/STOP pulse generator on a clock unrelated to the TDC clock. Used for calibration and self-test. |
| `tdc_top` | Two channels, the shared counter, the input mux, interval measurement and the histogram. |

## The delay line and what it does to the code

A rising hit enters tap 0 and ripples upward. At the clock edge, the flip-flops hold a
*thermometer code*: ones up to where the edge has reached, zeros above. The default line has
60 CARRY8 blocks × 8 taps = 480 taps of about 5 ps each, so about 2.4 ns. That is more than one
clock period, so every hit is caught on some clock edge.

Three effects of the real silicon are built into `tdl_carry8`.

- **Dispersion.** Each tap delay is 5 ps ± 50 %. The value comes from a fixed hash of the tap
  index and a `SEED`, so each line and channel is different but repeatable.
- **Clock skew.**
  - Inside a CARRY8, the upper four flip-flops get the clock about 3 ps earlier than the lower four.
  - Along the column, the clock arrives about 1 ps later per CLB as you move away from the clock
    insertion point, which is placed near tap 240.
  - The model adds these skews to the arrival times. So the effective "time to reach tap k" is
    not monotonic in k, and the sampled code can contain **bubbles**: a zero below a one.
- **Ultra-wide bin.** Tap 241, where the line crosses the clock insertion point, is given about
  29 ps.

The model computes every tap's effective arrival time once, sorts the taps by it, and, on each
hit edge, sets them in that order with `#` delays. Behaviour is the same as one delay per tap. It
is much faster to simulate.

A hit must stay high longer than the line span plus one clock (the testbenches use 4 ns). A new
hit needs the line to have emptied first, so pulses on one channel must be at least about 9 ns
apart.

## Decoding: counting ones versus finding the top one

Each line's 480-bit code goes into a 512-input decoder. The top 32 inputs are tied low. Both
decoders are pipelined, one stage per bit of the 9-bit result, so they add 9 clocks.

- **`sum1s`** counts the ones in a pipelined adder tree. A bubble removes one from one place and
  adds it at another, so the count is hardly hurt by bubbles. Tap 0 always reads one after a hit
  and is left out of the count, so the result covers 0…511 in 9 bits.
- **`Log2`** narrows the position of the most significant one by halves: each stage keeps the
  upper or lower half of the remaining window and emits one result bit, MSB first. It is much
  smaller, but a bubble near the top makes it jump.

## Sub-interpolation with parallel lines

With `NTDL > 1`, a channel has several lines. They are fed from the same hit, each offset at its
input by τ/NTDL (1.25 ps for 4 lines). Their decoded positions are summed by `adder_tree`. The sum
behaves like one *virtual* line with NTDL times as many, narrower bins. It also averages out the
dispersion and bubbles of any single line.

The virtual code is `NB + ⌈log2 NTDL⌉` bits wide: 11 bits for 4 lines.

The input offset of the lines is this design's choice. On a device the lines sit in adjacent
columns and their offsets come from routing.

## Calibration by code density

Because taps differ, code *c* does not mean a fixed time. `calibrator` measures what each code
means.

1. **Accumulate.** After `cal_start`, it collects 2^`CAL_LOG2_HITS` (65536) hits that are
   uncorrelated with the clock. In `tdc_top` these come from `hit_gen` on its own clock `clk1`.
   It histograms their codes in a RAM. A hit uniformly spread over one clock period lands in code
   *c* with probability proportional to that bin's width. So width(c) = h[c] / N · T_CLK.
2. **Build.** It sweeps the codes in order and writes the running sum into a second RAM. That
   running sum is the calibration table, the time at which each code sits. The table entry is
   the *centre* of the bin:

   `CC[c] = (h[0] + … + h[c-1] + h[c]/2) / N · T_CLK`

   This gives unbiased timestamps. An inclusive running sum would shift every code by half a bin.
   The sweep also clears the histogram for the next calibration.
3. **Run.** Each code is looked up in one clock. The result is the fine time in units of
   T_CLK / 2^16 (about 30.5 fs).

The RAM update is a read-modify-write with a one-entry bypass, so back-to-back hits on the same
code are counted correctly. While the calibrator is not in `CAL_RUN`, it produces no timestamps.
`calibrated` says when the table is ready.

The counts are power-of-two, so the division is a shift. The table has 17-bit entries, enough for
a full period.

Memory per channel:

| Configuration | Histogram RAM | Table RAM |
|---|---|---|
| 4 lines | 2048 × 17 b | 2048 × 17 b |
| 1 line | 512 × 17 b | 512 × 17 b |

## Timestamps and the Nutt interval

The fine time measures how long *before* the sampling edge the hit arrived. Each channel
therefore outputs

`ts = coarse · 2^16 − fine`      (32 bits, unit T_CLK / 2^16)

Here `coarse` is the counter value of the sampling edge. `interval_meas` forms the interval as

`STOP − START = Tfine,START + (N_STOP − N_START) · T_CLK − Tfine,STOP`

with 32-bit signed arithmetic. The result stays right when the 16-bit coarse counter wraps, as
long as the interval is shorter than half the counter range (65 µs). Negative intervals (STOP
before START) are allowed.

Pairing rule: each channel's latest timestamp is held. When both are present, one interval comes
out one clock after the second of them, and both are consumed. A timestamp that waits
`MAX_WAIT` clocks (default 128, 256 ns) without a partner is dropped. Without that, a lone
timestamp would shift the pairing of every later event by one. A lone timestamp can happen, for
example, when one channel finishes calibrating a little before the other.

## Latency and throughput

| Stage | Clocks |
|---|---|
| Sampling | 1 |
| Decoder | 9 |
| Adder tree | ⌈log2 NTDL⌉ (2 for 4 lines) |
| Calibration lookup | 1 |
| Timestamp register | 1 |
| Interval | 1 more |

The channel timestamp comes NB + L + 3 clocks after the sampling edge: 14 clocks with 4 lines and
12 clocks with 1 line. Every stage accepts a new hit on every clock. The rate limit is the line
recovery time above.

## Histogram

`histogram` bins intervals as `(dt − offset) >>> 9`. That is T_CLK / 128 = 15.625 ps per bin,
with 6400 bins covering 100 ns. Intervals below or above the range go to the `underflow` and
`overflow` counters.

| Signal | Effect |
|---|---|
| `offset` | Sets where bin 0 starts, for example −2 ns to see negative intervals. |
| `clear` | Zeroes the RAM. `busy` is high while this runs; it also runs after reset. |
| `en` high | Counts intervals. |
| `en` low | The bins are read through `rd_addr` / `rd_data` with one clock of latency. |

## Internal generator

`hit_gen` runs on `clk1` and makes a START pulse every `period` cycles and a STOP pulse `delay`
cycles later, each `width` cycles long. `delay` must be less than `period`.

When `sel_internal` is high, these pulses replace the external inputs. They serve two uses:

- Because `clk1` is unrelated to the TDC clock, they are the random hits that calibration needs.
- They give known intervals for self-test.

The external inputs stand for the outputs of the input receivers, which are outside this RTL.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NTDL` | 4 | Parallel lines per channel. |
| `DECODER` | `DEC_SUM1S` | `DEC_SUM1S` or `DEC_LOG2`. |
| `NCLB` | 60 | CARRY8 blocks per line (480 taps). |
| `NB` | 9 | Decoder width (512 inputs). |
| `NCC` | 16 | Coarse counter bits. |
| `FRAC_W` | 16 | Fine bits per clock period. |
| `CAL_LOG2_HITS` | 16 | Calibration hits = 2^this. |
| `NBINS`, `BIN_SHIFT` | 6400, 9 | Histogram size and bin width. |
| `HG_W` | 16 | Generator counter width. |

The delay model's values (`TAU_PS`, `SPREAD`, `TS_PS`, `TN_PS`, `ULTRA_TAP`, `ULTRA_PS`) are
parameters of `tdl_carry8`.

## Where this design departs from the reference design and its limits

- **Delay lines are models.** The tap delays, skews and the 29 ps ultra-wide bin are typical
  values, not a measured device. On hardware, `tdl_carry8` must be replaced by placed CARRY8
  primitives with sampling flip-flops on the same clock region, and `tdl_sampler` keeps its role.
- **Calibration table at bin centres**, not the inclusive running sum. See above.
- **Calibration is run on request** (`cal_start`), not continuously. During calibration no
  timestamps come out.
- **Choices the reference leaves open:**
  - Hit detection (any line's first tap newly high).
  - The coarse counter width (16 bits).
  - The timestamp fraction (16 bits).
  - The calibration hit count (65536).
  - The input offsets of the parallel lines.
  - The pairing rule for intervals.
  - The histogram's internals.
  - The generator.
- **Two channels only.** The reference fits 24 (high precision) or 64 (low area) channels on a
  device; placement and resource use are not evaluated here.
- **No timing closure.** 500 MHz is assumed; the pipelines follow the reference stage counts.
- Three known lint warnings remain and are explained in the module headers:
  - unused upper bits of the calibrator's scaled sum;
  - the unread one-bit window of the last `decoder_log2` stage;
  - the reset net used both by flops and by an assertion's `disable iff`.

## Simulating

Every file uses `` `timescale 1ps/1fs ``. Compile the package first and let verilator find the
other modules in `rtl/`:

```
verilator --binary --timing --assert rtl/tdc_pkg.sv tb/tb_tdc_top.sv -y rtl -y tb --top-module tb_tdc_top
./obj_dir/Vtb_tdc_top
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_tdc_top` | The full design at its defaults (about 2–3 minutes). |
| `tb_tdc_top_log2` | The low-area configuration. |

Both end-to-end testbenches:

1. Calibrate from the internal generator.
2. Measure 400 internal intervals (about 9.4 ns) and check them against the histogram.
3. Switch to the external inputs for a set of intervals, checked against their true values:
   - −1.9 ns up to 120 ns;
   - one across a coarse-counter wrap;
   - histogram overflow and underflow.

They count every mechanism (calibrations, both modes, the mode switch, negative intervals,
counter wrap, overflow, underflow, bubbled codes) and fail if one never happens.

Typical results at the defaults:

| Measurement | r.m.s. error |
|---|---|
| Internal intervals, 4 lines + sum1s | about 1 ps |
| External intervals, 4 lines + sum1s | about 1 ps |
| Internal / external, 1 line + Log2 | about 3 ps / 2.5 ps |

Each block has its own testbench (`tb_<module>.sv`), at reduced sizes where that keeps it short.
`tb_tdc_channel` checks a two-line channel's timestamps against the model's true hit times.
