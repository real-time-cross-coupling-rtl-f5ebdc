# Cross-coupling removal and virtual-probe monitoring for a multi-cavity RF station

A low-level RF (LLRF) controller that drives several superconducting cavities
from one klystron measures, for every cavity, the **Forward** wave sent into
it, the **Reflected** wave coming back and the **Probe** signal picked up
inside it. Because directional couplers have finite directivity and the
digitizer channels have finite isolation, every measured signal is a small
linear mixture of the others: Forward leaks into Reflected at around -40 dB
inside a coupler, and neighbouring ADC channels leak into each other at
-70 dB to -120 dB.

This RTL removes that mixing in real time and uses the cleaned signals to
watch the cavities:

1. **`mvx`** multiplies the vector of measured samples by a correction
   matrix. For eight cavities the vector holds 8 × (Forward, Reflected) ×
   (I, Q) = 32 real samples, and the matrix is 32 × 32. The matrix comes
   from a separate system-identification step and is written in through a
   register port.
2. **`virtual_probe`** rebuilds, for each cavity, the probe signal that the
   corrected Forward and Reflected waves imply.
3. **`anomaly_det`** compares this virtual probe with the measured probe and
   flags cavities where they disagree, which points to a fault in the
   cavity, the coupler or the measurement chain.

```
 fwd_m, refl_m ──► mvx (32×32) ──┬──► fwd_c, refl_c   (corrected, to the controller)
   (8 × I/Q each)                └──► virtual_probe ──► probe_v
                                                          │
 probe_m ──► sync_fifo (waits for its sample) ──► anomaly_det ──► anomaly, alarm, err
```

## Number formats and vector order

All shared definitions are in `rtl/cc_pkg.sv`.

| item | format |
|---|---|
| sample (`sample_t`) | signed 16-bit integer |
| coefficient (`coef_t`) | signed 32-bit, 30 fractional bits (Q2.30, range ±2, 1.0 = `2**30`) |
| complex sample / coefficient | packed struct `{i, q}` (`iq_t`, `ciq_t`) |
| results | rounded half-up at 30 fractional bits, saturated to 16 bits |

The 30 fractional bits resolve couplings far below the -120 dB seen on real
hardware. Inside `mvx` the 32 samples are ordered per cavity: element `4k+0`
is Forward I of cavity k, `4k+1` is Forward Q, `4k+2` is Reflected I and
`4k+3` is Reflected Q. The coupling among one cavity's four signals is
therefore a 4 × 4 block on the diagonal of the matrix. The top level takes
and returns per-cavity arrays and does this packing itself. Matrix entry
`(row, col)` maps input element `col` onto output element `row`.

For complex (I/Q) crosstalk, a complex coupling c = cr + j·ci from signal m
to signal n fills the 2 × 2 real block
`[[cr, -ci], [ci, cr]]` at rows (nI, nQ) and columns (mI, mQ).

## The matrix unit: `mvx`

This is the part that needs the most explanation. One vector takes
`N/UNROLL` clock cycles. In each cycle the unit handles `UNROLL` columns of
the matrix for all 32 rows at once, so it uses `32·UNROLL` multipliers of
16 × 32 bits. Each multiplier fits in two 25 × 18 DSP slices.

| UNROLL | multipliers | cycles per vector | input to output handshake |
|---|---|---|---|
| 1 (default) | 32 | 32 | 36 cycles |
| 2 | 64 | 16 | 20 cycles |
| 4 | 128 | 8 | 12 cycles |

The first two columns follow from the unroll factor. The last column is
what this pipeline does; an HLS build of the same function was reported at
59, 43 and 35 cycles of 6.1 ns.

How a vector moves through the unit:

* **Input buffer.** A vector is accepted into a one-entry buffer
  (`in_valid`/`in_ready`). The engine takes it as soon as it finishes the
  previous vector, so the next vector can already wait while the current
  one is computed. Back-to-back vectors therefore leave every `N/UNROLL`
  cycles, with no gap.
* **Coefficient memory.** The matrix is stored as `N/UNROLL` words, one per
  column group `g`. Word `g` holds `C[r][g·UNROLL+u]` at position
  `r·UNROLL+u`. The engine reads one whole word per cycle, which feeds every
  multiplier. A coefficient write changes one position of one word. The
  memory is **not reset**, so the full matrix must be written after
  power-up.
* **Input vector.** The working copy of the vector shifts down by `UNROLL`
  samples per cycle, so the samples of the current column group are always
  at the bottom. No wide multiplexer is needed.
* **Pipeline.** Stage 0 addresses the memory and shifts the vector. Stage 1
  holds the coefficient word and `UNROLL` samples. Stage 2 holds the
  `32·UNROLL` products. Stage 3 adds them into 32 accumulators of 54 bits,
  which are cleared on the first group of each vector. After the last
  group, the 32 sums are rounded, saturated and loaded into the output
  register.
* **Back-pressure.** The output register holds its vector until
  `out_ready`. The pipeline stops only when a finished vector is waiting
  for a full output register. An assertion checks that a waiting output
  stays stable.

Change the matrix only while no vector is in flight. A write takes effect
on the next cycle, so a vector already being computed could mix old and new
coefficients.

## The virtual probe: `virtual_probe`

For cavity k:

```
P[k] = a[k]·F[k] + b[k]·R[k]            (complex)
P_I  = aI·FI − aQ·FQ + bI·RI − bQ·RQ
P_Q  = aI·FQ + aQ·FI + bI·RQ + bQ·RI
```

The field the probe sees is the sum of the calibrated Forward and Reflected
waves. Reset loads `a = b = 1`, so P = F + R until other weights are
written. The complex weights `a`, `b` absorb the probe channel's own gain
and phase. This weighted sum is this design's reading of "probe computed
from the corrected Forward and Reflected signals". The source gives no
formula, so check it against your own calibration model.

The 16 real outputs are produced `UNROLL` per cycle, each from four
multiplications. That gives 16, 8 or 4 cycles per vector for UNROLL = 1, 2
or 4, with handshake-to-handshake latencies of 19, 11 and 7 cycles. The
input buffer, output register and stall rule are the same as in `mvx`.
Weights are written per cavity with `coef_sel` = 0 for `a` and 1 for `b`.

## Monitoring: `anomaly_det` and the probe FIFO

For each cavity the detector computes the L1 distance
`err = |Pm_I − Pv_I| + |Pm_Q − Pv_Q|`, which needs no multipliers, and
compares it with `threshold`. The outputs are:

* `anomaly[k]`: this sample is off;
* `alarm[k]`: sticky, set by any anomaly and cleared by `alarm_clear`;
* `anomaly_cnt`: a saturating count of anomalous samples, also cleared by
  `alarm_clear`;
* `err[k]`: the distance itself, for logging.

Results appear one cycle after the input. The unit accepts a sample every
cycle.

The metric, the threshold rule and the sticky alarm are this design's
choices. The source only says that the measured and virtual probes are
compared. A magnitude-and-phase test or a filtered error can replace
`anomaly_det` without touching the rest of the design.

The measured probe has to be compared with the virtual probe of the **same**
RF sample. That virtual probe emerges about 55 cycles after the sample
entered. The top level therefore pushes `probe_m` into `sync_fifo` when the
sample is accepted and pops it when the matching virtual probe appears.
Both arithmetic units keep vectors in order, so the head of the FIFO always
matches. `in_ready` also drops while the FIFO is full, and an assertion
checks that it never runs dry.

## Top level: `cc_monitor_top`

| port group | meaning |
|---|---|
| `in_valid`, `in_ready`, `fwd_m`, `refl_m`, `probe_m` | one RF sample of all 8 cavities |
| `mvx_coef_we/row/col/wdata` | write one matrix entry (vector order above) |
| `vp_coef_we/cav/sel/wdata` | write weight `a` (sel=0) or `b` (sel=1) of one cavity |
| `threshold`, `alarm_clear` | anomaly detector control |
| `corr_valid`, `fwd_c`, `refl_c` | corrected signals, one-cycle strobe |
| `probe_v_valid`, `probe_v` | virtual probe, one-cycle strobe |
| `mon_valid`, `err`, `anomaly`, `alarm`, `anomaly_cnt` | monitoring results |

Parameters: `UNROLL_MVX` (1, 2 or 4; default 1), `UNROLL_VP` (1, 2 or 4;
default 1) and `FIFO_DEPTH` (default 8). With the defaults, a sample is
accepted every 32 cycles. The corrected signals appear 35 cycles after
acceptance and the monitoring result 56 cycles after. At a 6.1 ns clock
that is about 210 ns and 340 ns.

The corrected-signal outputs cannot push back: they are a copy of what
enters the virtual probe. The virtual probe's output is always accepted by
the detector.

All resets are asynchronous and active low (`rst_n`). They clear the control
state and load the virtual-probe weights. They do not load the correction
matrix.

## What is outside this RTL

* **The digitizer (ADC board).** It delivers the 16-bit I/Q samples on the
  `*_m` ports. Down-conversion to I/Q is assumed to happen before this
  design.
* **System identification and drift compensation.** These produce the
  correction matrix and write it through `mvx_coef_*`. The matrix values
  themselves are not part of the RTL.
* **Register access.** The coefficient write ports are plain strobes. Wrap
  them in the bus interface your system uses (AXI-Lite, for example).
* **The RF hardware** (klystron, waveguides, couplers, cavities).
* **More than eight cavities.** One instance serves the eight cavities of
  one cryomodule, which is what one digitizer samples. A station of 32
  cavities in four cryomodules uses four instances. Coupling between
  cryomodules is small enough to ignore, so the instances need no cross
  terms.

## Departures and open points

* The choice of default unroll factor (1) is this design's own. Use 2 or 4
  where latency matters more than multipliers.
* The original units are HLS blocks whose port protocol is unknown. The
  valid/ready vector handshake used here is this design's own.
* Sample width (16 bits) and coefficient format (Q2.30) are this design's
  choices.
* The correction matrix is not reset, as explained above.
* The multiplier counts line up with the DSP figures reported for the HLS
  versions (64, 128 and 256 DSP slices for the matrix unit and 8, 16 and
  32 for the virtual probe at unroll 1, 2 and 4), assuming two 25 × 18
  slices per 16 × 32 multiplier. Flip-flop and LUT use has not been
  compared.
* Timing closure at 6.1 ns (164 MHz) has not been checked. The product
  registers and the 32 accumulators are the critical paths. More pipelining
  of the accumulate stage is the first thing to add if timing fails.

## Simulation

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cc_pkg.sv rtl/mvx.sv \
    tb/mvx_tb_unit.sv tb/tb_mvx.sv --top-module tb_mvx -o sim && obj_dir/sim
```

| testbench | files besides `rtl/cc_pkg.sv` | what it covers |
|---|---|---|
| `tb_mvx` | `rtl/mvx.sv`, `tb/mvx_tb_unit.sv` | UNROLL 1, 2 and 4 side by side: identity, crosstalk-shaped and full-range matrices; exact comparison with a 64-bit reference; latency, rate, saturation, back-pressure |
| `tb_virtual_probe` | `rtl/virtual_probe.sv`, `tb/vp_tb_unit.sv` | UNROLL 1, 2 and 4: unit weights, calibration-like and full-range weights; latency, rate, saturation, back-pressure |
| `tb_anomaly_det` | `rtl/anomaly_det.sv` | random and extreme probe pairs, threshold changes, sticky alarms, counter and its saturation, clear |
| `tb_cc_monitor_top` | all of `rtl/` | the whole chain at default parameters: a realistic matrix is loaded, samples are streamed back to back with injected probe faults, and corrected signals, virtual probe, flags, rate and latency are checked; it counts input stalls, anomalies, alarm clears, saturation and matrix reloads, and fails if any never happened |
| `tb_cc_pulse` | all of `rtl/` | one RF pulse of all eight cavities (filling, flat top, decay; 96 samples) mixed through a known coupling matrix with -40 dB Forward/Reflected leakage and -80 dB crosstalk; the inverse is loaded and every corrected sample must be within 2 steps of the true one (measured samples are off by over 100 steps); virtual probe, no false alarms and rate are checked too |
| `tb_cc_monitor_unroll4` | all of `rtl/` | the same sequence with both units unrolled four times (one sample per 8 cycles, 20-cycle monitoring latency) |

All testbenches drive inputs at the falling clock edge. Every simulation
runs in about a second or less.
