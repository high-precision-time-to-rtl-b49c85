# Time-interval-averaging TDCs for phase-modulator calibration

An outphasing transmitter builds its RF output from two phase-modulated
carriers. Each phase modulator (PM) is a digitally controlled delay line. At a
32 GHz carrier with 7-bit phase resolution, one PM step is 244 fs. To calibrate
and linearise such a PM, you have to measure its delay to a few femtoseconds.
Calibration has plenty of time, so the measurement can repeat the same delay
millions of times and average the results. This is **time interval averaging
(TIA)**. With TIA, a converter built from ordinary standard cells, with a coarse
quantization step, reaches sub-step accuracy. The trick is to keep the
quantization grid moving relative to the signal, so that the quantization
error averages out instead of repeating.

The delay to measure, `T_d`, lies between a START edge (the local-oscillator
rising edge) and a STOP edge (the PM output). The edge pair repeats every
`T_S = 4 ns`. The quantization step `T_Q` comes from a free-running ring
oscillator (RO). `T_Q/T_S` is set to an irrational number, a multiple of π, so
the RO edges never fall at the same place in the sampling period twice.

This repository holds synthesizable RTL for two TIA converters, plus
behavioural models of their ring oscillators:

| converter | module | quantization step | principle |
|---|---|---|---|
| **large-T_Q** (the one intended for silicon) | `tdc_large_tq` | `T_Q = π·T_S ≈ 12.57 ns`, longer than the delay itself | count slow RO edges that fall inside the delay pulse, normalise by all RO edges |
| small-T_Q | `tdc_small_tq` | `T_Q = T_S/(45π) ≈ 28.3 ps`, one inverter delay | snapshot a multi-phase RO at START and at STOP, subtract, accumulate |

`tia_tdc_top` places both converters side by side on one START/STOP pair,
together with their oscillator models.

## The large-T_Q converter: counting instead of timing

This converter is the less intuitive of the two. Its quantization step is about
three times the **sampling period** and about twelve times the largest delay it
measures (1.032 ns). A single sample therefore says almost nothing. The
information is in the statistics:

1. `interval_pulse` turns each START→STOP pair into a pulse of width `T_d`,
   once per `T_S`.
2. A **measurement counter** clocked by the slow RO counts only while the pulse
   is high. Over `N` periods it collects `C_meas ≈ N·T_d/T_Q` counts, because
   the RO edges land uniformly across the sampling period.
3. A **reference counter** on the same RO clock counts during the whole window
   of `N·T_S`, giving `C_ref = N·T_S/T_Q`.
4. Their ratio gives `T_d,avg = (C_meas/C_ref)·T_S`. `T_Q` cancels, so the
   estimate depends only on `T_S`, not on the oscillator frequency or its PVT
   drift.

The counters accumulate by themselves, so no adder or accumulator is needed.
The whole datapath is two 31-bit counters.

### Clock domains and the measurement sequence

There are three unrelated timing sources: START, STOP and the RO. The design
handles them as follows:

* **START domain**: `window_ctrl` and `ratio_divider` run on START. The
  user's `go` and `n_samples` inputs are synchronous to START.
* **Pulse logic**: `interval_pulse` has one flop on START that toggles when the
  period is armed, and one flop on STOP that copies it. The pulse is their XOR,
  so there are no gated clocks and no asynchronous clears.
* **RO domain**: the pulse, the window and the clear each pass through a
  2-flop `enable_sync` clocked by the RO before they reach the counters. The
  flop stages reduce metastability at the counter enables. Because the
  measurement and reference enables see the same re-timing, `C_meas ≤ C_ref`
  always holds.
* **Reading the counters back**: `window_ctrl` waits `SETTLE_CYCLES` START
  periods after the window closes, so the counters have stopped. Only then does
  the START-domain divider read them. The 31-bit buses are quasi-static at that
  point and need no synchroniser. `SETTLE_CYCLES` (and `CLEAR_CYCLES` for the
  clear) must cover `SYNC_STAGES + 1` RO periods. The default of 16 periods
  (64 ns) covers 3 × 12.57 ns.

One measurement runs as follows:

```
go ─┐ sampled at START edge g
    CLEAR  (CLEAR_CYCLES = 16 periods; counters zeroed in the RO domain)
    WINDOW (exactly N periods; arm → N pulses, window → reference enable)
    SETTLE (SETTLE_CYCLES = 16 periods; enables drain, counters stop)
    DIVIDE (33 cycles, one quotient bit per START period)
    DONE   done = 1 at edge g + 16 + N + 16 + 32 + 2; results held until next go
```

Outputs:

* `c_meas` and `c_ref`: the raw counts.
* `ratio`: `C_meas/C_ref` in unsigned Q1.32, so 1.0 means a delay of one whole
  `T_S`. The estimate in seconds is `ratio · T_S / 2^32`.
* At `T_S = 4 ns`, one LSB of `ratio` is 0.93 fs.

### How accurate it is, and why not arbitrarily

One count of `C_meas` is worth `T_Q/N`:

| N | one count |
|---|---|
| 2^24 | 0.75 fs |
| 2^28 | 0.05 fs |

The residual error comes from how evenly the RO edges spread across `T_S`.
π is very close to 355/113. So 113 RO periods are within 3·10⁻⁵·`T_S`
(120 fs) of 355 sampling periods. The edges therefore fall in near-repeating
groups of 113, spaced 35 ps apart, and the groups drift slowly across the
sampling period. Until the drift has covered a whole 35 ps cell (about 295
groups, 33 000 RO edges), and again for the last partial cell, `C_meas` can be
off by a few tens of counts. In simulation at N = 2^24:

* errors of 15–30 fs at about 1 ns delays, which is within 64 counts;
* steps of one PM LSB (244 fs) resolved in the right order.

The N = 2^28 case of the original evaluation (about 1.07 s of signal per point)
was not simulated.

## The small-T_Q converter: snapshots of a fast ring

A ring of `N_OSC` inverters (15 here, which is odd) passes through
`2·N_OSC = 30` states per period. Successive states are one inverter delay
`T_Q` apart. At each START edge and each STOP edge, `edge_capture` registers
record two values:

* the inverter outputs, i.e. the fine phase;
* a counter of whole RO periods, clocked by tap 0 (the coarse count).

`ro_state_encoder` turns each tap snapshot into a phase from 0 to 29. It
inverts the odd taps, which makes the ring state a run of ones that grows and
then shrinks. The phase is then taken from the **number** of ones, with tap 0
telling the rising half from the falling half. A single bubble (one
flip-flop resolving the wrong way) therefore moves the phase by at most one
step.

Phase 0 is aligned with the rising edge of tap 0, which is the edge that
advances the coarse counter. The fine phase and the coarse count therefore wrap
together, and `sample_combiner` can apply

```
C_d = 2·N_OSC·(C_STOP − C_START mod 2^8) + (F_STOP − F_START)
```

directly, without correction. `tia_accumulator` then adds `N` such samples,
one per START period, into `C_total`. The caller computes
`T_d,avg = C_total/N · T_Q`. The coarse counter is 8 bits, so delays up to 256
RO periods (217 ns) are unambiguous.

Timing of one measurement:

* A sample opened at START edge k is added at edge k+1, after STOP k has been
  captured.
* `done` rises N + 3 START periods after `go` is sampled.

## Files

`rtl/`:

| file | role |
|---|---|
| `tdc_pkg.sv` | shared widths (`COUNT_W = 31`, `NSAMP_W = 31`) and the measurement-state enum |
| `tdc_large_tq.sv` | large-T_Q converter: `window_ctrl`, `interval_pulse`, 3 × `enable_sync`, 2 × `tia_counter`, `ratio_divider` |
| `tdc_small_tq.sv` | small-T_Q converter: `tia_counter`, 4 × `edge_capture`, 2 × `ro_state_encoder`, `sample_combiner`, `tia_accumulator`, `window_ctrl` |
| `window_ctrl.sv` | START-domain sequencer (clear / window of N periods / settle / post-processing / done) |
| `interval_pulse.sv` | START/STOP → `T_d` pulse (toggle pair) |
| `enable_sync.sv` | RO-clocked re-timing flops |
| `tia_counter.sv` | RO-clocked counter with clear and enable |
| `ratio_divider.sv` | restoring divider, Q1.32 result |
| `edge_capture.sv`, `ro_state_encoder.sv`, `sample_combiner.sv`, `tia_accumulator.sv` | small-T_Q datapath |
| `ring_osc_single_tap.sv` | **behavioural** slow RO (period π·4 ns). Edge times are kept in real arithmetic and rounded to 1 fs, so the average ratio stays irrational. Optional accumulating jitter via `JITTER_FS` |
| `ring_osc_multiphase.sv` | **behavioural** fast RO, all taps visible, 28294 fs per inverter, optional jitter |
| `tia_tdc_top.sv` | both converters and both oscillator models (simulation top) |

All files use `` `timescale 1fs/1fs ``. The oscillator models need
femtosecond time steps.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_tia_tdc_top.sv`: end to end at default parameters.
  * Four delays (87.6 ps, 244 ps, 500 ps, 1.032 ns), both converters
    concurrently, N = 8192.
  * Exact latency checks.
  * Exact `ratio` arithmetic checks.
  * Estimates against the true delay.
  * Counts of the mechanisms exercised: counts while the pulse is enabled,
    clears between measurements, coarse-counter carries and wraps, negative fine
    differences.
* `tb_tdc_small_tq.sv`: checks `C_total` **exactly**. It works the expected
  value out from the edge times alone (`Σ floor(t_stop/T_Q) − floor(t_start/T_Q)`).
* `tb_delay_sweep_large_tq.sv`: the delay-step sweep at N = 2^24. It runs about
  80 s.
* `tb_jitter_convergence.sv`: both converters under jitter, at N = 2^6, 2^10,
  2^14 and 2^18.
  * START carries 5 ps Gaussian sampling jitter.
  * Both oscillators carry 0.5 ps of accumulating jitter.
  * Each error is checked against a bound of a few counts plus six standard
    deviations of the random part.
  * Typical errors at 2^18: about 0.02–1 ps (large-T_Q) and 10–20 fs
    (small-T_Q).

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdc_pkg.sv tb/tb_tia_tdc_top.sv \
          --top-module tb_tia_tdc_top -Mdir obj_top -o sim && obj_top/sim
```

Replace the testbench name to run any other testbench. Expect some warnings:

* `ZERODLY` on the oscillator models (their delays are computed at run time);
* `PROCASSINIT` on the oscillator models' ideal-time variable, which is
  initialised at declaration and then advanced by the model;
* `SYNCASYNCNET` on `rst_n`, which is used both as an asynchronous reset and in
  an assertion's `disable iff`;
* `UNUSEDSIGNAL` on status outputs that a parent leaves open (the divider's
  `busy`, the small converter's `arm`/`post_start`) and on the divider's
  internal quotient MSB, which is shifted out;
* `UNUSEDPARAM` for package constants that a given module does not use.

None of them affects the result. Runtimes:

* The fast 28 ps ring dominates any simulation that contains it:
  `tb_tia_tdc_top` runs about 130 µs of signal per second.
* Simulations with only the slow ring run about 2.5 ms of signal per second.

## Choices of this implementation

The converter architectures, the equations, `T_S = 4 ns`, the two `T_Q`
values, the 31-bit counters and the RO-clocked re-timing of the enable all
follow the published description. The following are this design's own choices:

* **Control**:
  * `window_ctrl` and its clear/settle phases;
  * the `go`/`done` handshake;
  * `N` as a 31-bit run-time input, so 2^28 fits;
  * `n_samples = 0` treated as 1;
  * `go` assumed synchronous to START.
* **Pulse circuit**: the toggle-pair pulse generator, and the `arm` gating that
  puts exactly N pulses in the window. It requires `0 < T_d < T_S`.
* **Synchroniser depth**: 2 flops.
* **Ratio**: done on chip with 32 fraction bits. The result saturates to 1.0
  when `C_meas ≥ C_ref` and is 0 for `C_ref = 0`.
* **Small-T_Q sizes**: `N_OSC = 15`, an 8-bit coarse counter and a 48-bit
  accumulator. The ones-counting bubble-tolerant encoder stands in for an
  unspecified error-mitigating encoder.
* **Reset**: an active-low asynchronous `rst_n` on every flop.

### Known departures and limits

* **No static-delay removal**: no fixed offset is removed. Calibration is
  expected to use differences between PM codes, which cancel any static delay.
* **Overflow limit**: the 31-bit reference counter would overflow after
  2^31·12.57 ns ≈ 27 s. The 31-bit sample count, however, limits one window to
  2^31−1 periods, about 8.6 s.
* **Ratio resolution**: 0.93 fs per LSB. This is coarser than the best
  sub-femtosecond averages, which at N = 2^28 are about one LSB.
* **Oscillator models**: timing only. Jitter can be switched on through
  `JITTER_FS`, but sampling jitter on START/STOP is left to the testbench.
* **Coherence of the small-T_Q snapshot**: the counter and the tap snapshot
  are assumed coherent when an edge lands exactly on an RO transition. The
  testbenches avoid exact coincidences. Silicon would need the coherence logic
  of a real multiphase TDC.
* **Not modelled**: the PM and the rest of the transmitter (signal component
  separator, PAs, LO). A testbench stands in for them with a START/STOP source
  of chosen delay.
