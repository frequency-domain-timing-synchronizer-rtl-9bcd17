# Frequency-domain timing synchronizer for MIMO-OFDM with a multiphase ADC clock

A receiver whose ADC clock runs at a slightly different rate from the
transmitter's sees its sampling instant drift through the packet. With offsets
as large as several percent, that drift crosses a whole sample within a few
OFDM symbols. This design keeps the sampling instant in place without
resampling the data. The ADC is clocked by one of `M` (32) equally spaced phases
of its clock, and the synchronizer chooses that phase sample by sample.

Everything the synchronizer needs is measured on the first six short training
preambles of a packet, after the FFT:

* **Clock offset (SCO).** Compare the same subcarrier in two preambles. A
  sampling delay that grows by `delta·m·N` samples over `m` preambles rotates
  bin `k` by `2π·k·delta·m`. The phase difference is therefore a straight line
  in `k`, and its slope divided by `2π·m` is the offset `delta`.
* **Sampling phase.** The total preamble power `TD = Σ|R_k|²` depends on where
  inside the sample period the ADC samples. Measuring TD at the current phase
  and at a quarter period before and after it tells which eighth of the period
  the error lies in.
* **Compensation.** A phase translator accumulates `n·delta·M` clock phases as
  the samples go by. The phase control subtracts this from the sum of the
  one-off phase steps and drives the clock's phase multiplexer.

All four receive antennas are processed in parallel by identical calculators,
and their results are averaged.

## Number formats

| Quantity | Format |
|---|---|
| FFT bin | `DW` = 12-bit signed real and imaginary parts |
| Angle | 16-bit binary angle: 65536 counts = 2π |
| Slope | angle counts per subcarrier, 4 fraction bits |
| Clock offset `delta` | 24-bit signed, units of 2^-20 (1 count ≈ 0.95 ppm) |
| Phase command and steps | 16-bit signed, units of one clock phase (1/`M` sample) |

A sampling delay of `p` clock phases rotates bin `k` of an `N`-point FFT by
`2π·k·p/(M·N)`. With `N = 16` and `M = 32`, that is `k·p·128` angle counts.

## Clock offset estimator (`sco_estimator`)

Per antenna, for one pair of preambles `l` and `l+m`:

1. **Buffer.** `fft_data_buffer` holds the earlier preamble in one of two
   banks. As the later preamble streams in, the bin with the same index is read
   back.
2. **Conjugate product.** `conj_mult` forms `R_{l+m,k}·conj(R_{l,k})`.
3. **Arctangent.** `cordic_atan`, a 14-stage vectoring CORDIC, turns the
   product into an angle.
4. **Known step removed.** If the controller moved the sampling phase by `h`
   clock phases between the two preambles, `k·h·2^16/(M·N)` is subtracted
   from the angle of subcarrier `k`.
5. **Majority rule.** `subcarrier_majority` handles subcarriers −1..−6 and
   +1..+6 as two groups. Within a group every angle should have the same sign,
   so the entries of the minority sign are dropped. A tie drops nothing.
6. **Least-squares fit with outlier rejection.** `ls_slope` fits
   `y = s·k + b` to the kept points. It then drops every point whose vertical
   distance from the line exceeds π/4 and fits again. The fit has an intercept
   because a phase common to all subcarriers (carrier offset, channel) must not
   bias the slope.
7. **Scaling.** The slope, divided by `m` (a shift), is `delta` in 2^-20 units.
   With `N·2^16` angle counts per turn, that scaling is exact.

The fit uses a shared sequential divider (`seq_div`) for its three divisions.
An estimate is ready about 190 clocks after the last bin of the preamble.
The subcarriers used are ±1..±6 of the 16-point FFT, where a short preamble
has its energy.

At +40000 ppm the largest phase difference (subcarrier 6, `m = 2`) is
0.96·π. Angles therefore do not wrap over the whole range from −30000 to
+40000 ppm.

## Sampling-phase acquisition (`autocorr_td`, `sampling_phase_acq`)

`autocorr_td` sums `Re² + Im²` over all bins of a preamble. The controller
samples three preambles:

* preamble 4 at the phase to be estimated, `eps`, giving `TD(eps)`;
* preamble 5 a quarter period earlier, giving `TD(eps−M/4)`;
* preamble 6 a quarter period later, giving `TD(eps+M/4)`.

Then:

```
dir1 = TD(eps) − TD(eps−M/4)
dir2 = TD(eps) − TD(eps+M/4)
```

TD peaks when the phase error is zero and repeats every sample. The signs of
`dir1` and `dir2` pick one of four quarter-periods, and comparing `|dir1|`
with `|dir2|` splits each quarter in two (`decision_region`):

| sign dir1 | sign dir2 | \|dir1\| < \|dir2\| | otherwise |
|---|---|---|---|
| − | − | region 0 (−π..−3π/4) | region 7 (3π/4..π) |
| + | − | region 1 (−3π/4..−π/2) | region 2 (−π/2..−π/4) |
| + | + | region 4 (0..π/4) | region 3 (−π/4..0) |
| − | + | region 5 (π/4..π/2) | region 6 (π/2..3π/4) |

A zero difference counts as positive. `phase_mapping` returns the centre of
the region, `(2r−7)·M/16` clock phases: −14, −10, … +14 for `M = 32`. The
error left after acquisition is nominally ±M/16 = ±2 phases.

The ±2 phases assume borders exactly at multiples of π/4. That holds only if
TD falls off linearly with the sampling error. With a different TD curve the
borders that the `|dir1| = |dir2|` rule draws move. In the test model, TD is
the square of a cos²-shaped amplitude. There the borders between regions 1/2
and 5/6 sit at ∓7 phases instead of ∓8, so acquisition alone can leave up to
3 phases of error.

## The six-preamble schedule (`sync_controller`)

| Preamble | Used for | Action afterwards |
|---|---|---|
| 1 | stored (bank 0) | – |
| 2 | paired with 1, `m = 1` → SCO1 | SCO1 loaded into the phase translator |
| 3 | stored (bank 1) | – |
| 4 | paired with 3 → SCO3 (residual); TD(eps) | step `M1 = round(−M/4 − d3)` |
| 5 | paired with 3, `m = 2`, step `M1` removed → SCO2; TD(eps−M/4) | step `M2 − M1` with `M2 = round(M/4 − 2·d3)` |
| 6 | TD(eps+M/4) → region and estimated phase | step `−M2 − phase2`; rate becomes SCO1 + SCO2 |

In this table:

* `d3 = SCO3·N·M` is the drift, in clock phases, that the residual offset
  causes over one preamble. `M1` and `M2` include it, so preambles 5 and 6 are
  really sampled a quarter period before and after preamble 4.
* `phase2 = est + 3·SCO2·N·M`. It adds the residual drift from preamble 4 to
  the end of preamble 6 to the estimated error. The last step removes both
  that and the `M2` offset.
* Steps are rounded to whole clock phases.

After that, `adcm_phase` holds still on average, except for the drift the
translator follows. `sync_done` stays high until the next `pkt_start`, and
`sco_total` and `est_phase` hold the final estimates.

## Compensation (`phase_translator`, `phase_ctrl`)

`phase_translator` adds `delta·M` to an accumulator on every `sample_tick`.
Its output `sco_phase` is the accumulator rounded to whole phases. Loading a
new rate keeps the phase already accumulated.

`phase_ctrl` keeps the sum of the steps and outputs:

* `adcm_phase = steps − sco_phase`, unwrapped;
* `adcm_sel = adcm_phase mod M`.

When the command passes a whole sample, the ADC side has to drop or repeat one
sample. That is not part of this design.

## Antenna averaging (`ant_calc`, `antenna_combiner`)

`ant_calc` is one antenna's calculator set: buffer, SCO estimator, TD
accumulator and phase acquisition. All the antennas receive the same command
word (`ant_ctrl_t`) from the controller.

`antenna_combiner` waits until every antenna has reported. It then outputs the
arithmetic mean, rounded half away from zero. One combiner is used for the SCO
and one for the phase.

## Interface and timing of the top (`fd_timing_sync`)

| Port | Direction | Meaning |
|---|---|---|
| `pkt_start` | in | pulse before preamble 1 |
| `bin_valid`, `bin_idx`, `bin_re[a]`, `bin_im[a]` | in | one FFT bin per clock for all antennas, bins 0..N−1 in order |
| `sample_tick` | in | one pulse per ADC sample, for the translator |
| `ready` | out | the next preamble may start |
| `adcm_phase`, `adcm_sel` | out | phase command |
| `sync_done`, `sco_total`, `est_phase`, `region_ant0` | out | results |
| `ev_majority`, `ev_reject`, `ev_step`, `ev_rate_load` | out | event pulses for observation |

**The main departure from a streaming receiver.** A preamble is 16 samples,
but an estimate takes about 190 clocks. `ready` therefore drops:

* after preamble 2, until SCO1 is loaded;
* after preamble 4, until `M1` is issued;
* after preamble 5, until `M2` is issued.

Its timing assumes that the source of the bins can wait, for example an FFT
fed from a sample buffer. A real-time version would need a faster divider
(or several), or would have to act one preamble later than the schedule
above.

## Where this design reads or departs from its source description

* **Decision table.** The decision rule compares magnitudes, `|dir1|` with
  `|dir2|`. For opposite signs, a signed comparison would always come out the
  same way.
* **Step rotation.** The rotation of a step `h` is taken as `2π·k·h/(M·N)`
  for `N`-point bins.
* **Averaging.** The per-antenna averaging is an arithmetic mean. A geometric
  mean is undefined for signed estimates.
* **Outlier threshold.** The threshold (π/4) was chosen here.
* **Subcarriers.** The choice of ±1..±6 was made here.
* **Serial datapath.** The datapath is serial. Each antenna has one
  conjugate multiplier, one arctangent unit and one power accumulator, fed one
  bin per clock. It does not have one such unit per subcarrier.
* **Formats.** All word widths, the handshake, the bank use and the rounding
  rules were chosen here.

## Not included

* The multiphase clock generator and the ADC.
* The FFT.
* The FFT-window boundary detector.
* The pilot-based tracking that follows synchronization.

The top brings out the signals where they connect: bins in, phase select out.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. `tb_fd_timing_sync` runs the whole design at
its default size. It uses a behavioural model of the channel, the multiphase
ADC and the FFT. It runs twelve packets with offsets between −40000 and
+40000 ppm and phases in all eight regions, and it forces both outlier
mechanisms. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdts_pkg.sv tb/tb_fd_timing_sync.sv \
          --top-module tb_fd_timing_sync
./obj_dir/Vtb_fd_timing_sync
```

The same command works for the other testbenches. Observed in the end-to-end
run:

* SCO errors under about 500 ppm;
* residual sampling-phase errors within ±3 of 32 phases.

`tb_sco_sweep` uses the same stand-in model, with a random initial phase for
each packet. It first runs 20 packets with no offset. It then makes two passes
over +10000, +20000, +30000, +40000 and −30000 ppm.

* **No offset, low noise.** Every packet must end within 3.5 phases.
* **Low noise.** 20 packets per offset.
  * Checked for each packet: SCO within 1500 ppm, residual phase error within
    4 phases.
  * Checked for each offset: RMS error below 3.9 phases.
  * Observed: RMS about 1 to 2 phases.
* **About 14 dB SNR per bin.** 30 packets per offset.
  * Checked: RMS error below 7 phases. A random, unsynchronized phase gives
    9.2.
  * Observed: RMS 2.3 to 4.1 phases; SCO RMS error about 1400 to 2000 ppm.
