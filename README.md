# Wideband spectrum sensing in SystemVerilog: an adaptive power detector and a band segmenter

A cognitive radio may only transmit into spectrum that nobody else is using at that moment. It must
therefore keep measuring the power in each channel of a wide band, and decide for each channel
whether a signal is present. Doing this with a plain FFT power detector has two problems:

* a strong signal leaks into neighbouring bins, so those empty bins look occupied;
* a fixed averaging time and threshold can only meet the detection targets when there is no
  interference.

This RTL contains two independent sensing engines that address these problems. They are built after
the two chips described in a thesis on energy-efficient wideband spectrum sensing:

* **Chip 1, `ss_proc`** (200 MS/s, 1024 channels). It applies a two-tap multitap window before the
  FFT to confine leakage. It then adapts, per channel:
  * the number of averaged frames M(k);
  * the detection threshold gamma(k).
  
  Both are set from that channel's noise power and from the interference leaking in from its
  neighbours, so every channel meets the same false-alarm and detection rates.
* **Chip 2, `band_seg`** (16 samples per clock, for example 500 MS/s). It finds an unknown signal
  in the band in two steps:
  * a quick 64-point coarse scan gives a rough bandwidth and centre;
  * the band is then mixed to DC, decimated with a feed-forward CIC filter, and analysed again with
    an FFT. The FFT size (64 to 8192 points) is chosen at run time so that the signal spans a useful
    number of bins.
  
  A detector that tolerates missed bins turns the per-bin decisions into a bandwidth and centre
  estimate.

`wss_top` places both engines side by side. Each keeps its own ports: `c1_*` for chip 1 and `c2_*`
for chip 2. The two share nothing.

## Number formats

* **Samples.** Chip 1 takes 12-bit complex input samples; chip 2 takes 10-bit ones.
* **FFT.** The FFT datapaths carry 24-bit real and imaginary parts, with 12-bit twiddle factors.
  The FFT does not scale; 24 bits hold the growth of an 8192-point transform of 10-bit data.
* **Floats (`wss_pkg`).** Powers that feed the adaptation arithmetic are kept in a small float,
  `fp_t = {m[9:0], e[4:0]}`, with value m·2^(e+16).
  * The exponent is signed, from -16 to 15.
  * The mantissa is normalised (top bit set) unless the value is zero.
  * The smallest representable step is 1. Fractional constants therefore carry an implied scale:
    `fp_mul #(.SH(n))` multiplies and also divides by 2^n.
  * Chip 1's interference factor `beta` is given as beta·2^24.
* **Float units** (`fx2fp`, `fp_add`, `fp_mul`, `fp_sq`, `power_detect`):
  * Rounding is by truncation.
  * Results that are too large saturate to the largest value.
  * Results that are too small become zero.

## The multi-path FFT (`fft_mpath` and its parts)

Both chips use the same FFT engine. An N-point transform is split into L parallel paths of
M = N/L points each. Chip 1 uses L = 8 and M = 128; chip 2 uses L = 16 and M = 4…512.

1. **Input.** On each clock, lane l carries sample x[L·t + l].
2. **Per-path FFT.** Each lane runs an M-point single-path delay-feedback (SDF) FFT (`fft_lane`).
3. **Twiddles between paths.** The outputs are multiplied by W_N^(l·q), where q is the bin index
   within the path.
4. **Parallel FFT.** A fully parallel L-point FFT (`fft_par`) combines the paths. Output lane p then
   carries bin X[q + M·p].

The bins within a path leave in bit-reversed order. `out_q` gives each beat's q, and `out_seq`
gives the beat's position within the frame. Downstream blocks use q as a memory address, so they
never reorder the data.

Building blocks:

* **`sdf_stage`** is one radix-2 DIF stage. For half a frame it fills its feedback delay line. For
  the other half it outputs a+b and feeds a−b back.
* **`fft_lane`** is a chain of SDF stages, grouped into radix-2^k units.
  * Inside a unit, the rotations are constants: a trivial −j swap, or `rot_const`, which is a
    shift-add (CSD) multiply by W16 powers (0.7071, 0.9238, 0.3827).
  * Between units, the twiddles come from `twiddle_gen` and are applied by `cmul3`.
  * Chip 1's 128-point path uses radix 2^2·2^2·2^3.
  * The reconfigurable path (`log2n` input) puts a full multiplier after every stage, so that any
    number of leading stages can be bypassed.
* **`twiddle_gen`** needs no ROM. It folds the angle into the first octant and evaluates
  piecewise-linear sine and cosine approximations using only shifts and adds. The worst-case
  error is about 1 %. This error is the main limit on FFT accuracy (see Verification).
* **`cmul3`** is a complex multiply with 3 multipliers and 5 adders.
  * The printed formula for its imaginary part is wrong; the standard form is used.
  * It has one register stage.
* **Delay lines.**
  * Short delay lines (`delay_dff`) are flip-flop rings. A one-hot pointer picks the single cell
    that is written and read, so the other cells never toggle.
  * Lines of 256 or more (`delay_rf`) are memories with a wrapping address, which suits register
    files. The source puts 256 in flip-flops. Here 256 goes to the register file so that chip 2's
    first stage uses one.

## Chip 1: adaptive sensing processor (`ss_proc`)

### Datapath

1. **Window.** `multitap_window` forms frames
   y_m[n] = Σ_p w[n+pN]·x[n+pN+mN] with P = 2 taps and N = 1024.
   * The window is twice as long as the FFT, so it suppresses leakage.
   * The overlap-add keeps the FFT size, and so the bin width, unchanged.
   * The coefficients are unsigned Q1.11 values, written by the host through `coef_we`, with
     address p·N+n. The memory has no reset.
2. **FFT.** A 1024-point FFT over 8 paths.
3. **Power sums.** `power_est` squares the 8 output bins of each beat and adds them to per-bin
   sums, held in 8 banks of 128 words.
   * The sums are exact 64-bit integers. A float accumulator with a 10-bit mantissa stops growing
     after about 512 frames, well short of the 9765-frame maximum.
   * Each lane has an enable. A bin stops accumulating after its own M(k) frames, while the frame
     stream keeps running for the largest M.

### Sequence

A run starts with a `start` pulse. `phase` shows the current step.

| step | what happens |
|---|---|
| CAL | `rf_off` = 1. After 3 flush frames, 512 frames are summed. The result is the noise power σv²(k), stored as a float per frame. |
| COARSE | `rf_off` = 0. After 3 flush frames, 64 frames give the coarse power C(k). |
| STA | One bin after another: interference σi²(k) = β·(C(k−1)+C(k+1)); then `sta` gives M(k) = 74.25·(1.15+ψ)² with ψ = σi²/σv², capped at 9765 (50 ms). |
| PSD | Frames are summed until the largest M(k) is reached; each bin uses only its first M(k) frames. |
| DTA | One bin after another: `dta` gives γ(k) = (1.3624·√M + M)·(σv²+σi²). `power_detect` compares the bin's sum T(k) with γ(k). One `res_*` word is output per bin, in bin order. Then `done` pulses. |

The adaptation blocks:

* **`nr_recip`** computes 1/σv² by Newton–Raphson.
  * It starts from 1/512, which takes 4 iterations.
  * When the previous mantissa is close, it starts from the previous result and needs only
    1 iteration. The noise floor changes little from bin to bin, so most calls in a pass use this
    warm start. `sta_warm` marks those calls.
* **`nr_sqrt`** computes √M for `dta`, through the inverse square root.
* **`sta`** and **`dta`** each handle one bin per call. They take a few clocks per call and run
  serially.

### Departures from the source

* The noise calibration uses 512 frames; the source does not say how many. With 64 frames, the
  estimation error alone raises the false-alarm rate from the 10 % target to about 25 %.
* The STA and DTA passes are serial. The source interleaves four channels.
* The constant Q⁻¹(P_FA)·√α = 1.3624 is derived for P_FA = 10 % and α ≈ 1.13; it is not printed
  in the source.
* The interference estimate uses both direct neighbours with one factor β.

## Chip 2: band segmentation (`band_seg`)

### Coarse pass

* The raw input is analysed with a 64-point FFT (16 paths of 4 points), over 160 frames.
* `bs_power_est` keeps 56-bit per-bin sums and compares each with `thr_coarse`.
* The decisions are read out in frequency order (the two halves of the spectrum swapped, so that
  DC is in the middle).
* `param_est` then:
  * fills runs of at most X = 3 H0 decisions inside an occupied region (the miss-tolerant
    detection);
  * reports the widest region's bandwidth `bw` and twice its centre `c2`, both in bins.

### Configuration

From the coarse result, the controller sets:

* **Mixer.** `nco_mixer` gets the phase step for the coarse centre, and shifts the band to DC with
  a phase resolution of 1/8192 of the sampling rate.
* **CIC ratio.** R = the largest power of two not above min(32, 32/bw).
* **FFT size.** The fine path size is 512/R, so the fine FFT spans the decimated band with
  8192-bin resolution.

### Fine pass

1. **Decimation.** `cic_ff` is a chain of `cic_ff_stage` units. Each applies (1+z⁻¹)⁴ (taps
   1 4 6 4 1, then >>4) and halves the rate by halving the number of lanes.
   * In this feed-forward form each stage adds only 4 bits, and the data stays parallel.
   * Stages beyond log2 R are bypassed (`stage_en`).
   * Once a stage is down to a single lane, it produces an output every second valid input.
2. **Repacking.** `lane_packer` gathers the 16/R surviving lanes back into full 16-lane words for
   the FFT.
3. **Detection.** After 2 flush frames, 40 frames are averaged and compared with `thr_fine`, and
   `param_est` gives the fine `bw_f` and `c2_f`.

### Limits

* R stops at 32, because the fine FFT path holds at most 512 points. The source's CIC supports
  ratios up to 1024 for very narrow signals.
* The fine threshold is one constant. The CIC's passband droop is not built into it, so bins near
  the edge of the decimated band are detected less well, and the fine width estimate is rough.
* The thresholds are host inputs, in units of the per-bin sums.

## Verification

Each test bench prints `TB_RESULT checks=<n> failures=<n>`.

| bench | what it checks |
|---|---|
| `tb_fx2fp`, `tb_fp_add`, `tb_fp_mul`, `tb_fp_sq`, `tb_power_detect` | random operands against a real-number model, including saturation |
| `tb_nr_recip`, `tb_nr_sqrt`, `tb_sta`, `tb_dta` | accuracy against real arithmetic, latency of cold and warm starts |
| `tb_fft_mpath` | chip 1's 1024-point FFT against a direct DFT, random frames |
| `tb_fft_reconfig` | chip 2's FFT at several sizes, switched at run time |
| `tb_wss_top` | both chips at full size, with no parameter overrides |

`tb_wss_top` checks the following.

**Chip 1.** The input is noise plus a strong tone between bins 599 and 601. The bench checks that:

* the RF switch is used during calibration;
* the warm start is used;
* bins are gated at different M(k);
* the interfered bins get a longer M(k) than clean bins;
* the tone is detected;
* the false-alarm rate on clean bins stays below 25 %. It measures about 15 %, against a design
  target of 10 %; the remaining excess comes from the finite noise calibration.

**Chip 2.** The input is a band-limited noise signal in a noise floor. The bench checks that:

* the coarse estimate is found;
* the mode switches to fine;
* CIC stages are gated;
* the lane packer fills words;
* the CIC delivers 16/R lanes per input beat, and the packer one 16-lane word per 16 lanes;
* the fine centre is better than the coarse one.

Both benches compile in about 25 s and run in about 15 s.

To test the benches themselves, every module was also run with one deliberate bug, such as a wrong
sign, an off-by-one shift or a wrong constant. The matching bench failed in each case.

### Run a bench

```
verilator --binary -Wno-fatal -Wno-lint -Wno-style --top-module tb_wss_top \
    -y rtl rtl/wss_pkg.sv tb/tb_wss_top.sv -j 8
./obj_dir/Vtb_wss_top
```

### Accuracy

FFT accuracy is limited by the piecewise-linear twiddles, which are accurate to about 1 %. The
FFT benches allow for this.

### Remaining lint warnings

The only lint warnings left are for unused bits and signals: upper product bits, and package
constants that are not used everywhere. Each module's opening comment names the ones it has.
