# Multibit delta-sigma DAC with randomised element matching and calibrated unit sources

This is a digital-to-analogue converter for very slow, very precise signals: a 0.001–10 Hz
baseband that has to be reproduced with better than 130 dB signal-to-noise ratio (about 21 bits,
1.5 µV on a 3 V scale), as needed to drive the plates of a precision sensor. No array of
current sources matches to 1 ppm, so the converter does not try to build a 21-bit DAC. Instead it:

1. oversamples the 32-bit input heavily (1.5625 kHz → 1 MHz);
2. noise-shapes it down to a 5-bit code with a second-order delta-sigma modulator, moving the
   27 discarded bits of quantisation noise far above 10 Hz;
3. turns the code into "switch on *code* of 32 equal unit current sources". The choice of
   sources is random on every clock, so the sources' mismatch shows up as white noise, not as
   distortion;
4. keeps a 33rd source so that one source is always offline. A single shared calibrator trims
   the offline source to a reference current, and every source takes its turn.

The digital path (interpolator, modulator, random-bit generator, DEM network, calibration
controller) is synthesizable SystemVerilog. The analogue parts (unit current sources,
calibrator, reconstruction filter) are behavioural models that use `real` signals. With them,
`ds_dac_top` simulates the whole converter, from PCM words to an output voltage.

The architecture follows S. R. Singh, V. Gaudet and K. Moez, "A High Resolution Multibit Δ-Σ
DAC using Noise Shaping". That source gives the block structure, word widths, rates and the
calibration scheme. It does not give the insides of the digital blocks. The structures below are
the simplest ones that do the described job, and the section
[Departures and choices](#departures-and-choices) lists every point where this RTL had to decide.

## Signal path and rates

```
pcm_in (32 b, 1.5625 kHz)
  -> sinc_interpolator   x8 -> x8 -> x10, sinc^3 each      32 b @ 1 MHz
  -> dsm2_modulator      2nd order, 5-b quantizer          code 0..31 @ 1 MHz
  -> dem_tree            31 random switches (lfsr_rng)     32-wide selection, popcount = code
  -> cal_controller      route around the offline source   33 source enables
  -> unit_dac_cell x33   (model)                           currents, summed into i_out
  -> recon_filter        (model) RC low-pass               v_out
     calibrator          (model) trims the offline source, CDS on its op-amp
```

Everything runs on one 1 MHz clock (`clk`) with an asynchronous active-low reset (`rst_n`).
The slower rates are clock enables. The converter pulls its input: `pcm_req` is high for
one clock every 640 clocks, and `pcm_in` is sampled in that clock.

| Quantity | Value | Where set |
|---|---|---|
| Input word | 32 bit signed | `dac_pkg::IN_W` |
| PCM rate / modulator rate | 1.5625 kHz / 1 MHz (×640) | `sinc_interpolator` R1, R2, R3 = 8, 8, 10 |
| Interpolator order | sinc³ | `sinc_interpolator` K = 3 |
| Quantizer | 5 bit, 32 levels | `dac_pkg::Q_BITS` |
| Unit elements / sources | 32 driven by DEM, 33 physical | `dac_pkg::N_ELEM`, `N_CELLS` |
| Random-bit generator | 41-bit LFSR, x⁴¹+x³⁸+1, 31 bits per clock | `lfsr_rng` |
| Calibration dwell per source | 1024 clocks (full sweep 33.8 ms) | `ds_dac_top` CAL_PERIOD |
| Reference current | (5 V − 2.5 V) / 25 kΩ = 100 µA | `dac_pkg::I_REF` |

Latency from a PCM sample to the sources is fixed. On top of the filters' own (causal,
symmetric) impulse response, the interpolator adds a pure delay of 364 clocks after the sample
is taken. The modulator and the DEM register add one clock each.

## Interpolator (`sinc_interpolator`, `cic_interp_stage`, `rate_gen`)

There are three CIC stages. Each stage runs K = 3 comb sections at its input rate,
zero-stuffs the result to its output rate, and runs three integrators there. Its impulse
response is three R-sample boxcars convolved together. The DC gain of R^(K−1) (64, 64 and 100)
is removed by multiplying with a rounded reciprocal, 2^SH / R^(K−1) with SH = 32 + ⌈log2 gain⌉,
and rounding to nearest. This is exact for the two ×8 stages. For the ×10 stage it is off by
less than 0.25 LSB. All sums are modular in a wide word (32 + K·⌈log2 R⌉ + 1 bits). Wrap-around
inside the combs and integrators therefore cancels exactly. The impulse response has only
positive taps, so the output cannot overshoot the input. A saturation stage is kept only as a
guard against rounding at full scale. `rate_gen` makes the three rate enables from nested
counters. All the enables are high together once every 640 clocks, which lines up the first
output of every stage with its new input.

## Noise shaping (`dsm2_modulator`)

This block needs the most care. It is built in error-feedback form:

```
v[n]  = u[n] + 2 e[n-1] - e[n-2]
y[n]  = floor(v[n] / 2^27)            (5-bit quantizer: keep the top bits)
e[n]  = v[n] - y[n] 2^27              (the 27 discarded bits, always 0 .. 2^27-1)
=> y[n] 2^27 = u[n] - (1 - z^-1)^2 e[n]
```

So the signal passes with gain 1, and the quantisation error is shaped by (1 − z⁻¹)², the
second-order high-pass of the architecture. Two properties make this form convenient in
hardware:

* **The error is a bit field.** e is simply the low 27 bits of v. Nothing is subtracted and no
  comparator is needed.
* **The loop cannot overload if the input is bounded.** 0 ≤ e < 2^27 bounds 2e₁ − e₂ to
  (−2^27, 2^28). The quantizer can therefore never leave its 32 levels when u lies in
  [−2^31 + 2^27, 2^31 − 2^28] (about −0.6 dBFS). An input limiter clamps u to that range and
  raises `sat`. This is the only overload behaviour. The architecture's own SQNR budget assumes
  signals of −6 dBFS, well inside the range.

The output `code` = y + 16 (offset binary, 0..31) is the number of unit sources to switch on.
Zero signal gives 16. An assertion checks that y stays in range.

Measured in simulation (`tb_sqnr_workload`): a 10 Hz sine at −6 dBFS was run through the whole
digital path, and the quantisation error was low-pass filtered to a band of about 54 Hz. The
in-band error is 0.016 LSB rms of the 32-bit word, an SQNR of 213 dB, against the 140 dB the
modulator is budgeted. The 32-bit input word itself limits the path to about 194 dB. The
margin is expected: the modulator runs at an oversampling ratio of 50,000, and the budget needed
only 1835.

## Randomised element selection (`dem_tree`, `dem_switch`, `lfsr_rng`)

The code says *how many* sources to switch on, and the DEM network decides *which*. It is a
binary tree of 31 switching blocks. The root receives the code. Each block gives ⌊x/2⌋ to each
of its two halves. When x is odd, its own random bit decides which half gets the extra element.
The 32 leaves are the selections. The selected count always equals the code, and each block
stays within its capacity because code ≤ 31 < 32. Block i in heap order (root 1, children 2i
and 2i+1) uses `rnd[i-1]`. The selection is registered.

What this buys: every element is equally likely to be in any selection of a given size. The
output error caused by element mismatch, averaged over time, is then the same fraction of the
total mismatch for every code. That average is a pure gain error. No code-dependent
(nonlinear) part is left, and the remaining error is random noise spread up to 1 MHz. The
testbench shows the effect with ±1 % mismatch. Averaged per code, the error stays within 0.002
of a unit of a straight line. A fixed selection of the lowest elements leaves a bow of 0.038
unit.

The random bits come from one Fibonacci LFSR, x⁴¹ + x³⁸ + 1. It advances 31 steps per clock in
a single unrolled clock cycle, and its 31 feedback bits feed the 31 switches. The reason for 41
bits is that a repeating random sequence shows up as a tone at its repetition frequency. A
32-bit register at 1 MHz repeats every ~4300 s (0.23 mHz), too close to the 1 mHz band edge,
which is why the architecture asks for at least 40 bits. With 31 bits drawn per clock, a 40-bit
register would repeat 31 times sooner, because 31 divides 2^40 − 1. With 41 bits, 31 and
2^41 − 1 are coprime, and the state repeats only every 2^41 − 1 clocks (25 days). The
polynomial is primitive. This was checked from the factorisation 2^41 − 1 = 13367 × 164511353.

## Spare source and calibration (`cal_controller`, `unit_dac_cell`, `calibrator`)

`cal_controller` keeps `cal_idx`, the one source of the 33 that is offline, and advances it
round-robin every `CAL_PERIOD` clocks. DEM output j drives source j when j < `cal_idx` and
source j + 1 otherwise. So exactly `code` sources are on, and the offline source never is.
`cal_sel` (one-hot) connects the offline source to the calibrator. `cal_start` pulses when a new
source arrives.

Unit source model: a fixed part I0 (90 % of the unit current) plus an adjustable part (10 %)
that is linear in a held gate voltage. Both parts carry a static mismatch. The whole current goes
to the output, to the calibrator, or to a dummy path, so the source never turns off.

Calibrator model: the 5 V and 2.5 V references across R_CAL set I_REF. The difference between
I_REF and the offline source's current, times R_CAL, is integrated into that source's gate
voltage until the difference is zero. The op-amp's offset (1 mV in the model) would leave an
error of V_OS / R_CAL = 40 nA (400 ppm). Correlated double sampling removes it. In alternate
clocks the calibrator stores the offset on its hold capacitor, then subtracts it. `cds_en`
turns this off so the difference can be seen. With the default ±0.5 % mismatch, the loop
settles to I_REF within 1 ppm in well under the 1024-clock dwell.

`recon_filter` is a first-order RC low-pass (1 kΩ load, 100 Hz corner) on the summed current.
For example, 8 of 32 sources on average gives 0.8 V.

These three models describe behaviour only. They are not circuits and do not synthesize.

## Departures and choices

* **Interpolation factors 8, 8, 10.** The source states the factors as 80, 80 and 100, but
  also states the end rates 1.5625 kHz and 1 MHz. Those rates, and the 1 MHz clock used
  throughout, need a total of ×640. This RTL keeps the rates and uses 8 × 8 × 10. Change R1–R3
  if the factors were meant.
* **Interpolator order K = 3.** The source only says sinc^k.
* **Modulator structure, input limiter, offset-binary code**: this design's choices. The order,
  the 5-bit quantizer and the 32-bit word are given.
* **DEM tree and split rule**: the source shows a switching matrix steered by random bits. It
  refers the inner workings of the matrix elsewhere.
* **41-bit LFSR** instead of the minimum of 40 (see above). The polynomial, seed and leap-forward
  arrangement are chosen here.
* **Calibration order, dwell time and routing**: chosen here. The source gives 33 sources with
  one always offline and one shared calibrator.
* **Analogue values** (100 µA unit, 25 kΩ, 1 V gate, 1 mV offset, loop gain, 100 Hz filter) and
  the linear gate law are modelling assumptions.
* The 130 dB figure of the *analogue* output cannot be shown with behavioural sources. What is
  shown is that the digital path far exceeds it, and that calibration brings the modelled
  sources to 1 ppm.

## Verification

Each testbench checks against values it computes itself. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sinc_interpolator` | Output against a floating-point convolution model of the three stages (≤ 2 LSB at the best fixed lag); exact DC; `pcm_req` every 640 clocks |
| `tb_dsm2_modulator` | The double running sum of u − y·2^27 stays in [0, 2^27) on every sample (the noise-shaping identity); `sat` equals an independent clamp; DC average; `en` |
| `tb_lfsr_rng` | Every word against a bit-serial reference LFSR; `en`; bit balance; exact period 31 on a 5-bit instance |
| `tb_dem_tree` | Every selection against a recursive reference of the split rule; popcount = code; ≥ 100 distinct selections for code 16; equal use of all 32 elements (±5 %); with ±1 % element mismatch, the average error per code lies within 0.005 unit of a straight line (measured 0.0016), where a fixed selection leaves 0.038 |
| `tb_cal_controller` | Routing, one-hot `cal_sel`, `cal_idx` and `cal_start` every clock over three rotations (dwell 16) |
| `tb_unit_dac_cell`, `tb_calibrator`, `tb_recon_filter` | Current steering and gate hold; convergence to I_REF within 1 ppm with CDS and to I_REF + V_OS/R without it; closed-form RC step and decay |
| `tb_ds_dac_top` | Default parameters, 44.8 ms (70 PCM samples, a full calibration sweep): PCM rate; sources on = previous code; offline source off; average code 20 for +0.25 FS; many selections per code; limiter engaged by over-range input; mismatch visible before calibration, i_out = n·I_REF within 1 ppm after it; current conserved; v_out = 0.8 V; CDS running |
| `tb_sqnr_workload` | Default parameters, 10 Hz −6 dBFS sine for 0.3 s: in-band SQNR of the modulated stream ≥ 140 dB (measures 213 dB) |

Simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/dac_pkg.sv tb/tb_ds_dac_top.sv --top-module tb_ds_dac_top
./obj_dir/Vtb_ds_dac_top
```

Replace the testbench name to run another one. All testbenches finish in a few seconds. The
simulator is two-state, so every register that is read has a reset value.

## Files

* `rtl/dac_pkg.sv`: shared widths, counts and analogue constants.
* `rtl/ds_dac_top.sv`: the whole converter.
* `rtl/sinc_interpolator.sv`, `rtl/cic_interp_stage.sv`, `rtl/rate_gen.sv`: interpolation.
* `rtl/dsm2_modulator.sv`: modulator.
* `rtl/lfsr_rng.sv`, `rtl/dem_tree.sv`, `rtl/dem_switch.sv`: random element selection.
* `rtl/cal_controller.sv`: offline-source rotation and routing.
* `rtl/unit_dac_cell.sv`, `rtl/calibrator.sv`, `rtl/recon_filter.sv`: behavioural analogue
  models.
* `tb/`: the testbenches listed above.
