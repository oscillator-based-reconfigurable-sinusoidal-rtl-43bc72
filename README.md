# Reconfigurable sigma-delta oscillator: sine stimulus and reference for ADC self-test

To test an embedded ADC on chip you need two things: an analog sine to feed it, and the
digital codes that the ADC *should* produce for that sine, to compare against. This design
makes both from one small piece of digital logic. A two-register digital resonator is closed
through a 1-bit sigma-delta modulator. The modulator's bit stream goes to a 1-bit DAC and an
analog smoothing filter and becomes the analog stimulus. At the same time the resonator's own
state word is a clean digital copy of that sine: the reference for the response analyser,
with no table in memory and no extra filter.

One control bit, `MODE`, reconfigures the same hardware between two tones:

| MODE | Resonator coefficient Kc | Feedback coefficient Kf | Modulator noise shaping | Tone |
|------|------|------|------|------|
| 0 (LF) | +2 (a left shift) | +\|Kf\| | low-pass, NTF = (1 − z⁻¹)² | near DC, for static tests (INL, DNL, offset, gain) |
| 1 (HF) | −2 (shift and negate) | −\|Kf\| | high-pass, NTF = (1 + z⁻¹)² | just below f_CLK/2, for dynamic tests (SNDR, ENOB) |

No multiplier is used anywhere: ±2 is a shift, and the Kf multiplication is a 2-to-1
multiplexer, because it only ever multiplies the 1-bit stream.

## How the loop oscillates

Call the resonator state c[n]. The two registers hold x1 = c[n] and x2 = c[n−1]. Every clock:

    c[n+1] = Kc·c[n] − c[n−1] − Kf·s[n]

where s[n] = ±1 is the modulator's output bit for the input c[n]. The modulator has a signal
transfer function of exactly one, so in the band of the tone s[n] ≈ c[n], and the loop
behaves like the ideal resonator

    c[n+1] = (Kc − Kf)·c[n] − c[n−1],   characteristic equation  z⁻² + (Kf − Kc)z⁻¹ + 1 = 0

whose poles lie on the unit circle for −2 < K = Kc − Kf < 2. It neither grows nor decays: the
tone is fixed by numbers, not by analog components.

* **Frequency.** f_osc = f_CLK · acos(K/2) / 2π. With Kc = 2 and a small Kf, f_osc ≈ f_CLK·√Kf / 2π.
  With Kc = −2 and Kf = −|Kf| the tone is mirrored to f_CLK/2 minus the same offset.
* **Amplitude and phase.** Set by the initial conditions loaded into the registers:
  A = x1(0) / sin φ, tan φ = x1(0)·sin ω / (x1(0)·cos ω − x2(0)), ω = 2π f_osc/f_CLK.
  With x2(0) = 0 this is A = x1(0)/sin ω.

Main configuration, used by all the end-to-end tests: |Kf| = 2⁻¹⁷, x1(0) = 2⁻⁹, x2(0) = 0.

| | LF mode | HF mode |
|---|---|---|
| Tone | 4.40·10⁻⁴ f_CLK | f_CLK/2 − 4.40·10⁻⁴ f_CLK |
| Period (envelope in HF) | 2,274.76 samples from the formula, 2,274.74 simulated | same |
| Amplitude | 0.70711 from the formula, 0.70713 simulated | same |

In HF mode, c[n]·(−1)ⁿ follows exactly the LF waveform. The two modes are mirror images of
each other, so their results agree to the last bit.

## The modulator: unity signal transfer and one shared integrator

This is the least obvious part. The resonator expects its feedback to carry the signal
unchanged. A normal sigma-delta loop filters the signal as well as the noise, which would
move the resonator's poles. The modulator here (`sdm_unity_stf`) therefore quantizes

    v = x + I(z)·(x − y),      y = sign(v) = ±1

which gives Y = X + Q/(1 + I(z)). The signal passes with gain one whatever I(z) is. I(z)
only sets the noise transfer function, NTF = 1/(1 + I). Two choices of I(z) give the two
second-order modulators:

    LF:  I(z) = ( 2z⁻¹ − z⁻²) / (1 − z⁻¹)²   →  NTF = (1 − z⁻¹)²   zeros at DC
    HF:  I(z) = (−2z⁻¹ − z⁻²) / (1 + z⁻¹)²   →  NTF = (1 + z⁻¹)²   zeros at f_CLK/2

Both are I(z) = (Kc z⁻¹ − z⁻²)/(1 − Kc z⁻¹ + z⁻²), with the same Kc = ±2 as the resonator.
So one block (`rcfg_integrator`) serves both modes. It has two registers, one shift and two
adders, plus the conditional negation. Its registers hold g = e + w, where e = x − y is its
input and w its output:

    w[n] = Kc·g[n−1] − g[n−2]        (shift, negate if HF, subtract)
    g[n] = e[n] + w[n]               (second adder)

Note that g = v − y is the negated quantization error. The block is therefore the classic
error-feedback modulator. It gives y = x + (1 − Kc z⁻¹ + z⁻²)·q. The testbenches use that
form as their independent reference model.

The quantizer threshold is at zero, and bit 1 stands for +1.0. With a 0.7 input, the
quantizer input reaches about ±6 in simulation. This is why the modulator words have three
more bits than the resonator words.

## Why the reference comes for free

Seen from the bit stream, the resonator is a filter. Its transfer function from the bit to
c is −Kf·z⁻¹/(1 − Kc z⁻¹ + z⁻²). That is a double integrator, z⁻¹/(1 − z⁻¹)², in LF mode, and
z⁻¹/(1 + z⁻¹)² in HF mode. The modulator pushes its noise away from the tone: to high
frequencies in LF mode, to low frequencies in HF mode. The resonator keeps only what lies
near the tone. So `ref_o` is the bit stream with the shaped noise removed. It is a
multi-bit, nearly pure sine that stays in step with the analog stimulus, sample for sample.

Measured over 65,536-sample records with a Blackman–Harris window, in both modes:

* Reference word: harmonics at −125, −114, −126 and −126 dBc (HD2 to HD5).
* Bit stream: the same fundamental to within 10⁻⁵; harmonics at or below −97 dBc.
* Close to the tone, the spectrum has a noise skirt. It comes from the modulator noise that
  the resonator picks up. A total signal-to-noise-and-distortion figure depends on how many
  bins next to the tone count as signal. None is claimed here.

## Interface and timing

`siggen_top` ports (all words signed fixed point, `FRAC_W` = 20 fraction bits, so 1.0 = 2²⁰):

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk_i` | in | 1 | sample clock f_CLK; one sample per cycle |
| `rst_ni` | in | 1 | asynchronous active-low reset, clears all state |
| `en_i` | in | 1 | advance the generator; low freezes it |
| `load_i` | in | 1 | one cycle: load `x1_i`/`x2_i` into the resonator, clear the modulator |
| `mode_i` | in | 1 | `MODE_LF` (0) or `MODE_HF` (1), type `siggen_pkg::mode_e` |
| `kf_i` | in | 24 | \|Kf\| |
| `x1_i`, `x2_i` | in | 24 | initial conditions x1(0), x2(0) |
| `bit_o` | out | 1 | bit stream, 1 = +1.0, 0 = −1.0 |
| `ref_o` | out | 24 | digital reference c[n] |
| `dac_v_o` | out | real | output of the 1-bit DAC model, to the external smoothing filter |

Timing:

* After a `load_i` cycle, `ref_o` = x1(0). `bit_o` for that sample is valid in the same
  cycle: the quantizer decides combinationally from the registers.
* Each enabled clock then produces the next sample.
* Change `mode_i` or `kf_i` together with a load. The loop state only makes sense in the mode
  it was built up in.
* Reset leaves everything at zero. Nothing useful comes out until a load.

## Files

| File | Contents |
|------|----------|
| `rtl/siggen_pkg.sv` | word widths, `mode_e`, fixed-point types, the main-configuration constants |
| `rtl/rcfg_integrator.sv` | shared I(z) block, Kc = ±2 |
| `rtl/sdm_unity_stf.sv` | 1-bit unity-STF modulator around `rcfg_integrator` |
| `rtl/osc_loop.sv` | two-register resonator with the shift/negate Kc path and the Kf multiplexer |
| `rtl/dac_1bit.sv` | behavioural model of the 1-bit DAC (±VREF after a settling delay); not synthesizable |
| `rtl/siggen_core.sv` | the synthesizable generator: `osc_loop` closed through `sdm_unity_stf` |
| `rtl/siggen_top.sv` | `siggen_core` plus the `dac_1bit` model, as the generator sits in the self-test scheme |
| `tb/*_tb.sv` | self-checking testbenches, one per module, plus `siggen_spectrum_tb` |

Everything except `dac_1bit` and `siggen_top` is synthesizable. Those two carry the `real`
DAC output, so for a netlist synthesize `siggen_core`. It has 102 flip-flops: 2×24 in the
resonator and 2×27 in the modulator. There are no multipliers: each of the two halves is a
shift, a negation and two or three adders.

Two concurrent assertions guard the arithmetic. `osc_loop` recomputes the next state two
bits wider and fires if the word would wrap. `sdm_unity_stf` does the same for the quantizer
input. In a bit-exact model of the loop with |Kf| = 2⁻¹⁷, amplitudes up to 0.95 of full
scale stayed stable. The quantizer input then peaked below 16, well inside the ±64 range of
the modulator words. If initial conditions or coefficients ever drive a word out of range,
an assertion fires at once in simulation.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `rcfg_integrator_tb`: checks the impulse responses of both forms (h[n] = n + 1, and
  (−1)ⁿ⁺¹(n + 1)). It also runs random bursts against the direct-form difference equation of
  I(z), and checks clear and hold.
* `sdm_unity_stf_tb`: compares every bit with the error-feedback model. For DC inputs, and
  for sines near DC and near f_CLK/2, it checks that the accumulated difference between input
  and output stays bounded, which is what unity signal transfer means.
* `osc_loop_tb`: uses random bit streams and several Kf values against the recurrence. It
  also checks the double-integrator step response c[n] = −Kf·n(n+1)/2 in LF mode, and its
  (−1)ⁿ-modulated twin in HF mode, plus load and hold.
* `dac_1bit_tb`: checks the output levels and the settling delay.
* `siggen_core_tb`: the same closed-loop checks as the next testbench, on the core alone.
  It uses 12,000-sample runs per mode.
* `siggen_top_tb`: runs at the default parameters. It covers 65,536 samples in LF mode, then
  65,536 in HF mode, then a switch back to LF and a hold. Every sample of `bit_o`, `ref_o` and
  `dac_v_o` is compared with an independent closed-loop model. The amplitude and period are
  compared with the formulas above, and the sign must alternate in HF mode. The 512-sample
  averages of the bit stream and of the reference must agree. The test also counts loads,
  mode switches, holds and each multiplexer choice in each mode, and fails if any never
  occurs. It runs in under a second.
* `siggen_spectrum_tb`: runs the windowed harmonic measurement described above. It checks
  the fundamental against A = x1(0)/sin ω to 0.1 %, and checks that the bit stream and the
  reference carry the same fundamental. Reference harmonics must be below −91.3 dBc, and
  bit-stream harmonics below −90 dBc.

* `siggen_tuning_tb`: sets |Kf| from 2⁻¹¹ to 2⁻¹⁷ and several pairs x1(0), x2(0), in both
  modes. The amplitude, the period, and the whole first period sample by sample must match
  A·sin(ω n + φ) from the formulas above. The largest |Kf| gives the largest deviation,
  0.6 % of A, because it lets more modulator noise into the loop.

Simulate with plain Verilator 5, for example:

    verilator --binary --timing --assert -Irtl rtl/siggen_pkg.sv rtl/*.sv \
        tb/siggen_top_tb.sv --top-module siggen_top_tb
    ./obj_dir/Vsiggen_top_tb

Run from the folder that holds `rtl/` and `tb/`. List the package first. Verilator warns
that it is listed twice, because `rtl/*.sv` names it again; the warning is harmless.

## Design choices beyond the published architecture

The following follow the architecture as published:

* the loop equation;
* Kc = ±2 by shift and negation;
* the Kf multiplexer, with its control inverted in HF mode;
* the unity-STF modulator and the two NTFs;
* the shared integrator;
* the main configuration values.

The following are this implementation's own choices:

* **Word lengths.** 24-bit resonator words, 27-bit modulator words, 20 fraction bits. The
  source gives none. 17 fraction bits are the minimum for |Kf| = 2⁻¹⁷. All arithmetic is exact
  (shifts and adds), so the fraction width only limits the smallest Kf and x1(0).
* **Register arrangement.** The integrator keeps its registers on g = e + w, and the
  resonator is in direct form. Both reproduce the published transfer functions exactly.
* **Control interface.** The synchronous `load_i`, `en_i` and the asynchronous reset are this
  design's own. So is clearing the modulator on a load.
* **Reference word.** The full 24-bit state word comes out as the reference. How it is rounded
  to an ADC's resolution is left to the response analyser. An 8-bit ADC tested to 50 % of a
  0.5 LSB specification needs about 10 bits of stimulus accuracy, well within this word.
* **DAC model.** Levels of ±1.0 and a one-time-unit settling delay.

Not included:

* the analog smoothing filters: a 4th-order low-pass for LF mode and an 8th-order high-pass
  for HF mode, both Chebyshev;
* the ADC under test;
* the response analyser.

`dac_v_o` and `ref_o` are the connection points for them.
