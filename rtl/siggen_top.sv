// siggen_top -- oscillator-based reconfigurable sinusoidal signal generator
// for ADC built-in self-test.
//
// The digital part (siggen_core) is a resonator (osc_loop) closed through a
// 1-bit sigma-delta modulator (sdm_unity_stf) whose signal transfer
// function is one, so the loop oscillates as the ideal resonator would, with the frequency set by
// the coefficient Kf and the amplitude and phase set by the initial
// conditions x1(0), x2(0). One MODE bit reconfigures both halves:
//   MODE_LF: Kc = +2, Kf = +|Kf|, low-pass modulator, fosc = fclk*acos(1-|Kf|/2)/(2*pi)
//   MODE_HF: Kc = -2, Kf = -|Kf|, high-pass modulator, fosc = fclk/2 minus the same offset
// With the main settings |Kf| = 2**-17, x1(0) = 2**-9, x2(0) = 0 the LF tone is
// at about 4.4e-4*fclk (about 2275 samples per period) and the HF tone just
// below fclk/2, both with amplitude about 0.707.
//
// Two outputs are produced at once, one sample per clock:
//   bit_o  the modulator bit stream (1 = +1.0, 0 = -1.0); through the 1-bit
//          DAC (dac_v_o) and an external smoothing filter (low-pass in LF,
//          high-pass in HF) it is the analog test stimulus;
//   ref_o  the resonator state c[n], which is the bit stream filtered by the
//          resonator itself: the digital reference for the response analyser.
// Control: load_i (one cycle) loads the initial conditions and clears the
// modulator; en_i advances the generator by one sample per clock. Change
// mode_i or kf_i together with a load, since the loop state belongs to one
// mode. All words are signed fixed point, FRAC_W fraction bits (siggen_pkg).
// The loop structure, the mode switching and the main settings follow the
// published architecture; the load/enable interface, clearing the
// modulator on a load, the word widths and the DAC levels are this design's
// own choices. This level adds the 1-bit DAC model (dac_1bit), so it has a
// real-valued port; siggen_core alone is the synthesizable generator.
module siggen_top
  import siggen_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    en_i,
  input  logic    load_i,
  input  mode_e   mode_i,
  input  sample_t kf_i,
  input  sample_t x1_i,
  input  sample_t x2_i,
  output logic    bit_o,
  output sample_t ref_o,
  output real     dac_v_o
);

  logic s;

  siggen_core u_core (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (en_i),
    .load_i (load_i),
    .mode_i (mode_i),
    .kf_i   (kf_i),
    .x1_i   (x1_i),
    .x2_i   (x2_i),
    .bit_o  (s),
    .ref_o  (ref_o)
  );

  dac_1bit u_dac (
    .bit_i  (s),
    .vout_o (dac_v_o)
  );

  assign bit_o = s;

endmodule
