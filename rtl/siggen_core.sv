// siggen_core -- the all-digital part of the reconfigurable sinusoidal
// signal generator: the sigma-delta-modulation based digital oscillator.
//
// The resonator (osc_loop) is closed through the unity-STF 1-bit modulator
// (sdm_unity_stf): the resonator state c[n] is the modulator input and the
// modulator bit for c[n] steers the Kf multiplexer in the same cycle, so
//   c[n+1] = Kc*c[n] - c[n-1] - Kf*s[n],  s[n] = c[n] + shaped noise.
// One MODE bit switches both halves together (Kc = +2 and low-pass noise
// shaping, or Kc = -2, negative Kf and high-pass noise shaping).
//
// Outputs, one sample per clock: bit_o, the stimulus bit stream for the 1-bit
// DAC, and ref_o = c[n], the digital reference. load_i (one cycle) loads the
// initial conditions into the resonator and clears the modulator; en_i
// advances one sample. After a load, ref_o = x1(0) and bit_o belongs to that
// sample. The structure follows the published architecture; the load/enable
// interface, clearing the modulator on a load and the word widths are this
// design's own choices.
module siggen_core
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
  output sample_t ref_o
);

  sample_t c;
  logic    s;

  osc_loop u_osc (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (en_i),
    .load_i (load_i),
    .mode_i (mode_i),
    .kf_i   (kf_i),
    .x1_i   (x1_i),
    .x2_i   (x2_i),
    .bit_i  (s),
    .c_o    (c)
  );

  sdm_unity_stf u_sdm (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (en_i && !load_i),
    .clr_i  (load_i),
    .mode_i (mode_i),
    .x_i    (c),
    .bit_o  (s)
  );

  assign bit_o = s;
  assign ref_o = c;

endmodule
