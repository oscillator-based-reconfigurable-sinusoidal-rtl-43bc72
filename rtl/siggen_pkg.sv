// siggen_pkg -- shared types and constants of the reconfigurable sinusoidal
// signal generator.
//
// All datapath words are two's-complement fixed point with FRAC_W fraction
// bits, so 1.0 is 2**FRAC_W. The 1-bit sigma-delta output stands for +1.0
// (bit = 1) or -1.0 (bit = 0). DATA_W/FRAC_W are this design's choice: the
// coefficient Kf = 2**-17 and the initial state x1(0) = 2**-9 of the main
// configuration must be exact, which needs at least 17 fraction bits, and the
// oscillator state (amplitude about 0.7) needs a sign and some integer
// headroom. The modulator works on MOD_W bits because its quantizer input
// swings to about 6 with a 0.7 input.
package siggen_pkg;

  // Operating mode, the 1-bit MODE control: LF selects Kc = +2 and the
  // low-pass modulator, HF selects Kc = -2 and the high-pass modulator.
  typedef enum logic {
    MODE_LF = 1'b0,
    MODE_HF = 1'b1
  } mode_e;

  localparam int unsigned DATA_W = 24;
  localparam int unsigned FRAC_W = 20;
  localparam int unsigned MOD_W  = DATA_W + 3;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [MOD_W-1:0]  mod_t;

  // Main configuration (both modes use the same magnitudes):
  // |Kf| = 2**-17, x1(0) = 2**-9, x2(0) = 0.
  localparam sample_t KF_MAIN = sample_t'(1) <<< (FRAC_W - 17);
  localparam sample_t X1_MAIN = sample_t'(1) <<< (FRAC_W - 9);
  localparam sample_t X2_MAIN = '0;

  // Full-scale level represented by one bit of the stream.
  localparam mod_t ONE_MOD = mod_t'(1) <<< FRAC_W;

endpackage
