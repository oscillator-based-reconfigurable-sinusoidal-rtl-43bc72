// osc_loop -- two-register resonator loop of the reconfigurable oscillator,
// which is also the digital filter that yields the reference signal.
//
// Registers x1 = c[n] and x2 = c[n-1]. Each enabled clock:
//   c[n+1] = Kc*c[n] - c[n-1] + f[n],   f[n] = +/-|Kf|
// Kc = +2 (MODE_LF) is a left shift; Kc = -2 (MODE_HF) is the same shift
// followed by a negation. The Kf multiplier is a 2-to-1 multiplexer that
// picks -|Kf| or +|Kf| under control of the sigma-delta bit; MODE_HF inverts
// the multiplexer control, which makes Kf negative. With the bit standing
// for s = +/-1 this is f = -Kf*s, Kf = +|Kf| (LF) or -|Kf| (HF), so closing
// the loop through a unity-STF modulator gives the characteristic equation
//   z^-2 + (Kf - Kc) z^-1 + 1 = 0
// with oscillation frequency fclk*acos((Kc-Kf)/2)/(2*pi). From the bit stream
// to c the loop is z^-1/(1-z^-1)^2 (LF, low-pass) or z^-1/(1+z^-1)^2 (HF,
// high-pass), which removes the shaped modulator noise: c is the digital
// reference signal.
//
// Interface: kf_i is |Kf| and x1_i/x2_i the initial conditions, all DATA_W
// fixed point with FRAC_W fraction bits. load_i (synchronous, has priority
// over en_i) copies x1_i/x2_i into the registers. c_o = x1 is valid during
// the cycle, so the bit for c[n] must arrive in that same cycle. The
// synchronous load and the asynchronous clear are this design's own choice.
module osc_loop
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
  input  logic    bit_i,
  output sample_t c_o
);

  sample_t x1_q, x2_q;
  sample_t shifted, kc_x1, f, x1_d;
  logic    mux_sel;

  always_comb begin
    shifted = x1_q <<< 1;
    kc_x1   = (mode_i == MODE_HF) ? -shifted : shifted;
    mux_sel = bit_i ^ (mode_i == MODE_HF);
    f       = mux_sel ? -kf_i : kf_i;
    x1_d    = kc_x1 - x2_q + f;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      x1_q <= '0;
      x2_q <= '0;
    end else if (load_i) begin
      x1_q <= x1_i;
      x2_q <= x2_i;
    end else if (en_i) begin
      x1_q <= x1_d;
      x2_q <= x1_q;
    end
  end

  assign c_o = x1_q;

  // The next state must fit the word: with |Kc| = 2 the exact value is
  // recomputed two bits wider and compared. An overflow means the
  // coefficients or initial conditions are outside the usable range.
  logic signed [DATA_W+1:0] x1_wide;
  assign x1_wide = (mode_i == MODE_HF ? -2 : 2) * (DATA_W+2)'(x1_q) - (DATA_W+2)'(x2_q)
                   + (DATA_W+2)'(f);

  a_no_overflow : assert property (@(posedge clk_i)
    (en_i && !load_i) |-> (x1_wide == (DATA_W+2)'(x1_d)))
    else $error("osc_loop: state overflow");

endmodule
