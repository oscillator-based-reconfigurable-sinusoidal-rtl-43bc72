// sdm_unity_stf -- reconfigurable 1-bit sigma-delta modulator with unity
// signal transfer function.
//
// The quantizer input is v = x + w, where w = I(z)*(x - y) comes from the
// reconfigurable integrator and y = +/-1.0 is the quantized output. This gives
//   Y(z) = X(z) + Q(z) / (1 + I(z))
// so the signal passes unchanged whatever I(z) is, and the noise transfer
// function is 1/(1+I(z)) = (1 - z^-1)^2 in MODE_LF (noise pushed away from DC,
// second-order low-pass modulator) or (1 + z^-1)^2 in MODE_HF (noise pushed
// away from fclk/2, second-order high-pass modulator).
//
// Interface: x_i is a DATA_W fixed-point sample (FRAC_W fraction bits); it is
// sign-extended to MOD_W bits inside. bit_o = 1 stands for +1.0, 0 for -1.0.
// bit_o is combinational from x_i and the integrator registers: the
// quantizer decides in the same cycle the sample is presented; the error
// is stored on the rising edge when en_i is high. clr_i clears the state.
// The unity-STF topology and the two noise transfer functions follow the
// published architecture; the +/-1.0 quantizer levels, the zero threshold
// and the word widths are this design's own choices.
module sdm_unity_stf
  import siggen_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    en_i,
  input  logic    clr_i,
  input  mode_e   mode_i,
  input  sample_t x_i,
  output logic    bit_o
);

  mod_t x_ext, w, v, y, e;

  rcfg_integrator #(.W(MOD_W)) u_integ (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (en_i),
    .clr_i  (clr_i),
    .mode_i (mode_i),
    .e_i    (e),
    .w_o    (w)
  );

  always_comb begin
    x_ext = mod_t'(x_i);
    v     = x_ext + w;
    bit_o = ~v[MOD_W-1];                 // v >= 0 -> +1.0
    y     = bit_o ? ONE_MOD : -ONE_MOD;
    e     = x_ext - y;
  end

  // The quantizer input must not wrap; with a 0.7 full-scale input it stays
  // within about +/-6, far inside the MOD_W range. Checked two bits wider.
  logic signed [MOD_W+1:0] v_wide;
  assign v_wide = (MOD_W+2)'(x_ext) + (MOD_W+2)'(w);

  a_no_wrap : assert property (@(posedge clk_i)
    en_i |-> (v_wide == (MOD_W+2)'(v)))
    else $error("sdm_unity_stf: quantizer input overflow");

endmodule
