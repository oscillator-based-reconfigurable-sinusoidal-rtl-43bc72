// siggen_tuning_tb -- frequency, amplitude and phase programming of the
// generator, default parameters, both modes.
//
// For a set of coefficients |Kf| and initial conditions
// (x1(0), x2(0)), the generator is loaded and run for three tone periods.
// The expected tone follows from the resonator equations:
//   w   = acos(1 - |Kf|/2)          (LF tone; HF envelope)
//   wt  = w (LF) or pi - w (HF)     (tone of the raw signal)
//   phi = atan2(x1 sin wt, x1 cos wt - x2)
//   A   = x1 / sin(phi)
// so c[n] = A sin(wt n + phi). Checked: the largest and smallest sample of
// c (of (-1)^n c in HF mode) within 0.5 % of A, the mean period between
// upward zero crossings within 0.5 % of 2 pi / w, and every sample within
// 1 % of A of the predicted waveform over the first period. |Kf| runs from
// 2**-11 to 2**-17: the coefficient is meant to be small, and a larger one
// injects more modulator noise into the loop.
module siggen_tuning_tb;
  import siggen_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real ONE = real'(longint'(1) << FRAC_W);

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  mode_e mode = MODE_LF;
  sample_t kf, x1, x2;
  logic bit_s;
  sample_t ref_s;
  real dac_v;
  int checks = 0, failures = 0;

  siggen_top dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .load_i(load), .mode_i(mode),
    .kf_i(kf), .x1_i(x1), .x2_i(x2),
    .bit_o(bit_s), .ref_o(ref_s), .dac_v_o(dac_v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tone(mode_e m, int kf_exp, real x1r, real x2r);
    real w, wt, phi, amp, per, d, prev, vmax, vmin, first_zc, last_zc, pred, worst;
    int n_zc, n_samp;
    kf = sample_t'(longint'(1) << (FRAC_W - kf_exp));
    x1 = sample_t'(longint'(x1r * ONE));
    x2 = sample_t'(longint'(x2r * ONE));
    w   = $acos(1.0 - real'(kf) / ONE / 2.0);
    wt  = (m == MODE_HF) ? PI - w : w;        // tone of the raw signal
    phi = $atan2(real'(x1) / ONE * $sin(wt), real'(x1) / ONE * $cos(wt) - real'(x2) / ONE);
    amp = (real'(x1) / ONE) / $sin(phi);
    per = 2.0 * PI / w;
    n_samp = int'(3.0 * per) + 2;
    mode = m;
    load = 1; @(posedge clk); #1; load = 0;
    vmax = -10.0; vmin = 10.0; n_zc = 0; prev = 0.0; first_zc = 0; last_zc = 0; worst = 0.0;
    for (int n = 0; n < n_samp; n++) begin
      d = real'(ref_s) / ONE;
      if (m == MODE_HF && n % 2 == 1) d = -d;
      if (d > vmax) vmax = d;
      if (d < vmin) vmin = d;
      if (n > 0 && prev < 0.0 && d >= 0.0) begin
        if (n_zc == 0) first_zc = n;
        last_zc = n;
        n_zc++;
      end
      if (real'(n) < per) begin
        pred = amp * $sin(wt * n + phi);
        if (real'(ref_s) / ONE - pred > worst) worst = real'(ref_s) / ONE - pred;
        if (pred - real'(ref_s) / ONE > worst) worst = pred - real'(ref_s) / ONE;
      end
      prev = d;
      @(posedge clk); #1;
    end
    $display("mode=%0d Kf=2^-%0d x1=%f x2=%f: A=%f (exp %f) period=%f (exp %f) max dev=%f",
             m, kf_exp, x1r, x2r, (vmax - vmin) / 2.0, amp,
             (n_zc >= 2) ? (last_zc - first_zc) / (n_zc - 1) : 0.0, per, worst);
    checks += 3;
    if (vmax < amp * 0.995 || vmax > amp * 1.005 || -vmin < amp * 0.995 || -vmin > amp * 1.005) begin
      failures++; $display("FAIL amplitude");
    end
    if (n_zc < 2 || (last_zc - first_zc) / (n_zc - 1) > per * 1.005 ||
        (last_zc - first_zc) / (n_zc - 1) < per * 0.995) begin
      failures++; $display("FAIL period");
    end
    if (worst > 0.01 * amp) begin
      failures++; $display("FAIL waveform deviates from A sin(w n + phi)");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    en = 1;
    for (int mi = 0; mi < 2; mi++) begin
      tone(mode_e'(mi), 11, 0.01,   0.005);
      tone(mode_e'(mi), 13, 0.005, -0.002);
      tone(mode_e'(mi), 15, 0.0012, 0.0);
      tone(mode_e'(mi), 17, 0.001,  0.0004);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
