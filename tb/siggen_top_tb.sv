// siggen_top_tb -- end-to-end test of the reconfigurable sinusoidal signal
// generator at its default parameters, with the main configuration
// (|Kf| = 2**-17, x1(0) = 2**-9, x2(0) = 0).
//
// Sequence: low-frequency mode for 65,536 samples (one 64K-point FFT record),
// switch to high-frequency mode for another 65,536 samples, switch back to
// low-frequency mode for 5,000 samples, then a hold with en low.
//
// Checks, every sample:
//   * bit_o and ref_o against an independent model of the closed loop, in
//     which the modulator is written in error-feedback form
//     (v = x - Kc*q[n-1] + q[n-2], q = y - v) rather than as the integrator
//     block of the design;
//   * the DAC output level against the bit.
// Checks per run, against the closed-form oscillator equations:
//   * amplitude: A = x1(0)/sin(w), w = acos((Kc-Kf)/2), within 0.5 %;
//   * period between upward zero crossings: 2*pi/w samples (LF), and the
//     envelope period of (-1)^n*ref in HF, within 2 samples;
//   * HF: nearly every pair of samples changes sign (a tone at ~fclk/2);
//   * the bit stream averaged over 512 samples equals the reference
//     averaged over the same samples (unity signal transfer), demodulated by
//     (-1)^n in HF mode.
// Mechanism counters: loads, LF and HF samples, mode switches, each
// multiplexer choice (+|Kf| / -|Kf|) in each mode and cycles held; each must
// be seen at least once.
module siggen_top_tb;
  import siggen_pkg::*;

  localparam int N_REC = 65536;

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  mode_e mode = MODE_LF;
  sample_t kf = KF_MAIN, x1 = X1_MAIN, x2 = X2_MAIN;
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

  localparam longint ONE = longint'(1) << FRAC_W;
  localparam real    PI  = 3.14159265358979;

  // Model state.
  longint mc1, mc2, mq1, mq2;
  // Mechanism counters.
  int n_load, n_lf, n_hf, n_switch, n_hold;
  int n_mux[2][2];   // [mode][mux select]
  mode_e last_mode = MODE_LF;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  task automatic do_load(mode_e m);
    if (m != last_mode) n_switch++;
    last_mode = m;
    mode = m;
    load = 1; @(posedge clk); #1; load = 0;
    n_load++;
    mc1 = longint'(x1); mc2 = longint'(x2); mq1 = 0; mq2 = 0;
    checks++;
    if (ref_s !== x1) fail("initial condition not loaded");
  endtask

  // Run n samples in the current mode and check everything listed above.
  task automatic run(int n_samp);
    longint kc, kfs, v, y, xq, nxt, s;
    longint win_y, win_c;
    real amp_exp, per_exp, w, vmax, vmin, d, first_zc, last_zc;
    int n_zc, n_alt;
    real prev;
    logic prev_neg;
    kc  = (mode == MODE_HF) ? -2 : 2;
    kfs = (mode == MODE_HF) ? -longint'(kf) : longint'(kf);
    w = $acos((real'(kc) - real'(kfs) / ONE) / 2.0);
    if (mode == MODE_HF) w = PI - w;           // envelope frequency
    amp_exp = (real'(x1) / ONE) / $sin(w);
    per_exp = 2.0 * PI / w;
    vmax = -10.0; vmin = 10.0; n_zc = 0; n_alt = 0; prev = 0.0;
    first_zc = 0; last_zc = 0; prev_neg = 0; win_y = 0; win_c = 0;
    for (int n = 0; n < n_samp; n++) begin
      // model, sample n
      xq = mc1;
      v  = xq - kc * mq1 + mq2;
      y  = (v >= 0) ? ONE : -ONE;
      s  = (v >= 0) ? 1 : -1;
      checks += 2;
      if (ref_s !== sample_t'(mc1)) fail($sformatf("ref n=%0d got %0d exp %0d", n, ref_s, mc1));
      if (bit_s !== (v >= 0)) fail($sformatf("bit n=%0d", n));
      n_mux[mode][bit_s ^ (mode == MODE_HF)]++;
      if (mode == MODE_HF) n_hf++; else n_lf++;
      // signal statistics, demodulated in HF mode
      d = real'(ref_s) / ONE;
      if (mode == MODE_HF && n % 2 == 1) d = -d;
      if (d > vmax) vmax = d;
      if (d < vmin) vmin = d;
      if (n > 0 && prev < 0.0 && d >= 0.0) begin
        if (n_zc == 0) first_zc = n;
        last_zc = n;
        n_zc++;
      end
      if (n > 0 && ((ref_s < 0) != prev_neg)) n_alt++;
      prev_neg = (ref_s < 0);
      prev = d;
      win_y += (mode == MODE_HF && n % 2 == 1) ? -y : y;
      win_c += (mode == MODE_HF && n % 2 == 1) ? -mc1 : mc1;
      if (n % 512 == 511) begin
        checks++;
        if ((win_y - win_c) / 512 > ONE / 25 || (win_c - win_y) / 512 > ONE / 25)
          fail($sformatf("bit stream average off the reference at n=%0d", n));
        win_y = 0; win_c = 0;
      end
      // model, next state
      nxt = kc * mc1 - mc2 - kfs * s;
      mq2 = mq1; mq1 = y - v;
      mc2 = mc1; mc1 = nxt;
      #1;
      checks++;
      if (dac_v != (bit_s ? 1.0 : -1.0)) fail("dac level");
      @(posedge clk); #1;
    end
    checks += 3;
    if (vmax < amp_exp * 0.995 || vmax > amp_exp * 1.005 ||
        -vmin < amp_exp * 0.995 || -vmin > amp_exp * 1.005)
      fail($sformatf("amplitude %f/%f, expected %f", vmax, vmin, amp_exp));
    if (n_zc >= 2) begin
      if ((last_zc - first_zc) / (n_zc - 1) > per_exp + 2.0 ||
          (last_zc - first_zc) / (n_zc - 1) < per_exp - 2.0)
        fail($sformatf("period %f, expected %f", (last_zc - first_zc) / (n_zc - 1), per_exp));
    end else fail("fewer than two zero crossings");
    if (mode == MODE_HF) begin
      if (real'(n_samp - n_alt) > 0.01 * n_samp) fail("HF tone does not alternate");
    end
    $display("mode=%0d samples=%0d amplitude=%f (exp %f) period=%f (exp %f)",
             mode, n_samp, vmax, amp_exp,
             (n_zc >= 2) ? (last_zc - first_zc) / (n_zc - 1) : 0.0, per_exp);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    en = 1;
    do_load(MODE_LF);
    run(N_REC);
    do_load(MODE_HF);
    run(N_REC);
    do_load(MODE_LF);
    run(5000);
    // hold: en low freezes both outputs
    en = 0;
    begin
      sample_t held;
      held = ref_s;
      for (int i = 0; i < 10; i++) begin
        @(posedge clk); #1;
        n_hold++;
        checks++;
        if (ref_s !== held) fail("hold");
      end
    end
    $display("loads=%0d lf=%0d hf=%0d switches=%0d hold=%0d mux lf -/+=%0d/%0d hf -/+=%0d/%0d",
             n_load, n_lf, n_hf, n_switch, n_hold,
             n_mux[0][1], n_mux[0][0], n_mux[1][1], n_mux[1][0]);
    checks += 9;
    if (n_load == 0) fail("no load");
    if (n_lf == 0) fail("no LF sample");
    if (n_hf == 0) fail("no HF sample");
    if (n_switch < 2) fail("mode not switched both ways");
    if (n_hold == 0) fail("no hold");
    if (n_mux[0][0] == 0) fail("LF mux +Kf never chosen");
    if (n_mux[0][1] == 0) fail("LF mux -Kf never chosen");
    if (n_mux[1][0] == 0) fail("HF mux +Kf never chosen");
    if (n_mux[1][1] == 0) fail("HF mux -Kf never chosen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
