// siggen_spectrum_tb -- spectral test of the generator on 64K-sample records,
// main configuration (|Kf| = 2**-17, x1(0) = 2**-9, x2(0) = 0), default
// parameters, both modes.
//
// For each mode 65,536 consecutive samples of the reference word and of the
// bit stream (+/-1) are taken. In high-frequency mode both are demodulated by
// (-1)^n, which moves the tone from fclk/2 - f0 down to f0. Each record is
// weighted by the 4-term Blackman-Harris window
//   w[n] = 0.35875 - 0.48829 cos(2 pi n/N) + 0.14128 cos(4 pi n/N) - 0.01168 cos(6 pi n/N)
// and correlated with exp(-j h w0 n) at the tone frequency
// w0 = acos(1 - |Kf|/2) and its harmonics h = 2..5, giving amplitudes.
// Checks:
//   * reference fundamental amplitude = x1(0)/sin(w0) within 0.1 %;
//   * every reference harmonic below -91.3 dBc (distortion alone within the
//     91 dB signal-to-noise-and-distortion figure expected of the reference);
//   * bit stream fundamental equal to the reference fundamental within 0.1 %
//     (unity signal transfer through the modulator);
//   * every bit-stream harmonic below -90 dBc.
// The window's own leakage at these frequencies is below -125 dBc.
module siggen_spectrum_tb;
  import siggen_pkg::*;

  localparam int  N  = 65536;
  localparam int  NH = 5;
  localparam real PI = 3.14159265358979;

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
    repeat (3 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real re_c[NH], im_c[NH], re_b[NH], im_b[NH];

  task automatic record(mode_e m);
    real w0, win, wsum, c, b, sg, amp_c[NH], amp_b[NH], dbc, amp_exp;
    w0 = $acos(1.0 - real'(kf) / real'(longint'(1) << FRAC_W) / 2.0);
    amp_exp = (real'(x1) / real'(longint'(1) << FRAC_W)) / $sin(w0);
    mode = m;
    load = 1; @(posedge clk); #1; load = 0;
    wsum = 0.0;
    for (int h = 0; h < NH; h++) begin
      re_c[h] = 0.0; im_c[h] = 0.0; re_b[h] = 0.0; im_b[h] = 0.0;
    end
    for (int n = 0; n < N; n++) begin
      win = 0.35875 - 0.48829 * $cos(2.0 * PI * n / N) + 0.14128 * $cos(4.0 * PI * n / N)
            - 0.01168 * $cos(6.0 * PI * n / N);
      sg = (m == MODE_HF && n % 2 == 1) ? -1.0 : 1.0;
      c = sg * win * real'(ref_s) / real'(longint'(1) << FRAC_W);
      b = sg * win * (bit_s ? 1.0 : -1.0);
      wsum += win;
      for (int h = 0; h < NH; h++) begin
        re_c[h] += c * $cos((h + 1) * w0 * n);
        im_c[h] -= c * $sin((h + 1) * w0 * n);
        re_b[h] += b * $cos((h + 1) * w0 * n);
        im_b[h] -= b * $sin((h + 1) * w0 * n);
      end
      @(posedge clk); #1;
    end
    for (int h = 0; h < NH; h++) begin
      amp_c[h] = 2.0 * $sqrt(re_c[h] ** 2 + im_c[h] ** 2) / wsum;
      amp_b[h] = 2.0 * $sqrt(re_b[h] ** 2 + im_b[h] ** 2) / wsum;
    end
    $display("mode=%0d reference amplitude %f (expected %f), bit stream amplitude %f",
             m, amp_c[0], amp_exp, amp_b[0]);
    checks += 2;
    if (amp_c[0] < amp_exp * 0.999 || amp_c[0] > amp_exp * 1.001) begin
      failures++; $display("FAIL reference amplitude");
    end
    if (amp_b[0] < amp_c[0] * 0.999 || amp_b[0] > amp_c[0] * 1.001) begin
      failures++; $display("FAIL bit stream amplitude differs from the reference");
    end
    for (int h = 1; h < NH; h++) begin
      dbc = 20.0 * $log10(amp_c[h] / amp_c[0]);
      $display("  reference  HD%0d %7.1f dBc", h + 1, dbc);
      checks++;
      if (dbc > -91.3) begin failures++; $display("FAIL reference HD%0d", h + 1); end
      dbc = 20.0 * $log10(amp_b[h] / amp_b[0]);
      $display("  bit stream HD%0d %7.1f dBc", h + 1, dbc);
      checks++;
      if (dbc > -90.0) begin failures++; $display("FAIL bit stream HD%0d", h + 1); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    en = 1;
    record(MODE_LF);
    record(MODE_HF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
