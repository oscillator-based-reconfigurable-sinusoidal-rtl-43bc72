// sdm_unity_stf_tb -- self-checking test of the reconfigurable 1-bit
// sigma-delta modulator.
//
// The reference is an independent error-feedback model with the same noise
// transfer function: v = x - Kc*q[n-1] + q[n-2], y = sign(v), q = y - v
// (Kc = +2 low-pass, -2 high-pass). Every output bit is compared with it.
// The unity signal transfer function is checked on its own: for a DC input in
// low-pass mode the running sum of (y - x) must stay bounded, because the
// NTF (1 - z^-1)^2 has a double zero at DC; for an input x*(-1)^n in high-pass
// mode the same holds for (-1)^n*(y - x[n]). The inputs cover sines of
// amplitude 0.7 near DC and near fclk/2 as well.
module sdm_unity_stf_tb;
  import siggen_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  mode_e mode = MODE_LF;
  sample_t x = '0;
  logic bit_s;
  int checks = 0, failures = 0;

  sdm_unity_stf dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr),
    .mode_i(mode), .x_i(x), .bit_o(bit_s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint ONE = longint'(1) << FRAC_W;
  longint q1, q2, acc, worst;

  // Run n samples of a generator; kind 0: DC, 1: sine at low frequency,
  // 2: sine times (-1)^n. The accumulated, demodulated error is checked.
  task automatic run(mode_e m, int kind, real amp, int n_samp);
    longint v, y, xs, kc, d;
    real ph;
    clr = 1; @(posedge clk); #1; clr = 0;
    mode = m; q1 = 0; q2 = 0; acc = 0; worst = 0;
    kc = (m == MODE_HF) ? -2 : 2;
    for (int n = 0; n < n_samp; n++) begin
      ph = 2.0 * 3.14159265358979 * 0.001 * n;
      case (kind)
        0: xs = longint'(amp * ONE);
        1: xs = longint'(amp * $sin(ph) * ONE);
        default: xs = longint'(amp * $sin(ph) * ONE) * ((n % 2) ? -1 : 1);
      endcase
      x = sample_t'(xs);
      v = xs - kc * q1 + q2;
      y = (v >= 0) ? ONE : -ONE;
      #1;
      checks++;
      if (bit_s !== (y > 0)) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d kind=%0d n=%0d bit=%0b", m, kind, n, bit_s);
      end
      d = y - xs;
      acc += (m == MODE_HF && n % 2) ? -d : d;
      if (acc > worst) worst = acc;
      if (-acc > worst) worst = -acc;
      q2 = q1; q1 = y - v;
      @(posedge clk); #1;
    end
    // Bounded accumulated error: the signal passes with unity gain.
    checks++;
    if (worst > 4 * ONE) begin
      failures++;
      $display("FAIL unity STF mode=%0d kind=%0d worst=%f", m, kind, real'(worst) / ONE);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    en = 1;
    run(MODE_LF, 0, 0.3, 4000);
    run(MODE_LF, 0, -0.55, 4000);
    run(MODE_LF, 1, 0.7, 6000);
    run(MODE_HF, 2, 0.7, 6000);
    run(MODE_HF, 2, 0.4, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
