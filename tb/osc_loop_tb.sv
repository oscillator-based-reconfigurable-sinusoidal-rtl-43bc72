// osc_loop_tb -- self-checking test of the two-register resonator loop.
//
// Open loop: random bits drive the Kf multiplexer and the state is compared
// every cycle with c[n+1] = Kc*c[n] - c[n-1] - Kf*s[n], computed here from
// the coefficient values (Kc = +2, Kf = +|Kf| in low-frequency mode;
// Kc = -2, Kf = -|Kf| in high-frequency mode; s = +1 for bit 1, -1 for 0).
// The closed loop through the modulator is tested at the top level. Also
// checks the load of the initial conditions, the hold when en_i is low and
// the filter view of the loop: a constant bit into the low-pass form gives
// the double-integrator response c[n] = -Kf*n*(n+1)/2 from rest, and an
// alternating bit into the high-pass form gives (-1)^n times the same.
module osc_loop_tb;
  import siggen_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, load = 0, bit_s = 0;
  mode_e mode = MODE_LF;
  sample_t kf = KF_MAIN, x1 = X1_MAIN, x2 = X2_MAIN, c;
  int checks = 0, failures = 0;

  osc_loop dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .load_i(load), .mode_i(mode),
    .kf_i(kf), .x1_i(x1), .x2_i(x2), .bit_i(bit_s), .c_o(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m1, m2;   // model c[n], c[n-1]

  task automatic expect_c(longint val, string what);
    checks++;
    if (c !== sample_t'(val)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: c=%0d expected %0d", what, c, sample_t'(val));
    end
  endtask

  task automatic do_load(mode_e m, longint a, longint b);
    mode = m; x1 = sample_t'(a); x2 = sample_t'(b);
    load = 1; @(posedge clk); #1; load = 0;
    m1 = a; m2 = b;
    expect_c(a, "load");
  endtask

  task automatic random_run(mode_e m, longint kfv, int n_samp);
    longint kc, kfs, s, nxt;
    kf = sample_t'(kfv);
    do_load(m, longint'($urandom_range(0, 2048)) - 1024, longint'($urandom_range(0, 2048)) - 1024);
    kc  = (m == MODE_HF) ? -2 : 2;
    kfs = (m == MODE_HF) ? -kfv : kfv;
    for (int n = 0; n < n_samp; n++) begin
      bit_s = 1'($urandom);
      s = bit_s ? 1 : -1;
      nxt = kc * m1 - m2 - kfs * s;
      @(posedge clk); #1;
      m2 = m1; m1 = nxt;
      expect_c(m1, "random");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_c(0, "reset");
    en = 1;
    // Step response from rest: low-pass form, bit held at 1 (s = +1).
    kf = KF_MAIN;
    do_load(MODE_LF, 0, 0);
    bit_s = 1;
    for (int n = 1; n < 300; n++) begin
      @(posedge clk); #1;
      expect_c(-longint'(KF_MAIN) * n * (n + 1) / 2, "lp step");
    end
    // High-pass form: the same double-integrator response, modulated by
    // (-1)^n, for an alternating bit (1 on even steps, 0 on odd steps; the
    // mux control is inverted by MODE).
    do_load(MODE_HF, 0, 0);
    for (int n = 1; n < 300; n++) begin
      bit_s = ((n - 1) % 2 == 0);
      @(posedge clk); #1;
      expect_c(((n % 2) ? -1 : 1) * (-longint'(KF_MAIN) * n * (n + 1) / 2), "hp step");
    end
    // Random bit streams, several coefficients.
    for (int r = 0; r < 8; r++) begin
      random_run(mode_e'(r % 2), longint'(1) << (r % 4 + 1), 1000);
    end
    // Hold with en low.
    en = 0;
    begin
      sample_t held;
      held = c;
      repeat (5) @(posedge clk);
      #1 checks++;
      if (c !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
