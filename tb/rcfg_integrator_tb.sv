// rcfg_integrator_tb -- self-checking test of the reconfigurable integrator.
//
// Drives bursts of random error samples in both modes and compares w_o every
// cycle with the direct-form difference equation of I(z),
//   w[n] = Kc*w[n-1] - w[n-2] + Kc*e[n-1] - e[n-2],
// evaluated in 64-bit arithmetic and reduced to the block's width (the block
// wraps modulo 2**W, as two's-complement hardware does). Also checks the
// impulse response of the low-pass form, h[n] = n+1 for n >= 1, the clear and
// the hold when en_i is low.
module rcfg_integrator_tb;
  import siggen_pkg::*;

  localparam int unsigned W = MOD_W;

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  mode_e mode = MODE_LF;
  logic signed [W-1:0] e = '0, w;
  int checks = 0, failures = 0;

  rcfg_integrator #(.W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr),
    .mode_i(mode), .e_i(e), .w_o(w));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint w1, w2, e1, e2;   // model state

  task automatic check_w(string what);
    longint kc, wm;
    kc = (mode == MODE_HF) ? -2 : 2;
    wm = kc * w1 - w2 + kc * e1 - e2;
    checks++;
    if (w !== W'(wm)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: w=%0d expected %0d", what, w, W'(wm));
    end
  endtask

  task automatic model_clear();
    w1 = 0; w2 = 0; e1 = 0; e2 = 0;
  endtask

  task automatic step(logic signed [W-1:0] ev);
    longint kc, wm;
    kc = (mode == MODE_HF) ? -2 : 2;
    e = ev;
    #1 check_w("burst");
    wm = kc * w1 - w2 + kc * e1 - e2;
    @(posedge clk); #1;
    w2 = w1; w1 = wm; e2 = e1; e1 = longint'(ev);
  endtask

  initial begin
    model_clear();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    en = 1;
    // Impulse response of the low-pass form: 0, 2, 3, 4, 5, ...
    mode = MODE_LF;
    e = 1;
    @(posedge clk); #1;
    e = 0;
    checks++; if (w !== 2) begin failures++; $display("FAIL impulse h[1]=%0d", w); end
    for (int n = 2; n < 40; n++) begin
      @(posedge clk); #1;
      checks++;
      if (w !== W'(n + 1)) begin failures++; $display("FAIL impulse h[%0d]=%0d", n, w); end
    end
    // Impulse response of the high-pass form: (-1)^(n+1)*(n+1)
    clr = 1; @(posedge clk); #1; clr = 0;
    checks++; if (w !== 0) begin failures++; $display("FAIL clear w=%0d", w); end
    mode = MODE_HF;
    e = 1;
    @(posedge clk); #1;
    e = 0;
    for (int n = 1; n < 40; n++) begin
      checks++;
      if (w !== W'(((n % 2) ? -1 : 1) * (n + 1))) begin
        failures++; $display("FAIL hp impulse h[%0d]=%0d", n, w);
      end
      @(posedge clk); #1;
    end
    // Random bursts in both modes against the model.
    for (int b = 0; b < 40; b++) begin
      clr = 1; @(posedge clk); #1; clr = 0;
      model_clear();
      mode = mode_e'(b % 2);
      for (int n = 0; n < 200; n++) begin
        step(W'($signed($urandom_range(0, 4095)) - 2048));
      end
      // Hold: with en low the output must not move.
      en = 0;
      begin
        logic signed [W-1:0] held;
        held = w;
        repeat (3) @(posedge clk);
        #1 checks++;
        if (w !== held) begin failures++; $display("FAIL hold"); end
      end
      en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
