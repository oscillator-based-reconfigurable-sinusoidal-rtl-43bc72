// dac_1bit_tb -- self-checking test of the 1-bit DAC model.
//
// Applies random bits and checks that the output settles to +VREF for a 1
// and -VREF for a 0 after the settling delay, and has not yet changed half a
// settling time after an input change. Runs with a non-default VREF.
module dac_1bit_tb;

  localparam real VREF = 0.9;
  localparam int  TS   = 4;

  logic bit_s = 0;
  real  v;
  int   checks = 0, failures = 0;

  dac_1bit #(.VREF(VREF), .T_SETTLE(TS)) dut (.bit_i(bit_s), .vout_o(v));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    #(TS * 2);
    checks++;
    if (v != -VREF) begin failures++; $display("FAIL initial level %f", v); end
    for (int n = 0; n < 500; n++) begin
      b = 1'($urandom);
      if (b != bit_s) begin
        bit_s = b;
        #(TS / 2);
        checks++;
        if (v != (b ? -VREF : VREF)) begin failures++; $display("FAIL too early %f", v); end
        #(TS);
      end else begin
        #(TS);
      end
      checks++;
      if (v != (b ? VREF : -VREF)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d bit=%0b v=%f", n, b, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
