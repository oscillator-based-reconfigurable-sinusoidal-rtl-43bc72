// rcfg_integrator -- reconfigurable integrator block I(z) of the unity-STF
// sigma-delta modulator.
//
// Transfer function from e_i to w_o:
//   I(z) = (Kc*z^-1 - z^-2) / (1 - Kc*z^-1 + z^-2),  Kc = +2 (MODE_LF) or -2 (MODE_HF)
// which is (2z^-1 - z^-2)/(1-z^-1)^2 in low-frequency mode and
// (-2z^-1 - z^-2)/(1+z^-1)^2 in high-frequency mode.
//
// Structure: two registers hold g[n-1] and g[n-2], where g = e + w. The output
// is w[n] = Kc*g[n-1] - g[n-2] (one shift, a conditional inversion for
// Kc = -2, one adder) and the next state is g[n] = e[n] + w[n] (second adder).
// Two registers, one shift and two adders, shared by both modes, as the
// design calls for; arranging the registers on g rather than on e and w is
// this design's own choice.
//
// Timing: w_o depends only on the registers (and mode_i), so it is valid at the
// start of the cycle; e_i is sampled on the rising edge when en_i is high.
// clr_i synchronously clears both registers; rst_ni clears them
// asynchronously.
module rcfg_integrator
  import siggen_pkg::*;
#(
  parameter int unsigned W = MOD_W
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                en_i,
  input  logic                clr_i,
  input  mode_e               mode_i,
  input  logic signed [W-1:0] e_i,
  output logic signed [W-1:0] w_o
);

  logic signed [W-1:0] g1_q, g2_q;     // g[n-1], g[n-2]
  logic signed [W-1:0] g1_x2, kc_g1;   // 2*g[n-1], Kc*g[n-1]

  always_comb begin
    g1_x2 = g1_q <<< 1;
    kc_g1 = (mode_i == MODE_HF) ? -g1_x2 : g1_x2;
    w_o   = kc_g1 - g2_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      g1_q <= '0;
      g2_q <= '0;
    end else if (clr_i) begin
      g1_q <= '0;
      g2_q <= '0;
    end else if (en_i) begin
      g1_q <= e_i + w_o;
      g2_q <= g1_q;
    end
  end

endmodule
