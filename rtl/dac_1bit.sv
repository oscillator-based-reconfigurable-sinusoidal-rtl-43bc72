// dac_1bit -- behavioural model of the 1-bit DAC that turns the sigma-delta
// bit stream into the two-level analog stimulus (not synthesizable logic: it
// stands for an analog cell).
//
// bit_i = 1 drives +VREF, bit_i = 0 drives -VREF, after a settling delay of
// T_SETTLE time units. A single-bit DAC has only two levels and is therefore
// linear by construction. VREF and the settling delay are this model's own
// choice; the design only specifies a 1-bit DAC. The output feeds the
// analog smoothing filter, which is outside this RTL.
module dac_1bit #(
  parameter real VREF     = 1.0,
  parameter int  T_SETTLE = 1
) (
  input  logic bit_i,
  output real  vout_o
);

  real level;

  always_comb level = bit_i ? VREF : -VREF;

  always @(level) vout_o <= #(T_SETTLE) level;

endmodule
