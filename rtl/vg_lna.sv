// vg_lna: behavioural model of the variable-gain low-noise amplifier. This is
// not synthesizable logic. It stands for an analog amplifier.
//
// The 2-bit gain code picks one of four gains: 15, 21, 27 or 32 dB, from code 0
// to code 3 (ice_pkg::lna_gain_db). Stepping the gain up as echoes come from
// deeper gives a simple time-gain compensation with no extra TGC circuit. The
// model is an ideal voltage gain of 10^(dB/20), with no bandwidth, noise or
// clipping. The four gain values follow the chip description. The code order
// is this design's own choice.
module vg_lna
  import ice_pkg::*;
(
  input  real                v_in,
  input  logic [RXCFG_W-1:0] gain,
  output real                v_out
);

  assign v_out = v_in * (10.0 ** (lna_gain_db(gain) / 20.0));

endmodule
