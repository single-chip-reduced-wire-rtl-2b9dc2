// hv_pulser: behavioural model of the high-voltage unipolar pulser, one per
// element. This is not synthesizable logic. It stands for a 60 V analog driver.
//
// The low-voltage pulse from the beamformer is shifted to the element drive
// level: V_HV while pulse_in is high, 0 V otherwise. Unipolar output, no rise
// time, no delay. The 60 V level follows the chip description. The ideal edges
// are this model's simplification.
module hv_pulser #(
  parameter real V_HV = 60.0
) (
  input  logic pulse_in,
  output real  v_out
);

  assign v_out = pulse_in ? V_HV : 0.0;

endmodule
