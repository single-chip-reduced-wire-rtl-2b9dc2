// txrx_switch: behavioural model of the Tx/Rx protection switch. This is not
// synthesizable logic. It stands for an analog high-voltage switch.
//
// It sits between the element and the low-voltage receive chain. While
// tx_active is high the switch is open, so the LNA input sits at 0 V and never
// sees the pulser voltage. Otherwise the element voltage passes through
// unchanged. Protecting the receive circuits during transmit follows the chip
// description. Driving the switch from the beamformer's firing window is this
// design's own choice.
module txrx_switch (
  input  real  v_elem,
  input  logic tx_active,
  output real  v_rx
);

  assign v_rx = tx_active ? 0.0 : v_elem;

endmodule
