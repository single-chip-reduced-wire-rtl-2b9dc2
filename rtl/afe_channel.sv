// afe_channel: behavioural model of one analog front-end channel. This is not
// synthesizable logic. It wraps the analog parts of one element.
//
// Transmit: the beamformer pulse drives the HV pulser, whose output goes to the
// element (v_pulser). Receive: the element's echo passes the Tx/Rx switch
// (open while tx_active), is amplified by the VG-LNA at the selected gain and
// leaves through the channel buffer (v_rx) to the TDM. The buffer is ideal
// unity gain here. The chain order follows the chip's block diagram. The ideal
// buffer is this model's simplification.
module afe_channel
  import ice_pkg::*;
(
  input  logic               pulse,
  input  logic               tx_active,
  input  logic [RXCFG_W-1:0] gain,
  input  real                echo_in,
  output real                v_pulser,
  output real                v_rx
);

  real v_sw;

  hv_pulser u_pulser (
    .pulse_in(pulse),
    .v_out   (v_pulser)
  );

  txrx_switch u_switch (
    .v_elem   (echo_in),
    .tx_active(tx_active),
    .v_rx     (v_sw)
  );

  vg_lna u_lna (
    .v_in (v_sw),
    .gain (gain),
    .v_out(v_rx)
  );

endmodule
