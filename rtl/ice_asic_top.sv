// ice_asic_top: single-chip front end for a 64-element intracardiac ultrasound
// catheter. It transmits with an on-chip beamformer and receives through 8:1
// time-division multiplexing, so the catheter needs only a clock line, a data
// line, 8 signal outputs and a few supply and control wires.
//
// Transmit: a single serial line (data) loads a 1040-bit profile into
// tx_beamformer. The profile gives every element a delay in 5 ns steps (up to
// 10.235 us), a pulse width and a shared pulse count (1 to 8 pulses). It also
// sets the mod period and the Rx gain code. When the profile is in place,
// latch rises and the elements fire through their HV pulser models
// (pulser_out). tx_active marks the firing window.
//
// Receive: outside the firing window each element's echo (echo_in) passes the
// Tx/Rx switch and the VG-LNA at the programmed gain (rx_gain). It is then
// sampled by one of 8 TDM blocks. tdm_ctrl steps all blocks through the same 8
// slots at the clock rate. tdm_out[b] carries channels 8b..8b+7, one per clock,
// in slot order. tdm_slot and tdm_frame give the slot driven in the
// current cycle (tdm_out lags it by one clock). The link_train input switches
// the TDM blocks to known slot levels.
//
// The high-frequency output buffers are taken as ideal wires. Analog parts
// (pulsers, switches, LNAs, TDM sample-and-hold) are behavioural models with
// real-valued voltages. The digital beamformer and TDM counter are
// synthesizable RTL.
module ice_asic_top
  import ice_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               data,
  input  logic               link_train,
  input  real                echo_in    [N_CH],
  output real                pulser_out [N_CH],
  output real                tdm_out    [N_TDM],
  output logic               latch,
  output logic               tx_active,
  output logic [RXCFG_W-1:0] rx_gain,
  output logic [2:0]         tdm_slot,
  output logic               tdm_frame
);

  logic [N_CH-1:0]              pulse;
  logic [TDM_RATIO-1:0]         sh_sel;
  logic                         train;
  real                          v_rx [N_CH];

  tx_beamformer #(.N(N_CH)) u_txbf (
    .clk      (clk),
    .rst_n    (rst_n),
    .data     (data),
    .pulse    (pulse),
    .latch    (latch),
    .tx_active(tx_active),
    .rx_cfg   (rx_gain),
    .cc       (),   // counter state, only observed in tests
    .mc       (),
    .pc       ()
  );

  for (genvar i = 0; i < N_CH; i++) begin : g_afe
    afe_channel u_afe (
      .pulse    (pulse[i]),
      .tx_active(tx_active),
      .gain     (rx_gain),
      .echo_in  (echo_in[i]),
      .v_pulser (pulser_out[i]),
      .v_rx     (v_rx[i])
    );
  end

  tdm_ctrl #(.RATIO(TDM_RATIO)) u_tdm_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .train_req(link_train),
    .slot     (tdm_slot),
    .sh_sel   (sh_sel),
    .frame    (tdm_frame),
    .train    (train)
  );

  for (genvar b = 0; b < N_TDM; b++) begin : g_tdm
    real blk_in [TDM_RATIO];
    for (genvar k = 0; k < TDM_RATIO; k++) begin : g_in
      assign blk_in[k] = v_rx[b*TDM_RATIO + k];
    end
    tdm_block #(.RATIO(TDM_RATIO)) u_tdm (
      .clk  (clk),
      .ch_in(blk_in),
      .sh_sel(sh_sel),
      .train(train),
      .out  (tdm_out[b])
    );
  end

endmodule
