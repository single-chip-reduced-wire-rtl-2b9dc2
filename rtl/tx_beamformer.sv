// tx_beamformer: programmable transmit beamformer for all channels.
//
// One serial data line loads the whole firing profile. It enters channel 1,
// passes through each channel's 16-bit register in turn (tx_channel) and then
// through the global control registers (tx_global_control). The FPGA sends
// the bits that travel farthest first: the start word, the Rx configuration,
// the mod value and the pulse count, then the word for channel N_CH, and so on
// down to the word for channel 1. Each field goes MSB first. With 64 channels
// the packet is 1040 bits, which takes 1040 clocks (5.2 us at 200 MHz).
//
// latch rises in the cycle the last bit is stored, when the start word reaches
// its register. latch locks every register. The shared coarse and mod
// counters then run, and each channel emits its delayed, width-apodized pulse
// train on pulse[i] (channel i+1). tx_active is high during the firing window.
// It drives the Tx/Rx switches. rx_cfg is the programmed VG-LNA gain code.
// Registers are reset before each new profile is loaded.
//
// The chain order and the register widths follow the beamformer description.
// The channel-word layout is this design's own choice (see tx_channel), as is
// the end of the firing window (see tx_counter11).
module tx_beamformer
  import ice_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               data,
  output logic [N-1:0]       pulse,
  output logic               latch,
  output logic               tx_active,
  output logic [RXCFG_W-1:0] rx_cfg,
  output logic [CC_W-1:0]    cc,
  output logic [MC_W-1:0]    mc,
  output logic [PC_W-1:0]    pc
);

  logic [N:0] chain;   // chain[0] = data in, chain[N] = out of the last channel
  logic       run;

  assign chain[0]  = data;
  assign tx_active = run;

  for (genvar i = 0; i < N; i++) begin : g_ch
    tx_channel u_ch (
      .clk  (clk),
      .rst_n(rst_n),
      .sin  (chain[i]),
      .sout (chain[i+1]),
      .latch(latch),
      .run  (run),
      .cc   (cc),
      .mc   (mc),
      .pc   (pc),
      .pulse(pulse[i])
    );
  end

  tx_global_control u_global (
    .clk   (clk),
    .rst_n (rst_n),
    .sin   (chain[N]),
    .latch (latch),
    .run   (run),
    .cc    (cc),
    .mc    (mc),
    .pc    (pc),
    .rx_cfg(rx_cfg)
  );

endmodule
