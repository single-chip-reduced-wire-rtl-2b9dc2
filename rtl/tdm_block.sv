// tdm_block: behavioural model of one analog 8:1 TDM block (sample-and-hold
// switches plus analog multiplexer). This is not synthesizable logic. It
// models an analog circuit with real-valued voltages.
//
// Each block serves 8 adjacent channels (block b: channels 8b..8b+7). On every
// clock edge the channel whose switch is closed (one-hot sh_sel) is sampled and held on out for one
// slot, so out carries the channels in turn, each once every 8 clocks. When
// train is high, the link-training switch replaces the channel signal with a
// known level, k * TRAIN_STEP volts for slot k. The ramp shows the receiver where each
// slot lies and which channel number it carries.
//
// Timing: out changes only on the rising clock edge. In the cycle after an
// edge where sh_sel[k] is set, it holds the value channel k had at that edge.
//
// The 8-channel block, the sample-and-hold switches and the link-training
// switch follow the receive-path description. The channel grouping, the
// training levels and the ideal one-clock hold are this design's own choices.
module tdm_block
  import ice_pkg::*;
#(
  parameter int unsigned RATIO      = TDM_RATIO,
  parameter real         TRAIN_STEP = 0.1
) (
  input  logic                     clk,
  input  real                      ch_in [RATIO],
  input  logic [RATIO-1:0]         sh_sel,
  input  logic                     train,
  output real                      out
);

  initial out = 0.0;

  // The closed switch (one-hot sh_sel) decides which channel is held.
  always @(posedge clk) begin
    real v;
    v = 0.0;
    for (int k = 0; k < RATIO; k++)
      if (sh_sel[k]) v = train ? TRAIN_STEP * real'(k) : ch_in[k];
    out <= v;
  end

endmodule
