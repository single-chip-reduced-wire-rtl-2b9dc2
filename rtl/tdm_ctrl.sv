// tdm_ctrl: digital counting logic of the 8:1 receive time-division multiplexer.
//
// A 3-bit slot counter advances on every clock. At 200 MHz each of the 8
// channels sharing one output gets one 5 ns slot every 8 clocks, which is
// 25 MS/s per channel. sh_sel is the one-hot select for the sample-and-hold
// switches, and slot is its binary index. All 8 TDM blocks use the same slot
// at the same time. frame marks slot 0, where the backend can align its
// channel count. The link-training request (an external control line) passes
// through two flip-flops and comes out on train. While train is high the TDM
// blocks send known levels instead of channel data. The receiver uses them to
// set its sampling phase and identify the slots.
//
// Timing: after reset slot is 0. It reads k during the k-th clock after reset
// (modulo 8). train follows train_req two clocks later.
//
// The 8:1 ratio, the per-channel rate and the link-training purpose follow the
// receive-path description. The free-running counter, kept apart from the
// transmit counters, and the two-flop input stage are this design's own
// choices.
module tdm_ctrl
  import ice_pkg::*;
#(
  parameter int unsigned RATIO = TDM_RATIO
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     train_req,
  output logic [$clog2(RATIO)-1:0] slot,
  output logic [RATIO-1:0]         sh_sel,
  output logic                     frame,
  output logic                     train
);

  logic train_meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot       <= '0;
      train_meta <= 1'b0;
      train      <= 1'b0;
    end else begin
      slot       <= (slot == $clog2(RATIO)'(RATIO - 1)) ? '0 : slot + 1'b1;
      train_meta <= train_req;
      train      <= train_meta;
    end
  end

  always_comb begin
    sh_sel       = '0;
    sh_sel[slot] = 1'b1;
  end

  assign frame = (slot == '0);

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sh_sel));

endmodule
