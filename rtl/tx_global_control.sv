// tx_global_control: global control section of the transmit beamformer.
//
// This section is the tail of the profile shift chain. Serial data arriving
// from the last channel passes through four registers in turn: a 3-bit
// register holding the pulse count pc, a 5-bit register holding the mod
// counter value, a 2-bit register holding the Rx gain configuration and a
// 6-bit register holding the start word. The four are kept as one 16-bit
// register with named fields (ice_pkg::global_profile_t). It shifts exactly
// like the four registers in series.
//
// A comparator on the 6-bit register raises latch when the register holds
// ice_pkg::SYNC_WORD. Every register is cleared by reset before loading, so
// this happens exactly when all 1040 packet bits are in place. latch stops
// all shifting along the chain and starts the 11-bit counter (tx_counter11).
// latch is combinational from the register: it goes high in the same cycle
// the last bit is stored and stays high until reset.
//
// The chain order, the register widths and the shared outputs (cc, mc, pc,
// Rx configuration, latch) follow the beamformer description. Reading "CP"
// as a comparator and the value of the start word are this design's own
// choices.
module tx_global_control
  import ice_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sin,
  output logic               latch,
  output logic               run,
  output logic [CC_W-1:0]    cc,
  output logic [MC_W-1:0]    mc,
  output logic [PC_W-1:0]    pc,
  output logic [RXCFG_W-1:0] rx_cfg
);

  global_profile_t g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      g <= '0;
    else if (!latch) g <= {g[GLOBAL_W-2:0], sin};
  end

  assign latch  = (g.sync == SYNC_WORD);
  assign pc     = g.pc;
  assign rx_cfg = g.rx_cfg;

  tx_counter11 u_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (latch),
    .mod_val(g.mod_val),
    .pc     (g.pc),
    .cc     (cc),
    .mc     (mc),
    .run    (run)
  );

endmodule
