// tx_channel: one transmit-beamformer channel.
//
// A 16-bit serial-in parallel-out shift register holds the channel's profile:
// coarse delay [15:10], fine delay [9:5] and pulse width [4:0] (see
// ice_pkg::ch_profile_t). Bits enter at sin and leave at sout, MSB first, so
// the 64 channels form one long chain on a single data line. When latch is
// high the register stops shifting and keeps its contents. It stays locked
// until reset.
//
// The pulse generator compares the shared coarse and mod counts (cc, mc) with
// the stored delay. The first pulse starts when cc == coarse and mc == fine.
// Another pulse starts each time mc returns to fine, one mod period later,
// until pc+1 pulses have been sent. This is the multi-pulse (Doppler) firing.
// Each pulse stays high for 'width' clock cycles, counted by a local
// down-counter. Width 0 keeps the element silent. This is pulse-width
// apodization. The pulse output is registered: it rises on the clock edge
// after the counter state that matches the delay.
//
// The register size, the delay resolution (one 5 ns clock) and the counter
// inputs follow the beamformer description. The order of the fields inside
// the word and the local width counter are this design's own choices. A
// width at or above the mod period merges consecutive pulses into one.
module tx_channel
  import ice_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sin,
  output logic            sout,
  input  logic            latch,
  input  logic            run,
  input  logic [CC_W-1:0] cc,
  input  logic [MC_W-1:0] mc,
  input  logic [PC_W-1:0] pc,
  output logic            pulse
);

  ch_profile_t     prof;
  logic            started;
  logic [PC_W-1:0] n_sent;   // pulses sent so far, minus one
  logic [4:0]      wcnt;     // remaining high cycles, minus one
  logic            fire;

  // Serial-in parallel-out profile register, locked by latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prof <= '0;
    else if (!latch) prof <= {prof[CH_SR_W-2:0], sin};
  end

  assign sout = prof[CH_SR_W-1];

  // A pulse starts at the programmed delay, then once per mod period.
  always_comb begin
    fire = 1'b0;
    if (run && mc == prof.fine) begin
      if (!started) fire = (cc == prof.coarse);
      else          fire = (n_sent != pc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      n_sent  <= '0;
      wcnt    <= '0;
      pulse   <= 1'b0;
    end else begin
      if (fire) begin
        started <= 1'b1;
        n_sent  <= started ? n_sent + 1'b1 : '0;
      end
      if (fire && prof.width != '0) begin
        pulse <= 1'b1;
        wcnt  <= prof.width - 1'b1;
      end else if (pulse) begin
        if (wcnt == '0) pulse <= 1'b0;
        else            wcnt  <= wcnt - 1'b1;
      end
    end
  end

endmodule
