// tx_counter11: the beamformer's 11-bit firing-time counter.
//
// A 5-bit mod counter (mc) counts 0..mod_val and wraps. A 6-bit coarse
// counter (cc) counts the wraps. With mod_val = 31 the pair {cc, mc} is a
// plain 11-bit counter of 5 ns clocks, which reaches 2047 cycles (10.235 us)
// of transmit delay. A smaller mod_val shortens the mod period. That period
// is also the repetition period of multi-pulse firing.
//
// Counting runs while start (the beamformer's latch) is high. Both counters
// read 0 in the first latched cycle and advance on every clock edge after it.
// cc saturates at 63. A 4-bit tail count then counts pc+1 further mod periods
// so that channels with the largest delay can send all their pulses. After
// that the window closes: run falls and stays low until reset. With pc in
// 0..7, run is high for exactly (64 + pc + 1) * (mod_val + 1) cycles.
//
// The widths of the two counters and the role of each come from the
// beamformer description. The programmable modulus, the saturation and the
// tail count that ends the window are this design's own choices.
module tx_counter11
  import ice_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [MC_W-1:0] mod_val,
  input  logic [PC_W-1:0] pc,
  output logic [CC_W-1:0] cc,
  output logic [MC_W-1:0] mc,
  output logic            run
);

  logic [PC_W:0]   tail;     // mod periods counted after cc reached 63
  logic            done;
  logic            wrap;

  assign run  = start && !done;
  assign wrap = (mc == mod_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cc   <= '0;
      mc   <= '0;
      tail <= '0;
      done <= 1'b0;
    end else if (run) begin
      if (wrap) begin
        mc <= '0;
        if (cc != '1)        cc   <= cc + 1'b1;
        else if (tail != {1'b0, pc} + 1'b1) tail <= tail + 1'b1;
        else                 done <= 1'b1;
      end else begin
        mc <= mc + 1'b1;
      end
    end
  end

endmodule
