// ice_pkg: constants and types shared by the ICE front-end ASIC model.
//
// The chip has 64 channels. Each channel holds a 16-bit transmit profile word.
// The global control adds 16 more bits: a 3-bit pulse count, a 5-bit mod-counter
// value, a 2-bit Rx gain code and a 6-bit start word. That makes a 1040-bit
// serial packet, which takes 5.2 us to load at 200 MHz. The field widths and
// the chain order come from the beamformer description. Three things are this
// design's own choice: how the 16-bit channel word is split into fields, the
// value of the start word and the LNA gain-code order.
package ice_pkg;

  localparam int unsigned N_CH      = 64;  // transducer elements / channels
  localparam int unsigned CH_SR_W   = 16;  // per-channel profile shift register
  localparam int unsigned CC_W      = 6;   // coarse counter
  localparam int unsigned MC_W      = 5;   // mod counter
  localparam int unsigned PC_W      = 3;   // Doppler pulse-count register
  localparam int unsigned RXCFG_W   = 2;   // Rx gain configuration register
  localparam int unsigned SYNC_W    = 6;   // start-word register feeding the comparator
  localparam int unsigned GLOBAL_W  = PC_W + MC_W + RXCFG_W + SYNC_W;      // 16
  localparam int unsigned PACKET_W  = N_CH * CH_SR_W + GLOBAL_W;          // 1040
  localparam int unsigned TDM_RATIO = 8;   // channels per TDM output
  localparam int unsigned N_TDM     = N_CH / TDM_RATIO;                   // 8 outputs

  // Start word: when the 6-bit register holds it, the whole packet is in place.
  // Its first-sent bit is 1, so a partly shifted word (zeros from reset ahead
  // of it) can never match early.
  localparam logic [SYNC_W-1:0] SYNC_WORD = 6'b101001;

  // Per-channel profile word, MSB first on the serial line.
  typedef struct packed {
    logic [CC_W-1:0] coarse;  // delay, in mod-counter periods
    logic [MC_W-1:0] fine;    // delay within a period, in clock cycles (5 ns)
    logic [4:0]      width;   // pulse width in clock cycles, 0 = element off
  } ch_profile_t;

  // Global control fields, in the order they sit along the chain after Ch64.
  typedef struct packed {
    logic [SYNC_W-1:0]  sync;    // farthest register, sent first
    logic [RXCFG_W-1:0] rx_cfg;
    logic [MC_W-1:0]    mod_val; // mod counter counts 0..mod_val
    logic [PC_W-1:0]    pc;      // pulses per firing minus one
  } global_profile_t;

  // VG-LNA gain steps in dB, indexed by the 2-bit gain code.
  function automatic real lna_gain_db(input logic [RXCFG_W-1:0] code);
    case (code)
      2'd0:    return 15.0;
      2'd1:    return 21.0;
      2'd2:    return 27.0;
      default: return 32.0;
    endcase
  endfunction

endpackage
