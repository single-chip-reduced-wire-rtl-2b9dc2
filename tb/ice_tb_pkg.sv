// ice_tb_pkg: reference model shared by the testbenches.
//
// It builds the serial profile packet bit by bit from the field definitions,
// and predicts each channel's pulse output from first principles. Counter
// time t = 0 is the cycle in which latch first reads high. The k-th pulse
// (k = 0..pc) of a channel starts counting at t = (coarse + k) * M + fine, with
// M = mod_val + 1. Its output is high from one clock later, for 'width'
// cycles. The firing window lasts (64 + pc + 1) * M cycles.
package ice_tb_pkg;

  typedef struct {
    int unsigned coarse;
    int unsigned fine;
    int unsigned width;
  } ch_cfg_t;

  typedef struct {
    int unsigned sync;
    int unsigned rx_cfg;
    int unsigned mod_val;
    int unsigned pc;
  } glob_cfg_t;

  // Append the 'nbits' low bits of v to q, MSB first.
  function automatic void push_field(ref bit q[$], input int unsigned v, input int nbits);
    for (int b = nbits - 1; b >= 0; b--) q.push_back(bit'((v >> b) & 1));
  endfunction

  // Whole packet in send order: global fields farthest first, then the
  // channel words from the last channel down to channel 0.
  function automatic void build_packet(ref bit q[$], input glob_cfg_t g, ref ch_cfg_t ch[]);
    q.delete();
    push_field(q, g.sync, 6);
    push_field(q, g.rx_cfg, 2);
    push_field(q, g.mod_val, 5);
    push_field(q, g.pc, 3);
    for (int i = ch.size() - 1; i >= 0; i--) begin
      push_field(q, ch[i].coarse, 6);
      push_field(q, ch[i].fine, 5);
      push_field(q, ch[i].width, 5);
    end
  endfunction

  function automatic bit pulse_expected(input int t, input ch_cfg_t c, input int unsigned mod_val,
                                        input int unsigned pc);
    int m;
    int s;
    m = int'(mod_val) + 1;
    if (c.width == 0 || c.fine >= m) return 1'b0;
    for (int k = 0; k <= int'(pc); k++) begin
      s = (int'(c.coarse) + k) * m + int'(c.fine);
      if (t >= s + 1 && t <= s + int'(c.width)) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic int window_len(input int unsigned mod_val, input int unsigned pc);
    return (64 + int'(pc) + 1) * (int'(mod_val) + 1);
  endfunction

  // Random channel setting with width below the mod period and fine inside it.
  function automatic ch_cfg_t rand_ch(input int unsigned mod_val);
    ch_cfg_t c;
    c.coarse = $urandom_range(63, 0);
    c.fine   = $urandom_range(mod_val, 0);
    c.width  = (mod_val == 0) ? 0 : $urandom_range(mod_val, 0);
    return c;
  endfunction

endpackage
