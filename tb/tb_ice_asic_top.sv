// tb_ice_asic_top: end-to-end test of the whole front end at its default
// size (64 channels, 8 TDM outputs, 1040-bit profile).
//
// Each firing follows the chip's operating cycle. Reset, then send a profile
// on the data line, one bit per clock. latch must rise after exactly 1040
// clocks. Then the firing window runs: all 64 pulser outputs are checked
// every cycle against the reference model (60 V or 0 V). A 60 V echo is
// applied meanwhile, to prove the Tx/Rx switches keep it out of the receive
// path. After the window, distinct echo voltages go to every element. Each
// TDM output must carry its 8 channels in slot order, amplified by the
// programmed gain. Finally link training is switched on, and the outputs
// must show the known slot levels.
//
// Firings cover: a steered and focused beam (delays from element geometry),
// the maximum delay code (2047 cycles = 10.235 us), 8-pulse Doppler trains,
// a shortened mod period, width-0 and mixed-width apodization, and all four
// LNA gain codes. Each mechanism is counted, and one that never occurred
// counts as a failure.
module tb_ice_asic_top;
  import ice_tb_pkg::*;

  localparam int N = 64;

  logic       clk = 0, rst_n = 0, data = 0, link_train = 0;
  real        echo_in    [N];
  real        pulser_out [N];
  real        tdm_out    [8];
  logic       latch, tx_active;
  logic [1:0] rx_gain;
  logic [2:0] tdm_slot;
  logic       tdm_frame;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_load = 0, n_delayed_fire = 0, n_multi_pulse = 0, n_apod_off = 0, n_apod_widths = 0;
  int n_tx_protect = 0, n_short_mod = 0, n_tdm = 0, n_train = 0, n_max_delay = 0, n_steered = 0;
  int n_gain [4] = '{0, 0, 0, 0};

  ice_asic_top dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b) < 1e-9 && (b - a) < 1e-9;
  endfunction

  task automatic fire(input glob_cfg_t g, ref ch_cfg_t ch[]);
    bit  q[$];
    int  len, first_rise [N], rises [N];
    bit  prev_tx, prev_p [N];
    real gain_lin;
    int  widths_seen [int];

    build_packet(q, g, ch);
    rst_n = 0; data = 0; link_train = 0;
    foreach (echo_in[i]) echo_in[i] = 0.0;
    @(negedge clk); rst_n = 1;
    foreach (q[i]) begin
      data = q[i];
      @(negedge clk);
      if (i < q.size() - 1) check(!latch, "no latch before the last bit");
    end
    check(latch, "latch after 1040 bits");
    check(q.size() == 1040, "packet length");
    if (latch) n_load++;

    // ---- transmit ----
    len = window_len(g.mod_val, g.pc);
    foreach (rises[i]) begin rises[i] = 0; first_rise[i] = -1; prev_p[i] = 0; end
    prev_tx = 1;
    for (int t = 0; t < len + 3; t++) begin
      check(tx_active == (t < len), "tx window");
      for (int i = 0; i < N; i++) begin
        bit p;
        p = pulse_expected(t, ch[i], g.mod_val, g.pc);
        check(near(pulser_out[i], p ? 60.0 : 0.0), $sformatf("pulser ch%0d t=%0d", i, t));
        if (pulser_out[i] > 30.0 && !prev_p[i]) begin
          rises[i]++;
          if (first_rise[i] < 0) first_rise[i] = t;
        end
        prev_p[i] = pulser_out[i] > 30.0;
      end
      // the TDM output sampled at the previous edge, while Tx was on
      if (prev_tx && t > 0) begin
        for (int b = 0; b < 8; b++) check(near(tdm_out[b], 0.0), "receiver isolated during Tx");
        n_tx_protect++;
      end
      prev_tx = tx_active;
      foreach (echo_in[i]) echo_in[i] = 60.0;   // transmit burst on the elements
      data = $urandom_range(1, 0);
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      if (ch[i].width == 0) begin
        check(rises[i] == 0, "apodized-off element silent");
        n_apod_off++;
      end else begin
        check(rises[i] == int'(g.pc) + 1, "pulse count");
        check(first_rise[i] == int'(ch[i].coarse * (g.mod_val + 1) + ch[i].fine) + 1, "first edge at the delay");
        if (first_rise[i] > 1) n_delayed_fire++;
        if (rises[i] > 1) n_multi_pulse++;
        widths_seen[ch[i].width] = 1;
        if (ch[i].coarse == 63 && ch[i].fine == 31 && g.mod_val == 31) n_max_delay++;
      end
    end
    if (widths_seen.num() > 1) n_apod_widths++;
    if (g.mod_val != 31) n_short_mod++;

    // ---- receive through the TDM ----
    check(int'(rx_gain) == g.rx_cfg, "gain code");
    gain_lin = 10.0 ** (lna_db(g.rx_cfg) / 20.0);
    for (int t = 0; t < 64; t++) begin
      // echo values set here are sampled at the next edge and checked after it
      foreach (echo_in[i]) echo_in[i] = 0.0001 * real'(i + 1) + 0.00001 * real'(t % 5);
      @(negedge clk);
      begin
        int s;
        s = (int'(tdm_slot) + 7) % 8;   // slot sampled at the last edge
        for (int b = 0; b < 8; b++)
          check(near(tdm_out[b], echo_in[b * 8 + s] * gain_lin),
                $sformatf("tdm out %0d slot %0d", b, s));
        n_tdm++;
        n_gain[g.rx_cfg]++;
      end
    end
    // ---- link training ----
    link_train = 1;
    repeat (4) @(negedge clk);
    for (int t = 0; t < 24; t++) begin
      int s;
      s = (int'(tdm_slot) + 7) % 8;
      for (int b = 0; b < 8; b++) check(near(tdm_out[b], 0.1 * real'(s)), "training level");
      n_train++;
      check(tdm_frame == (tdm_slot == 0), "frame marker");
      @(negedge clk);
    end
    link_train = 0;
  endtask

  function automatic real lna_db(input int unsigned code);
    case (code)
      0: return 15.0;
      1: return 21.0;
      2: return 27.0;
      default: return 32.0;
    endcase
  endfunction

  // Focused, steered delays for a 104 um pitch array, c = 1540 m/s, 5 ns steps.
  function automatic void steer(ref ch_cfg_t ch[], input real angle_deg, input real focus_mm,
                                input int unsigned width);
    real x, fx, fz, r [N], rmax;
    int  d;
    fx = focus_mm * 1e-3 * $sin(angle_deg * 3.141592653589793 / 180.0);
    fz = focus_mm * 1e-3 * $cos(angle_deg * 3.141592653589793 / 180.0);
    rmax = 0.0;
    for (int i = 0; i < N; i++) begin
      x = (real'(i) - 31.5) * 104e-6;
      r[i] = $sqrt((x - fx) * (x - fx) + fz * fz);
      if (r[i] > rmax) rmax = r[i];
    end
    for (int i = 0; i < N; i++) begin
      d = int'((rmax - r[i]) / 1540.0 / 5e-9);
      ch[i] = '{d / 32, d % 32, width};
    end
  endfunction

  initial begin
    glob_cfg_t g;
    ch_cfg_t   ch[];
    ch = new[N];
    repeat (2) @(negedge clk);

    // 1: beam steered to +45 deg, focused at 20 mm, gain code 0
    steer(ch, 45.0, 20.0, 10);
    g = '{6'b101001, 0, 31, 0};
    fire(g, ch);
    n_steered++;

    // 2: maximum delay on the last element, 8-pulse Doppler train, gain code 1
    foreach (ch[i]) ch[i] = '{i, (i * 7) % 32, 5 + i % 10};
    ch[N-1] = '{63, 31, 12};
    g = '{6'b101001, 1, 31, 7};
    fire(g, ch);

    // 3: shorter mod period (20 clocks = 100 ns), 4 pulses, apodized widths, gain code 2
    foreach (ch[i]) ch[i] = '{$urandom_range(63, 0), $urandom_range(19, 0), (i % 8 == 0) ? 0 : 1 + i % 10};
    g = '{6'b101001, 2, 19, 3};
    fire(g, ch);

    // 4: random profile, gain code 3
    g = '{6'b101001, 3, $urandom_range(31, 8), $urandom_range(7, 0)};
    foreach (ch[i]) ch[i] = rand_ch(g.mod_val);
    fire(g, ch);

    check(n_load == 4, "four profiles loaded");
    check(n_delayed_fire > 0, "delayed firing happened");
    check(n_multi_pulse > 0, "multi-pulse firing happened");
    check(n_apod_off > 0, "width-0 apodization happened");
    check(n_apod_widths > 0, "mixed widths happened");
    check(n_tx_protect > 0, "Tx/Rx protection exercised");
    check(n_short_mod > 0, "short mod period used");
    check(n_max_delay > 0, "maximum delay used");
    check(n_steered > 0, "steered beam fired");
    check(n_tdm > 0, "TDM samples checked");
    check(n_train > 0, "link training checked");
    foreach (n_gain[k]) check(n_gain[k] > 0, $sformatf("gain code %0d used", k));
    $display("mechanisms: loads=%0d delayed=%0d multipulse=%0d apod_off=%0d apod_widths=%0d tx_protect=%0d short_mod=%0d max_delay=%0d steered=%0d tdm=%0d train=%0d gains=%0d/%0d/%0d/%0d",
             n_load, n_delayed_fire, n_multi_pulse, n_apod_off, n_apod_widths, n_tx_protect, n_short_mod,
             n_max_delay, n_steered, n_tdm, n_train, n_gain[0], n_gain[1], n_gain[2], n_gain[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
