// tb_tx_beamformer: self-checking test of the full 64-channel beamformer.
//
// For each firing it draws a random profile: per-channel delay and width,
// mod value, pulse count and Rx gain code. It sends the 1040-bit packet on the
// data line one bit per clock and checks that latch rises after exactly 1040
// clocks, 5.2 us of simulated time at 200 MHz. Then, every cycle of the firing window, it
// compares all 64 pulse outputs with the reference model, and it checks the
// length of tx_active and rx_cfg. A focused profile with linear delays and the
// maximum delay of 2047 cycles (10.235 us) is included.
module tb_tx_beamformer;
  import ice_tb_pkg::*;

  localparam int N = 64;

  logic         clk = 0, rst_n = 0, data = 0;
  logic [N-1:0] pulse;
  logic         latch, tx_active;
  logic [1:0]   rx_cfg;
  logic [5:0]   cc;
  logic [4:0]   mc;
  logic [2:0]   pc;
  int           checks = 0, failures = 0, load_cycles;

  tx_beamformer #(.N(N)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #20_000_000;
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

  task automatic fire(input glob_cfg_t g, ref ch_cfg_t ch[]);
    bit q[$];
    int len, active;
    realtime t_start;
    build_packet(q, g, ch);
    rst_n = 0; data = 0;
    @(negedge clk); rst_n = 1;
    load_cycles = 0;
    t_start = $realtime;
    foreach (q[i]) begin
      check(!latch && !tx_active && pulse == '0, "idle while loading");
      data = q[i];
      @(negedge clk);
      load_cycles++;
    end
    check(latch, "latched");
    check(load_cycles == 1040, "1040-bit packet");
    check($realtime - t_start == 5200.0, "load takes 5.2 us at 200 MHz");
    check(int'(rx_cfg) == g.rx_cfg, "rx_cfg");
    len = window_len(g.mod_val, g.pc);
    active = 0;
    for (int t = 0; t < len + 5; t++) begin
      if (tx_active) active++;
      for (int i = 0; i < N; i++)
        check(pulse[i] == pulse_expected(t, ch[i], g.mod_val, g.pc), $sformatf("pulse ch%0d t=%0d", i, t));
      data = $urandom_range(1, 0);  // must be ignored once latched
      @(negedge clk);
    end
    check(active == len, "firing window length");
  endtask

  initial begin
    glob_cfg_t g;
    ch_cfg_t   ch[];
    ch = new[N];
    repeat (2) @(negedge clk);
    // focused beam: linear delay ramp up to the maximum code 2047
    g = '{6'b101001, 2, 31, 0};
    for (int i = 0; i < N; i++) begin
      int d;
      d = (i == N - 1) ? 2047 : i * 32;
      ch[i] = '{d / 32, d % 32, 10};
    end
    fire(g, ch);
    // random profiles, Doppler pulse trains
    for (int r = 0; r < 4; r++) begin
      g = '{6'b101001, $urandom_range(3, 0), $urandom_range(31, 4), $urandom_range(7, 0)};
      foreach (ch[i]) ch[i] = rand_ch(g.mod_val);
      fire(g, ch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
