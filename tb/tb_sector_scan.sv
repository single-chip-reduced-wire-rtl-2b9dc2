// tb_sector_scan: imaging workload on the full front end. It fires 123 focused
// beams steered evenly across a +/-45 degree sector, one new 1040-bit profile
// per beam. The array has 64 elements at a 104 um pitch. Sound speed is
// 1540 m/s and the focus depth is 20 mm. Delays are quantised to 5 ns.
//
// For every beam it checks three things. Every delay fits the 11-bit delay
// code, so at most 2047 cycles. The profile latches after 1040 clocks. Each
// element's pulser output rises exactly one clock after its programmed delay
// and stays high for the programmed width. The largest delay over the whole
// scan is printed.
module tb_sector_scan;
  import ice_tb_pkg::*;

  localparam int N     = 64;
  localparam int BEAMS = 123;

  logic       clk = 0, rst_n = 0, data = 0, link_train = 0;
  real        echo_in    [N];
  real        pulser_out [N];
  real        tdm_out    [8];
  logic       latch, tx_active;
  logic [1:0] rx_gain;
  logic [2:0] tdm_slot;
  logic       tdm_frame;
  int         checks = 0, failures = 0, max_delay = 0;

  ice_asic_top dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #100_000_000;
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

  initial begin
    glob_cfg_t g;
    ch_cfg_t   ch[];
    bit        q[$];
    int        dly [N], first_rise [N], high_cycles [N];
    real       ang, fx, fz, x, r [N], rmax;
    ch = new[N];
    foreach (echo_in[i]) echo_in[i] = 0.0;
    g = '{6'b101001, 0, 31, 0};
    for (int beam = 0; beam < BEAMS; beam++) begin
      ang = (-45.0 + 90.0 * real'(beam) / real'(BEAMS - 1)) * 3.141592653589793 / 180.0;
      fx = 20e-3 * $sin(ang);
      fz = 20e-3 * $cos(ang);
      rmax = 0.0;
      for (int i = 0; i < N; i++) begin
        x = (real'(i) - 31.5) * 104e-6;
        r[i] = $sqrt((x - fx) * (x - fx) + fz * fz);
        if (r[i] > rmax) rmax = r[i];
      end
      for (int i = 0; i < N; i++) begin
        dly[i] = int'((rmax - r[i]) / 1540.0 / 5e-9);
        check(dly[i] >= 0 && dly[i] <= 2047, "delay fits 11 bits");
        if (dly[i] > max_delay) max_delay = dly[i];
        ch[i] = '{dly[i] / 32, dly[i] % 32, 8};
      end
      build_packet(q, g, ch);
      rst_n = 0;
      @(negedge clk); rst_n = 1;
      foreach (q[k]) begin data = q[k]; @(negedge clk); end
      check(latch, "latched after 1040 bits");
      foreach (first_rise[i]) begin first_rise[i] = -1; high_cycles[i] = 0; end
      for (int t = 0; t < window_len(g.mod_val, g.pc); t++) begin
        for (int i = 0; i < N; i++)
          if (pulser_out[i] > 30.0) begin
            if (first_rise[i] < 0) first_rise[i] = t;
            high_cycles[i]++;
          end
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        check(first_rise[i] == dly[i] + 1, $sformatf("beam %0d ch %0d edge", beam, i));
        check(high_cycles[i] == 8, "pulse width");
      end
    end
    $display("sector scan: %0d beams, largest delay %0d cycles = %0.3f us", BEAMS, max_delay,
             real'(max_delay) * 0.005);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
