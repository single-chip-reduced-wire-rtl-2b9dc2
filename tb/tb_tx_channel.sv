// tb_tx_channel: self-checking test of one beamformer channel.
//
// Loads a 16-bit profile serially and checks that it shifts out again 16
// clocks later. It then latches and drives the coarse and mod counts from an
// independent model counter. Every cycle of the firing window, the pulse
// output is compared with the reference (ice_tb_pkg::pulse_expected). Settings
// covered: random ones, zero delay, maximum delay with 8 pulses, and width 0.
module tb_tx_channel;
  import ice_tb_pkg::*;

  logic       clk = 0, rst_n = 0, sin = 0, latch = 0, run = 0;
  logic [5:0] cc = 0;
  logic [4:0] mc = 0;
  logic [2:0] pc = 0;
  logic       sout, pulse;
  int         checks = 0, failures = 0, cycles = 0, n_pulse_cycles = 0;

  tx_channel dut (.*);

  always #2.5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #2_000_000;
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

  task automatic run_case(input ch_cfg_t c, input int unsigned mod_val, input int unsigned npc);
    bit          q[$];
    logic [15:0] word;
    int          m, t, len;
    word = {c.coarse[5:0], c.fine[4:0], c.width[4:0]};
    rst_n = 0; latch = 0; run = 0; cc = 0; mc = 0; pc = 3'(npc);
    @(negedge clk); rst_n = 1;
    // shift the word in MSB first, then 16 filler bits while watching sout
    for (int b = 15; b >= 0; b--) begin sin = word[b]; @(negedge clk); end
    for (int b = 15; b >= 0; b--) begin
      check(sout == word[b], "serial out");
      sin = word[b];
      @(negedge clk);
    end
    // latch: register must hold
    latch = 1; sin = 0;
    m = int'(mod_val) + 1;
    len = window_len(mod_val, npc);
    for (t = 0; t < len + 4; t++) begin
      // counter model
      run = (t < len);
      cc  = 6'((t / m) > 63 ? 63 : t / m);
      mc  = 5'(t % m);
      check(pulse == pulse_expected(t, c, mod_val, npc), "pulse");
      if (pulse) n_pulse_cycles++;
      @(negedge clk);
    end
    check(sout == word[15], "register locked");
  endtask

  initial begin
    ch_cfg_t c;
    repeat (3) @(negedge clk);
    c = '{0, 0, 3};   run_case(c, 31, 0);
    c = '{63, 31, 31}; run_case(c, 31, 7);
    c = '{5, 2, 0};   run_case(c, 9, 3);
    c = '{63, 9, 9};  run_case(c, 9, 7);
    for (int i = 0; i < 20; i++) begin
      int unsigned mv;
      mv = $urandom_range(31, 1);
      c = rand_ch(mv);
      run_case(c, mv, $urandom_range(7, 0));
    end
    check(n_pulse_cycles > 0, "some pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
