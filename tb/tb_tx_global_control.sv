// tb_tx_global_control: self-checking test of the beamformer's global control.
//
// Shifts the 16 global bits in serially (start word, Rx config, mod value,
// pulse count) and checks that latch stays low until the 16th bit and then
// rises. It checks the decoded pc and rx_cfg outputs, that further data
// cannot change them (locked), and that the counters then run with the loaded
// mod value. It also checks that a packet with a wrong start word never
// latches.
module tb_tx_global_control;
  import ice_tb_pkg::*;

  logic       clk = 0, rst_n = 0, sin = 0;
  logic       latch, run;
  logic [5:0] cc;
  logic [4:0] mc;
  logic [2:0] pc;
  logic [1:0] rx_cfg;
  int         checks = 0, failures = 0;

  tx_global_control dut (.*);

  always #2.5 clk = ~clk;

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

  task automatic run_case(input glob_cfg_t g, input bit good);
    bit      q[$];
    ch_cfg_t none[];
    int      m;
    none = new[0];
    build_packet(q, g, none);
    rst_n = 0; sin = 0;
    @(negedge clk); rst_n = 1;
    foreach (q[i]) begin
      check(!latch, "no early latch");
      sin = q[i];
      @(negedge clk);
    end
    check(latch == good, "latch after 16 bits");
    if (good) begin
      check(int'(pc) == g.pc, "pc");
      check(int'(rx_cfg) == g.rx_cfg, "rx_cfg");
      m = int'(g.mod_val) + 1;
      // counter: state 0 in the latch cycle, then advancing
      for (int t = 0; t < 3 * m; t++) begin
        check(run, "run");
        check(int'(mc) == t % m && int'(cc) == t / m, "counting");
        sin = $urandom_range(1, 0);
        @(negedge clk);
      end
      check(latch && int'(pc) == g.pc && int'(rx_cfg) == g.rx_cfg, "locked");
    end else begin
      repeat (10) begin
        check(!latch && !run, "no latch on wrong start word");
        sin = 0;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    glob_cfg_t g;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      g.sync = 6'b101001;
      g.rx_cfg = $urandom_range(3, 0);
      g.mod_val = $urandom_range(31, 0);
      g.pc = $urandom_range(7, 0);
      run_case(g, 1);
    end
    g = '{6'b101000, 1, 7, 2};
    run_case(g, 0);
    g = '{6'b001001, 2, 31, 0};
    run_case(g, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
