// tb_tx_counter11: self-checking test of the 11-bit firing-time counter.
//
// For several mod values and pulse counts it raises start and compares cc, mc
// and run each cycle with arithmetic from the elapsed cycle count: mc = t mod M,
// cc = min(t div M, 63). run must be high for exactly (64 + pc + 1) * M
// cycles, then stay low. With mod_val = 31 the counter must reach 2047,
// which is the 10.235 us maximum delay at 5 ns per cycle.
module tb_tx_counter11;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [4:0] mod_val = 31;
  logic [2:0] pc = 0;
  logic [5:0] cc;
  logic [4:0] mc;
  logic       run;
  int         checks = 0, failures = 0, max_count = 0;

  tx_counter11 dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #5_000_000;
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

  task automatic run_case(input int unsigned mv, input int unsigned npc);
    int m, len, t, run_cycles;
    rst_n = 0; start = 0; mod_val = 5'(mv); pc = 3'(npc);
    @(negedge clk); rst_n = 1;
    repeat (3) begin
      @(negedge clk);
      check(cc == 0 && mc == 0 && !run, "idle before start");
    end
    start = 1;
    #0.1;
    m = int'(mv) + 1;
    len = (64 + int'(npc) + 1) * m;
    run_cycles = 0;
    for (t = 0; t < len + 10; t++) begin
      if (t < len) begin
        check(run, "run high in window");
        check(int'(mc) == t % m, "mc");
        check(int'(cc) == ((t / m) > 63 ? 63 : t / m), "cc");
        if (int'(cc) * 32 + int'(mc) > max_count && mv == 31) max_count = int'(cc) * 32 + int'(mc);
      end else begin
        check(!run, "run low after window");
      end
      if (run) run_cycles++;
      @(negedge clk);
    end
    check(run_cycles == len, "window length");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run_case(31, 0);
    run_case(31, 7);
    run_case(0, 3);
    run_case(19, 4);
    for (int i = 0; i < 6; i++) run_case($urandom_range(31, 0), $urandom_range(7, 0));
    check(max_count == 2047, "reaches 2047 (10.235 us)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
