// tb_tdm_ctrl: self-checking test of the TDM counting logic.
//
// Checks that after reset the slot index runs 0,1,..,7,0,.. one step per clock,
// that sh_sel is the matching one-hot code, and that frame marks slot 0. Each
// slot must come back every 8 clocks: 25 MS/s per channel at a 200 MHz clock.
// The link-training request must appear on train two clocks later.
module tb_tdm_ctrl;
  logic       clk = 0, rst_n = 0, train_req = 0;
  logic [2:0] slot;
  logic [7:0] sh_sel;
  logic       frame, train;
  int         checks = 0, failures = 0;
  int         last_seen [8];
  bit         req_hist [$];

  tdm_ctrl dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #1_000_000;
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
    foreach (last_seen[k]) last_seen[k] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      check(int'(slot) == t % 8, "slot sequence");
      check(sh_sel == 8'(1 << (t % 8)), "one-hot select");
      check(frame == (t % 8 == 0), "frame");
      if (last_seen[slot] >= 0) check(t - last_seen[slot] == 8, "8-clock revisit (25 MS/s at 200 MHz)");
      last_seen[slot] = t;
      if (t >= 2) check(train == req_hist[t - 2], "train delay");
      if (t % 37 == 0) train_req = ~train_req;
      req_hist.push_back(train_req);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
