// tb_tdm_block: self-checking test of the 8:1 TDM block model.
//
// Drives eight distinct, changing channel voltages and a rotating one-hot
// select. After each clock edge the output must equal the value the selected
// channel had at that edge. In link-training mode it must equal k * 0.1 V
// for slot k.
module tb_tdm_block;
  logic       clk = 0, train = 0;
  logic [7:0] sh_sel = 8'h01;
  real        ch_in [8];
  real        out;
  real        expect_v;
  int         checks = 0, failures = 0;

  tdm_block dut (.*);

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
    int k;
    foreach (ch_in[i]) ch_in[i] = 0.0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      k = t % 8;
      sh_sel = 8'(1 << k);
      train = (t >= 120 && t < 160);
      foreach (ch_in[i]) ch_in[i] = real'(i + 1) + 0.01 * real'(t);
      expect_v = train ? 0.1 * real'(k) : ch_in[k];
      @(posedge clk);
      #1;
      check(out > expect_v - 1e-9 && out < expect_v + 1e-9, $sformatf("slot %0d value", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
