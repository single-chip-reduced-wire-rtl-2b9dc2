// tb_afe_channel: self-checking test of one analog front-end channel model.
// Transmit: the pulser output follows the LV pulse at 60 V, and the receive
// output stays at 0 V while tx_active is high. Receive: the echo appears at
// the output amplified by the selected gain (15/21/27/32 dB).
module tb_afe_channel;
  logic       pulse = 0, tx_active = 0;
  logic [1:0] gain = 0;
  real        echo_in = 0.0;
  real        v_pulser, v_rx, g;
  real        want_db [4] = '{15.0, 21.0, 27.0, 32.0};
  int         checks = 0, failures = 0;

  afe_channel dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // transmit
    tx_active = 1;
    for (int i = 0; i < 6; i++) begin
      pulse = 1'(i % 2);
      echo_in = pulse ? 60.0 : 1.0;
      #5;
      check(v_pulser == (pulse ? 60.0 : 0.0), "pulser level");
      check(v_rx == 0.0, "receiver protected during Tx");
    end
    // receive at each gain
    tx_active = 0; pulse = 0;
    for (int k = 0; k < 4; k++) begin
      gain = 2'(k);
      echo_in = 0.001;
      #5;
      g = 10.0 ** (want_db[k] / 20.0);
      check(v_rx > 0.001 * g * 0.999 && v_rx < 0.001 * g * 1.001, $sformatf("gain code %0d", k));
      check(v_pulser == 0.0, "pulser idle in Rx");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
