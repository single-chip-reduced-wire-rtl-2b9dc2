// tb_txrx_switch: self-checking test of the Tx/Rx switch model: the element
// voltage reaches the receiver only while tx_active is low. During transmit
// the receiver input must stay at 0 V, even with 60 V on the element.
module tb_txrx_switch;
  real  v_elem = 0.0;
  logic tx_active = 0;
  real  v_rx;
  int   checks = 0, failures = 0;

  txrx_switch dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40; i++) begin
      tx_active = 1'(i % 3 == 0);
      v_elem = tx_active ? 60.0 : 0.001 * real'(i + 1);
      #5;
      checks++;
      if (v_rx != (tx_active ? 0.0 : v_elem)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
