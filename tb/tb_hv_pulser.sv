// tb_hv_pulser: self-checking test of the HV pulser model: 60 V while the
// input pulse is high, 0 V otherwise (unipolar).
module tb_hv_pulser;
  logic pulse_in = 0;
  real  v_out;
  int   checks = 0, failures = 0;

  hv_pulser dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20; i++) begin
      pulse_in = 1'($urandom_range(1, 0));
      #5;
      checks++;
      if (v_out != (pulse_in ? 60.0 : 0.0)) failures++;
      checks++;
      if (v_out < 0.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
