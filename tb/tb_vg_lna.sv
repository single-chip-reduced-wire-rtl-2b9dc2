// tb_vg_lna: self-checking test of the VG-LNA model. For each gain code the
// ratio of output to input must be 15, 21, 27 or 32 dB (codes 0..3), within
// 0.01 dB. Gain must rise with the code, as TGC needs.
module tb_vg_lna;
  real        v_in = 0.0;
  logic [1:0] gain = 0;
  real        v_out;
  real        db, last_db;
  real        want [4] = '{15.0, 21.0, 27.0, 32.0};
  int         checks = 0, failures = 0;

  vg_lna dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last_db = -100.0;
    for (int g = 0; g < 4; g++) begin
      gain = 2'(g);
      v_in = 0.002 * real'(g + 1);
      #5;
      db = 20.0 * $log10(v_out / v_in);
      checks++;
      if (db < want[g] - 0.01 || db > want[g] + 0.01) begin
        failures++;
        $display("FAIL gain code %0d: %f dB", g, db);
      end
      checks++;
      if (db <= last_db) failures++;
      last_db = db;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
