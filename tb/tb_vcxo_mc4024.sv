// tb_vcxo_mc4024: frequency of the VCXO model against its control voltage. For a
// set of control voltages the test times 200000 output cycles and compares the
// frequency with 8 x (1.544 MHz + 2393.5 Hz/V x (v - 3.80 V)), and checks that
// voltages outside the tuning range give the range limits 8 x 1542.901 kHz and
// 8 x 1544.836 kHz.
module tb_vcxo_mc4024;
  timeunit 1ns;
  timeprecision 1ps;

  real vctrl = 3.80;
  logic clk_out;

  vcxo_mc4024 dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1.0e9;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real volts [6] = '{3.80, 3.75, 3.85, 3.72, 3.0, 5.0};
  real f_exp, f_meas, t0;
  initial begin
    foreach (volts[i]) begin
      vctrl = volts[i];
      repeat (2) @(posedge clk_out);
      t0 = $realtime;
      repeat (200000) @(posedge clk_out);
      f_meas = 200000.0 / (($realtime - t0) * 1.0e-9);
      f_exp  = 8.0 * (1.544e6 + 2393.5 * (vctrl - 3.80));
      if (f_exp < 8.0 * 1542.901e3) f_exp = 8.0 * 1542.901e3;
      if (f_exp > 8.0 * 1544.836e3) f_exp = 8.0 * 1544.836e3;
      $display("v=%f V f=%f Hz expected %f Hz", vctrl, f_meas, f_exp);
      checks++;
      if (f_meas < f_exp - 1.0 || f_meas > f_exp + 1.0) begin
        failures++;
        $display("FAIL: frequency at %f V", vctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
