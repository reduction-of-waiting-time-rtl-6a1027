// tb_rc_schmitt: the mixer's RC filter and Schmitt trigger.
//  - Input steps high from 0 V: the filter voltage is 3.5 (1 - exp(-t/15 us)), so
//    the inverting Schmitt output must fall at 15 us x ln(3.5/1.8) = 9.99 us.
//  - From 3.5 V the input steps low: the voltage falls below 0.9 V, and the output
//    rises, at 15 us x ln(3.5/0.9) = 20.37 us.
//  - A 1.5 MHz pulse train of 30% duty settles near 0.3 x 3.5 V; the output
//    stays high because that voltage is below the 1.7 V upper threshold.
//  - A duty cycle ramped from 0 to 1 and dropped back to 0, like the phase/
//    frequency detector's output at the difference frequency, gives exactly one
//    output pulse per ramp.
module tb_rc_schmitt;
  timeunit 1ns;
  timeprecision 1ps;

  logic vin = 1'b0, vout;
  real  vfilt;

  rc_schmitt dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %t: %s", $realtime, what);
    end
  endtask

  initial begin
    #50_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real t0, tf, tr, avg, hi;
  int  n_fall = 0;
  always @(negedge vout) n_fall++;

  initial begin
    #1000.0;
    check(vout == 1'b1 && vfilt < 0.01, "rest state");
    vin = 1'b1;
    t0 = $realtime;
    @(negedge vout);
    tf = $realtime - t0;
    check(tf > 9985.6 - 60.0 && tf < 9985.6 + 60.0, "falls when filter crosses 1.7 V");
    #200_000.0;
    check(vfilt > 3.49 && vfilt < 3.51, "settles at the high level");
    vin = 1'b0;
    t0 = $realtime;
    @(posedge vout);
    tr = $realtime - t0;
    check(tr > 20371.4 - 60.0 && tr < 20371.4 + 60.0, "rises when filter crosses 0.9 V");
    #200_000.0;
    // 30% duty at 1.5 MHz.
    repeat (300) begin vin = 1'b1; #200.0; vin = 1'b0; #466.667; end
    avg = 0.0;
    repeat (100) begin vin = 1'b1; #200.0; avg += vfilt; vin = 1'b0; #466.667; avg += vfilt; end
    avg = avg / 200.0;
    check(avg > 1.0 && avg < 1.1, "averages a 30% duty cycle to 1.05 V");
    check(vout == 1'b1, "no switching below the upper threshold");
    // Three sawtooth periods of 555 us: duty ramps 0 -> 1 over 860 pulses.
    n_fall = 0;
    repeat (3) begin
      for (int i = 0; i < 860; i++) begin
        hi = 646.9 * real'(i) / 860.0;
        if (hi > 0.5) begin vin = 1'b1; #(hi); end
        vin = 1'b0;
        #(646.9 - hi);
      end
    end
    #100_000.0;
    check(n_fall == 3, "one output pulse per sawtooth period");
    $display("fall %f ns, rise %f ns, 30%% average %f V, pulses %0d", tf, tr, avg, n_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
