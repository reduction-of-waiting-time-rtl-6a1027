// tb_pfd_type4: behaviour of the type-4 phase/frequency detector.
//  - r leading v by d: up is high for exactly d, down stays low.
//  - v leading r by d: down is high for exactly d, up stays low.
//  - two r edges before a v edge: up stays high from the first r edge to the v
//    edge (the detector remembers only one edge per input).
//  - r at 1.5458 MHz against v at 1.5440 MHz: the average of up over each
//    difference-frequency period is close to one half, and up's duty cycle
//    wraps from near 1 to near 0 once per 1/(f_r - f_v).
// The reset sequence gives rst_n a falling edge and clocks r and v while it is
// low, so the checks do not depend on the flip-flops' power-up values.
module tb_pfd_type4;
  timeunit 1ns;
  timeprecision 1ps;

  logic r = 1'b0, v = 1'b0, rst_n = 1'b1, up, down;

  pfd_type4 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %t: %s", $realtime, what);
    end
  endtask

  initial begin
    #10_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure how long up and down are high.
  real t_up = 0.0, t_dn = 0.0, up_time = 0.0, dn_time = 0.0;
  always @(posedge up)   t_up = $realtime;
  always @(negedge up)   up_time = up_time + ($realtime - t_up);
  always @(posedge down) t_dn = $realtime;
  always @(negedge down) dn_time = dn_time + ($realtime - t_dn);

  task automatic pulse_r(); r = 1'b1; #5; r = 1'b0; endtask
  task automatic pulse_v(); v = 1'b1; #5; v = 1'b0; endtask

  int  wraps = 0;
  real prev_w = 0.0;
  initial begin
    // Reset with a real falling edge, and clock both inputs once while it is
    // held: whatever state the flip-flops power up in, both end cleared.
    #1 rst_n = 1'b0;
    #5 pulse_r();
    #5 pulse_v();
    #20 rst_n = 1'b1;
    #100;
    // r leads by 30 ns.
    up_time = 0.0; dn_time = 0.0;
    fork pulse_r(); begin #30; pulse_v(); end join
    #50;
    check(up_time > 29.99 && up_time < 30.01, "up width equals lead of r");
    check(dn_time < 0.01 && !up && !down, "down quiet, both cleared");
    // v leads by 45 ns.
    up_time = 0.0; dn_time = 0.0;
    fork pulse_v(); begin #45; pulse_r(); end join
    #50;
    check(dn_time > 44.99 && dn_time < 45.01, "down width equals lead of v");
    check(up_time < 0.01 && !up && !down, "up quiet, both cleared");
    // Two r edges, then v.
    up_time = 0.0;
    pulse_r(); #20; pulse_r(); #20; pulse_v();
    #50;
    check(up_time > 49.99 && up_time < 50.01, "second r edge ignored while up");
    // Frequency difference: r 1.5458 MHz, v 1.5440 MHz, for 3 difference periods.
    up_time = 0.0;
    fork
      for (int i = 0; i < 2577; i++) begin pulse_r(); #(1.0e9 / 1.5458e6 - 5.0); end
      for (int i = 0; i < 2574; i++) begin pulse_v(); #(1.0e9 / 1.5440e6 - 5.0); end
      // Duty cycle of up per r period, watching for the wrap.
      for (int i = 0; i < 2570; i++) begin
        real w;
        @(negedge up);
        w = $realtime - t_up;
        if (prev_w > 0.8 * 647.0 && w < 0.3 * 647.0) wraps++;
        prev_w = w;
      end
    join
    $display("up average=%f, wraps=%0d", up_time / (2577.0 * 1.0e9 / 1.5458e6), wraps);
    check(up_time / (2577.0 * 1.0e9 / 1.5458e6) > 0.4 &&
          up_time / (2577.0 * 1.0e9 / 1.5458e6) < 0.6, "average duty about one half");
    check(wraps >= 2 && wraps <= 3, "one wrap per difference period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
