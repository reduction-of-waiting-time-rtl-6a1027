// tb_lag_loop_filter: step response of the lag loop filter. The filter rests at
// 3.80 V; at t = 0 its input steps to 4.80 V. With tau = (R1 + R2) C = 176.8 ms
// and k = R2 / (R1 + R2) = 0.0909, the output is
// u_f(t) = 4.80 - (1 - k) * exp(-t / tau), worked out here from the component
// values, and it is checked at several times up to 600 ms. The DC gain of one
// (final value 4.80 V) and the immediate step of k volts are checked too.
module tb_lag_loop_filter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real R1 = 47.0e3, R2 = 4.7e3, C = 3.42e-6;
  localparam real TAU_MS = (R1 + R2) * C * 1.0e3;
  localparam real K = R2 / (R1 + R2);

  real ud = 3.80, uf;

  lag_loop_filter dut (.*);

  int checks = 0, failures = 0;
  task automatic check_v(input real got, input real want, input real tol, input string what);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL: %s: %f V, expected %f V", what, got, want);
    end
  endtask

  initial begin
    #3.0e9;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real t0;
  real times_ms [6] = '{1.0, 10.0, 50.0, 176.8, 400.0, 600.0};
  initial begin
    #5000.0;
    check_v(uf, 3.80, 1.0e-6, "rest");
    ud = 4.80;
    t0 = $realtime;
    #1;
    check_v(uf, 3.80 + K, 2.0e-3, "immediate step through R2");
    foreach (times_ms[i]) begin
      #(t0 + times_ms[i] * 1.0e6 - $realtime);
      check_v(uf, 4.80 - (1.0 - K) * $exp(-times_ms[i] / TAU_MS), 2.0e-3, "step response");
    end
    #(2000.0e6);
    check_v(uf, 4.80, 1.0e-3, "DC gain of one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
