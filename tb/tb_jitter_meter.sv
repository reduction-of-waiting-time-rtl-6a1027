// tb_jitter_meter: checks the EX-OR and low-pass jitter meter against closed-form
// values. Two 1.544 MHz clocks are made from real-valued edge times. The second
// lags the first by d(t) = D0 + AMP * sin(2 pi FM t) UI. Expected readings:
//  - static delay D0: vj = -3.55 V * 2 * D0 + 1.775 V, that is 0 V at 0.25 UI,
//    +1.065 V at 0.10 UI and -1.065 V at 0.40 UI (-7.1 V per UI);
//  - sinusoidal jitter: the peak-to-peak reading is 7.1 V/UI * 2 * AMP scaled by
//    the single-pole response 1 / sqrt(1 + (FM / FC)^2): 0.995 at 100 Hz and
//    0.707 at 1 kHz.
// The residue of the 3 MHz EX-OR ripple is about 2 mV peak to peak.
module tb_jitter_meter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_CLK = 1.544e6;
  localparam real T_NS  = 1.0e9 / F_CLK;
  localparam real V_UI  = 7.1;     // volts per UI, magnitude
  localparam real FC_HZ = 1.0e3;
  localparam real PI    = 3.14159265358979;

  logic clk_ref = 1'b0, clk_rec = 1'b0, xor_out;
  real  vj;

  jitter_meter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %t: %s", $realtime, what);
    end
  endtask

  initial begin
    #60_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Delay of clk_rec against clk_ref, in UI.
  real d0 = 0.25, amp = 0.0, fm = 100.0;

  real tr = 0.0;
  always begin
    tr = tr + 0.5 * T_NS;
    #(tr - $realtime) clk_ref = !clk_ref;
  end
  real tc = 0.0, t_edge;
  always begin
    tc = tc + 0.5 * T_NS;
    t_edge = tc + (d0 + amp * $sin(2.0 * PI * fm * tc * 1.0e-9)) * T_NS;
    #(t_edge - $realtime) clk_rec = !clk_rec;
  end

  // Minimum and maximum of vj over a window, sampled every 0.5 us.
  real vmin, vmax;
  task automatic window(input real ms);
    vmin = 1.0e9;
    vmax = -1.0e9;
    repeat (int'(ms * 2000.0)) begin
      #500;
      if (vj < vmin) vmin = vj;
      if (vj > vmax) vmax = vj;
    end
  endtask

  real mid, pp, expect_pp;
  initial begin
    // Static delays; 2 ms is over 12 filter time constants.
    d0 = 0.25; #2_000_000; window(0.5);
    mid = 0.5 * (vmin + vmax);
    $display("d=0.25 UI: vj %f .. %f", vmin, vmax);
    check(mid > -0.01 && mid < 0.01, "zero reading at a quarter period");
    check(vmax - vmin < 0.01, "ripple small");
    d0 = 0.10; #2_000_000; window(0.5);
    mid = 0.5 * (vmin + vmax);
    $display("d=0.10 UI: vj %f .. %f", vmin, vmax);
    check(mid > 1.055 && mid < 1.075, "+1.065 V at 0.10 UI");
    d0 = 0.40; #2_000_000; window(0.5);
    mid = 0.5 * (vmin + vmax);
    $display("d=0.40 UI: vj %f .. %f", vmin, vmax);
    check(mid > -1.075 && mid < -1.055, "-1.065 V at 0.40 UI");
    // Sinusoidal jitter of 0.1 UI peak to peak at 100 Hz, then at 1 kHz.
    d0 = 0.25; amp = 0.05; fm = 100.0;
    #10_000_000; window(20.0);
    pp = vmax - vmin;
    expect_pp = V_UI * 2.0 * amp / $sqrt(1.0 + (fm / FC_HZ) ** 2);
    $display("100 Hz: pk-pk %f V, expected %f V", pp, expect_pp);
    check(pp > 0.99 * expect_pp && pp < 1.01 * expect_pp, "100 Hz jitter amplitude");
    fm = 1000.0;
    #5_000_000; window(5.0);
    pp = vmax - vmin;
    expect_pp = V_UI * 2.0 * amp / $sqrt(1.0 + (fm / FC_HZ) ** 2);
    $display("1 kHz: pk-pk %f V, expected %f V", pp, expect_pp);
    check(pp > 0.98 * expect_pp && pp < 1.02 * expect_pp, "1 kHz jitter at the cutoff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
