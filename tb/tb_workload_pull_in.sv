// tb_workload_pull_in: acquisition of the differential PLL after a step in the
// DS-1 frequency of 100, 200 and 450 Hz, at the design's default parameters.
//
// The loop is first locked with the reference at 1.544 MHz, where the VCXO sits
// near its 3.80 V centre. The reference then steps by the offset, and the phase
// of the recovered clock against the reference (unwrapped, in UI) is sampled
// every 0.5 ms for 300 ms. The lock time is the last moment the phase is more
// than 0.5 UI from its final value. With the loop's omega_n = 82.5 rad/s and
// damping 0.7, a frequency step df gives a peak phase error of B against A of
// about 0.46 * 2*pi*df / omega_n radians (the classic second-order step
// response), that is 0.46 * df / omega_n cycles: 0.56 for 100 Hz, 1.1 for 200 Hz,
// 2.5 for 450 Hz and 4.5 for -800 Hz. Only the last is beyond the +/-4 cycle
// range of the counter phase detector, which must then wrap (a state jump between
// +3 and -4) before it locks. Checks: lock within 100 ms for the three smaller
// steps and within 250 ms for -800 Hz; no wrap for 100 Hz; at least one wrap for
// -800 Hz; afterwards the recovered rate equals the reference.
module tb_workload_pull_in;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_DS2  = 6.312e6;
  localparam int  N_OFF  = 4;
  localparam real OFFSETS [N_OFF] = '{100.0, 200.0, 450.0, -800.0};
  localparam real REST_MS = 250.0;
  localparam real RUN_MS  = 300.0;
  localparam int  N_SAMP  = 600;

  logic ds2_clk = 1'b0, ds1_ref = 1'b0, rst_n = 1'b0, data_in = 1'b0;
  logic frame_start, fn_en, stuff_opp, stuff_pulse, f1_en, b_sig, b_tick;
  logic vcxo_clk, fo, data_out, data_valid, store_overflow, store_underflow;
  logic [2:0] pd_state;
  logic [4:0] store_fill;
  real ud, uf;
  // The jitter meter is not used here; phase is measured from edge times.
  real jitter_v;
  logic meas_ref;
  assign meas_ref = ds1_ref;

  m12_dpll_desync_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real f_ds1 = 1.544e6;
  real t2 = 0.0, t1 = 0.0;
  always begin t2 = t2 + 0.5e9 / F_DS2; #(t2 - $realtime) ds2_clk = !ds2_clk; end
  always begin t1 = t1 + 0.5e9 / f_ds1; #(t1 - $realtime) ds1_ref = !ds1_ref; end

  // Unwrapped phase of fo against the reference.
  real last_ds1 = 0.0, ph, ph_prev = 0.0, wraps = 0.0, ph_unw = 0.0;
  always @(posedge ds1_ref) last_ds1 = $realtime;
  always @(posedge fo) begin
    ph = ($realtime - last_ds1) * f_ds1 * 1.0e-9;
    if (ph - ph_prev > 0.5)  wraps = wraps - 1.0;
    if (ph - ph_prev < -0.5) wraps = wraps + 1.0;
    ph_prev = ph;
    ph_unw  = ph + wraps;
  end

  // Wraps of the phase detector state between +3 and -4.
  int n_pd_wrap = 0;
  logic [2:0] pd_prev = '0;
  always @(posedge ds2_clk) begin
    if ((pd_prev == 3'b011 && pd_state == 3'b100) || (pd_prev == 3'b100 && pd_state == 3'b011))
      n_pd_wrap++;
    pd_prev <= pd_state;
  end

  int n_fo, n_ds1;
  bit counting = 0;
  always @(posedge fo)      if (counting) n_fo++;
  always @(posedge ds1_ref) if (counting) n_ds1++;

  initial begin
    #((REST_MS + RUN_MS + 60.0) * real'(N_OFF) * 1.0e6 + 50.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real samp [N_SAMP];
  real final_ph, t_lock, max_dev, dev;
  int  wraps_at_start;
  initial begin
    #1000.0 rst_n = 1'b1;
    for (int i = 0; i < N_OFF; i++) begin
      f_ds1 = 1.544e6;
      #(REST_MS * 1.0e6);
      wraps_at_start = n_pd_wrap;
      f_ds1 = 1.544e6 + OFFSETS[i];
      for (int k = 0; k < N_SAMP; k++) begin
        #(RUN_MS * 1.0e6 / real'(N_SAMP));
        samp[k] = ph_unw;
      end
      final_ph = 0.0;
      for (int k = N_SAMP - 100; k < N_SAMP; k++) final_ph += samp[k] / 100.0;
      t_lock = 0.0;
      max_dev = 0.0;
      for (int k = 0; k < N_SAMP; k++) begin
        dev = samp[k] - final_ph;
        if (dev < 0.0) dev = -dev;
        if (dev > 0.5) t_lock = real'(k + 1) * RUN_MS / real'(N_SAMP);
        if (dev > max_dev) max_dev = dev;
      end
      n_fo = 0; n_ds1 = 0; counting = 1;
      #(50.0e6);
      counting = 0;
      $display("step %5.1f Hz: lock time %f ms, largest phase excursion %f UI, PD wraps %0d, fo=%0d ds1=%0d",
               OFFSETS[i], t_lock, max_dev, n_pd_wrap - wraps_at_start, n_fo, n_ds1);
      check(t_lock < ((OFFSETS[i] < -500.0) ? 250.0 : 100.0), "locks in time");
      check(n_fo >= n_ds1 - 2 && n_fo <= n_ds1 + 2, "recovered rate equals the reference after the step");
      if (OFFSETS[i] > 0.0 && OFFSETS[i] < 150.0)
        check(n_pd_wrap == wraps_at_start, "no PD wrap for a small step");
      if (OFFSETS[i] < -500.0) check(n_pd_wrap > wraps_at_start, "PD wraps for a step beyond its range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
