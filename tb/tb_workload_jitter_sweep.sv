// tb_workload_jitter_sweep: waiting-time jitter of the recovered clock against
// the DS-1 frequency offset, at the design's default parameters.
//
// The DS-1 reference is set in turn to 1.544 MHz plus 0, 7, 13, 100 and 200 Hz.
// The stuff ratio follows from rho = (f_n - f_DS1) / (f_DS2 / 1176): 0.3346 at
// 0 Hz, about 1/3 at 7 Hz (the worst case, whose jitter reaches down to DC),
// 0.3160 at 100 Hz. After SETTLE_MS at each offset, every rising edge of the
// recovered clock is timed against the last reference edge for MEAS_MS (1 s, and
// 2 s and 3 s at 0 Hz and 7 Hz, whose jitter is slowest); the
// unwrapped phase gives the peak-to-peak and rms jitter in unit intervals (UI).
// Checks: the measured stuff ratio against the formula, the recovered rate
// against the reference, error-free data, the jitter below the bound for an
// unfiltered M12 waiting-time jitter waveform (0.38 UI peak-to-peak) plus the
// timing resolution of this stuff detector, which sees the DS-1 reference only at
// DS-2 clock edges (f_DS1 / f_DS2 = 0.245 UI), and that
// away from 1/3 (100 and 200 Hz) the jitter is well below the worst case.
module tb_workload_jitter_sweep;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_DS2     = 6.312e6;
  localparam real F_N       = F_DS2 * 48.0 / 49.0 / 4.0;
  localparam real SETTLE_MS = 150.0;
  localparam int  N_OFF     = 5;
  localparam real OFFSETS [N_OFF] = '{0.0, 7.0, 13.0, 100.0, 200.0};
  // Longer windows near rho = 1/3, where the jitter has its lowest frequencies.
  localparam real MEAS_MS [N_OFF] = '{2000.0, 3000.0, 1000.0, 1000.0, 1000.0};

  logic ds2_clk = 1'b0, ds1_ref = 1'b0, rst_n = 1'b0, data_in;
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

  logic [6:0] prbs_tx = 7'h7F;
  assign data_in = prbs_tx[6];
  always @(posedge ds2_clk) if (f1_en) prbs_tx <= {prbs_tx[5:0], prbs_tx[6] ^ prbs_tx[5]};
  logic [6:0] prbs_rx = '0;
  int rx_errors = 0;
  bit measuring = 0;
  always @(posedge fo) if (data_valid) begin
    if (measuring && data_out != (prbs_rx[6] ^ prbs_rx[5])) rx_errors++;
    prbs_rx <= {prbs_rx[5:0], data_out};
  end

  int n_stuff, n_opp, n_fo, n_ds1;
  always @(posedge ds2_clk) if (measuring) begin
    if (stuff_pulse) n_stuff++;
    if (stuff_opp)   n_opp++;
  end
  always @(posedge ds1_ref) if (measuring) n_ds1++;

  real last_ds1 = 0.0, ph, ph_prev, wraps, ph_unw, ph_min, ph_max, s1, s2;
  int  n_ph;
  always @(posedge ds1_ref) last_ds1 = $realtime;
  always @(posedge fo) if (measuring) begin
    n_fo++;
    ph = ($realtime - last_ds1) * f_ds1 * 1.0e-9;
    if (n_ph > 0) begin
      if (ph - ph_prev > 0.5)  wraps = wraps - 1.0;
      if (ph - ph_prev < -0.5) wraps = wraps + 1.0;
    end
    ph_prev = ph;
    ph_unw  = ph + wraps;
    if (ph_unw < ph_min) ph_min = ph_unw;
    if (ph_unw > ph_max) ph_max = ph_unw;
    s1 += ph_unw;
    s2 += ph_unw * ph_unw;
    n_ph++;
  end

  initial begin
    #((SETTLE_MS * real'(N_OFF) + 8000.0) * 1.0e6 + 50.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rho_exp, rho, pp, rms, mean, pp_worst = 0.0;
  real pp_all [N_OFF];
  initial begin
    #1000.0 rst_n = 1'b1;
    for (int i = 0; i < N_OFF; i++) begin
      f_ds1 = 1.544e6 + OFFSETS[i];
      #(SETTLE_MS * 1.0e6);
      n_stuff = 0; n_opp = 0; n_fo = 0; n_ds1 = 0; n_ph = 0; rx_errors = 0;
      wraps = 0.0; ph_min = 1.0e9; ph_max = -1.0e9; s1 = 0.0; s2 = 0.0;
      measuring = 1;
      #(MEAS_MS[i] * 1.0e6);
      measuring = 0;
      rho_exp = (F_N - f_ds1) / (F_DS2 / 1176.0);
      rho     = real'(n_stuff) / real'(n_opp);
      pp      = ph_max - ph_min;
      mean    = s1 / real'(n_ph);
      rms     = $sqrt(s2 / real'(n_ph) - mean * mean);
      $display("offset %6.1f Hz: rho=%f (formula %f)  jitter %f UI p-p, %f UI rms  fo=%0d ds1=%0d errors=%0d",
               OFFSETS[i], rho, rho_exp, pp, rms, n_fo, n_ds1, rx_errors);
      check(rho > rho_exp - 0.02 && rho < rho_exp + 0.02, "stuff ratio follows the offset");
      check(n_fo >= n_ds1 - 2 && n_fo <= n_ds1 + 2, "recovered clock has the reference rate");
      check(rx_errors == 0, "data recovered without error");
      check(pp < 0.38 + 1.544e6 / F_DS2, "peak-to-peak jitter below the unfiltered bound");
      check(rms < pp / 2.0, "rms below half the peak-to-peak");
      pp_all[i] = pp;
      if (pp > pp_worst) pp_worst = pp;
    end
    check(pp_all[3] < 0.5 * pp_worst && pp_all[4] < 0.5 * pp_worst,
          "jitter away from rho = 1/3 well below the worst case");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
