// tb_m12_dpll_desync_top: end-to-end test of the improved M12 desynchronizer at its
// default parameters.
//
// A 6.312 MHz DS-2 clock and a DS-1 reference clock (1.544 MHz plus DS1_OFFSET_HZ)
// drive the design. The tributary data are a PRBS-7 sequence, one bit per gapped
// clock pulse. After ACQ_MS of acquisition the test measures, over MEAS_MS:
//   - the stuff rate, against f_n - f_DS1 with f_n = 6.312 MHz * 48/49 / 4;
//   - the recovered clock's average frequency, against the DS-1 reference;
//   - the recovered clock's peak-to-peak phase wander against the reference;
//   - the data read out of the elastic store, with a self-synchronising PRBS-7
//     checker, and that the store neither overflows nor underflows;
//   - the EX-OR jitter meter's reading: its clock meas_ref is the DS-1 clock,
//     shifted 5 ms before the measurement so that it leads fo by a quarter
//     period; the meter's peak-to-peak reading, at 0.14 UI/V, must agree with
//     the edge-time measurement, and its mean must stay near zero;
//   - that every mechanism happened: overhead gaps, stuff pulses, difference-
//     frequency pulses B, at least two PD states, lock, a jitter reading.
module tb_m12_dpll_desync_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_DS2         = 6.312e6;
  localparam real DS1_OFFSET_HZ = 50.0;
  localparam real F_DS1         = 1.544e6 + DS1_OFFSET_HZ;
  localparam real F_N           = F_DS2 * 48.0 / 49.0 / 4.0;
  localparam real ACQ_MS        = 120.0;
  localparam real MEAS_MS       = 40.0;
  localparam real MAX_PP_UI     = 0.5;

  logic ds2_clk = 1'b0, ds1_ref = 1'b0, rst_n = 1'b0, data_in;
  logic frame_start, fn_en, stuff_opp, stuff_pulse, f1_en, b_sig, b_tick;
  logic vcxo_clk, fo, data_out, data_valid, store_overflow, store_underflow;
  logic [2:0] pd_state;
  logic [4:0] store_fill;
  real ud, uf, jitter_v;
  logic meas_ref = 1'b0;

  m12_dpll_desync_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Clocks with edge times kept as reals, so neither drifts.
  real t2 = 0.0, t1 = 0.0;
  always begin
    t2 = t2 + 0.5e9 / F_DS2;
    #(t2 - $realtime) ds2_clk = !ds2_clk;
  end
  always begin
    t1 = t1 + 0.5e9 / F_DS1;
    #(t1 - $realtime) ds1_ref = !ds1_ref;
  end

  // The jitter meter's copy of the DS-1 clock, delayed by meas_shift (0 .. 1 UI).
  real tm = 0.0, meas_shift = 0.0;
  always begin
    tm = tm + 0.5e9 / F_DS1;
    #(tm + meas_shift - $realtime) meas_ref = !meas_ref;
  end

  // The meter's reading, sampled every 10 us while measuring.
  real vj_min = 1.0e9, vj_max = -1.0e9, vj_sum = 0.0;
  int  n_vj = 0;
  always #10_000 if (measuring) begin
    n_vj++;
    vj_sum = vj_sum + jitter_v;
    if (jitter_v < vj_min) vj_min = jitter_v;
    if (jitter_v > vj_max) vj_max = jitter_v;
  end

  // PRBS-7 source (x^7 + x^6 + 1), one bit per gapped clock pulse.
  logic [6:0] prbs_tx = 7'h7F;
  assign data_in = prbs_tx[6];
  always @(posedge ds2_clk) if (f1_en) prbs_tx <= {prbs_tx[5:0], prbs_tx[6] ^ prbs_tx[5]};

  // Self-synchronising PRBS-7 checker on the recovered data.
  logic [6:0] prbs_rx = '0;
  int rx_bits = 0, rx_errors = 0;
  bit measuring = 0;
  always @(posedge fo) if (data_valid) begin
    rx_bits++;
    if (measuring && rx_bits > 7 && data_out != (prbs_rx[6] ^ prbs_rx[5])) rx_errors++;
    prbs_rx <= {prbs_rx[5:0], data_out};
  end

  // Event counters.
  int n_stuff = 0, n_ovh_gap = 0, n_b = 0, n_fo = 0, n_ds1 = 0, n_fn = 0, n_f1 = 0;
  int n_oflow = 0, n_uflow = 0, n_opp = 0;
  bit [7:0] pd_seen = '0;
  always @(posedge ds2_clk) if (rst_n && measuring) begin
    if (stuff_pulse)      n_stuff++;
    if (stuff_opp)        n_opp++;
    if (fn_en)            n_fn++;
    if (f1_en)            n_f1++;
    if (b_tick)           n_b++;
    if (store_overflow)   n_oflow++;
    pd_seen[pd_state] = 1'b1;
  end
  // An overhead gap: the block's overhead bit delays the tributary's next fn pulse.
  always @(posedge ds2_clk) if (rst_n && measuring && dut.u_gen.overhead) n_ovh_gap++;
  always @(posedge ds1_ref) if (measuring) n_ds1++;

  // Phase of each recovered-clock edge against the reference, in UI, unwrapped.
  real last_ds1_edge = 0.0, ph, ph_prev = 0.0, ph_unw, ph_min = 1.0e9, ph_max = -1.0e9;
  real wraps = 0.0;
  bit  first_ph = 1;
  always @(posedge ds1_ref) last_ds1_edge = $realtime;
  always @(posedge fo) if (measuring) begin
    n_fo++;
    if (store_underflow) n_uflow++;
    ph = ($realtime - last_ds1_edge) * F_DS1 * 1.0e-9;
    if (!first_ph) begin
      if (ph - ph_prev > 0.5)  wraps = wraps - 1.0;
      if (ph - ph_prev < -0.5) wraps = wraps + 1.0;
    end
    first_ph = 0;
    ph_prev = ph;
    ph_unw  = ph + wraps;
    if (ph_unw < ph_min) ph_min = ph_unw;
    if (ph_unw > ph_max) ph_max = ph_unw;
  end

  // Watchdog.
  initial begin
    #((ACQ_MS + MEAS_MS + 20.0) * 1.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_stuff, f_fo_meas, rho;
  real t_start, p_lag, meter_pp, meter_mean, edge_pp;
  int  n_b_acq;
  initial begin
    #1000.0 rst_n = 1'b1;
    // Acquisition.
    #((ACQ_MS - 5.0) * 1.0e6);
    // Set the meter's reference a quarter period ahead of fo.
    @(posedge fo);
    p_lag = ($realtime - last_ds1_edge) * F_DS1 * 1.0e-9;
    meas_shift = (p_lag - 0.25 - $floor(p_lag - 0.25)) * 1.0e9 / F_DS1;
    #(5.0 * 1.0e6);
    $display("after acquisition: uf=%f V ud=%f V pd_state=%0d fill=%0d", uf, ud, pd_state, store_fill);
    measuring = 1;
    t_start = $realtime;
    #(MEAS_MS * 1.0e6);
    measuring = 0;

    exp_stuff = (F_N - F_DS1) * MEAS_MS * 1.0e-3;
    rho       = real'(n_stuff) / real'(n_opp);
    f_fo_meas = real'(n_fo) / (MEAS_MS * 1.0e-3);
    $display("stuffs=%0d (expected %f) opportunities=%0d stuff ratio=%f", n_stuff, exp_stuff, n_opp, rho);
    $display("fo edges=%0d ds1 edges=%0d  B pulses=%0d  fn=%0d f1=%0d", n_fo, n_ds1, n_b, n_fn, n_f1);
    $display("phase wander pk-pk=%f UI  rx bits=%0d errors=%0d oflow=%0d uflow=%0d",
             ph_max - ph_min, rx_bits, rx_errors, n_oflow, n_uflow);

    // Frame and stuff rates.
    check(n_opp == int'(MEAS_MS * 1.0e-3 * F_DS2 / 1176.0) ||
          n_opp == int'(MEAS_MS * 1.0e-3 * F_DS2 / 1176.0) + 1 ||
          n_opp == int'(MEAS_MS * 1.0e-3 * F_DS2 / 1176.0) - 1, "one stuff opportunity per 1176 DS-2 bits");
    check(n_stuff >= int'(exp_stuff) - 3 && n_stuff <= int'(exp_stuff) + 3, "stuff rate equals f_n - f_DS1");
    check(n_f1 >= n_ds1 - 3 && n_f1 <= n_ds1 + 3, "gapped clock rate equals DS-1 rate");
    // Lock: recovered clock frequency and phase.
    check(n_fo >= n_ds1 - 3 && n_fo <= n_ds1 + 3, "recovered clock has the DS-1 rate");
    check(ph_max - ph_min < MAX_PP_UI, "recovered clock phase wander below bound");
    check(uf > 3.71 && uf < 3.89, "control voltage inside the VCXO's linear range");
    // B has the stuff rate in lock.
    check(n_b >= n_stuff - 3 && n_b <= n_stuff + 3, "B pulses match stuff pulses in lock");
    // Data path.
    check(rx_bits > 1000 && rx_errors == 0, "PRBS data recovered without error");
    check(n_oflow == 0 && n_uflow == 0, "elastic store neither overflows nor underflows");
    // Jitter meter against the edge-time measurement.
    edge_pp    = ph_max - ph_min;
    meter_pp   = (vj_max - vj_min) * 0.5 / 3.55;
    meter_mean = -vj_sum / real'(n_vj) * 0.5 / 3.55;
    $display("jitter meter: pk-pk %f UI (edges %f UI), mean %f UI", meter_pp, edge_pp, meter_mean);
    check(meter_pp > 0.7 * edge_pp - 0.01 && meter_pp < 1.3 * edge_pp + 0.01,
          "jitter meter agrees with edge timing");
    check(meter_mean > -0.1 && meter_mean < 0.1, "jitter meter centred at a quarter period");
    // Mechanisms.
    check(n_ovh_gap > 0, "overhead gaps occurred");
    check(n_stuff > 0, "stuff pulses occurred");
    check(n_b > 0, "difference-frequency pulses occurred");
    check($countones(pd_seen) >= 2, "phase detector moved between states");
    check(n_vj > 0 && vj_max > vj_min, "jitter meter produced a reading");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
