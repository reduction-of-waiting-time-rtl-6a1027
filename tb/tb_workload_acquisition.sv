// tb_workload_acquisition: acquisition of the differential PLL from the unlocked
// state, for DS-1 offsets of 100, 200 and 450 Hz, at the design's default
// parameters. The procedure is the same as for the original circuit's
// acquisition-time measurement: the loop runs with its input disconnected, then
// the offset input is connected and the pull-in is recorded.
//
// For each offset the reference is set to 1.544 MHz + offset, and the test is run
// N_TRY times with the release moved by 1.5 ms each time, about a third of the
// sawtooth's period (eight B cycles). The stuff pulses A are held away from the
// phase detector (a force on its input) for DISC_MS plus that shift. With
// only B counted, the detector state steps through all eight values and its
// output is a sawtooth; the VCXO wanders around the sawtooth's mean. The test
// checks that all eight states appear. Then A is released, and the phase of the
// recovered clock against the reference (unwrapped, in UI) is sampled every
// 0.5 ms for RUN_MS. The lock time is the last moment the phase is more than
// 0.5 UI from its final value. Wraps of the detector state between +3 and -4
// after the release are counted; they are the discontinuities seen in a slow
// pull-in. Checks: the sawtooth while disconnected; lock within 100 ms for
// 100 Hz and 200 Hz and within 250 ms for 450 Hz; afterwards the recovered rate
// equals the reference. The original circuit took 30 to 40 ms at 100 Hz and
// 200 Hz, and about 120 ms at 450 Hz, with detector wraps. Here the detector's
// starting state at the release depends on where the sawtooth stood, so the
// number of wraps varies with the exact timing.
module tb_workload_acquisition;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_DS2   = 6.312e6;
  localparam int  N_OFF   = 3;
  localparam real OFFSETS [N_OFF] = '{100.0, 200.0, 450.0};
  localparam real DISC_MS = 100.0;
  localparam real RUN_MS  = 300.0;
  localparam int  N_SAMP  = 600;
  localparam int  N_TRY   = 3;

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

  // Detector states seen, and wraps of the state between +3 and -4.
  int n_pd_wrap = 0;
  logic [2:0] pd_prev = '0;
  bit [7:0] pd_seen = '0;
  always @(posedge ds2_clk) begin
    if ((pd_prev == 3'b011 && pd_state == 3'b100) || (pd_prev == 3'b100 && pd_state == 3'b011))
      n_pd_wrap++;
    pd_prev <= pd_state;
    pd_seen[pd_state] = 1'b1;
  end

  int n_fo, n_ds1;
  bit counting = 0;
  always @(posedge fo)      if (counting) n_fo++;
  always @(posedge ds1_ref) if (counting) n_ds1++;

  initial begin
    #((DISC_MS + RUN_MS + 60.0) * real'(N_OFF * N_TRY) * 1.0e6 + 50.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real samp [N_SAMP];
  real final_ph, t_lock;
  real dev;
  int  wraps_at_start;
  initial begin
    #1000.0 rst_n = 1'b1;
    for (int i = 0; i < N_OFF; i++) for (int j = 0; j < N_TRY; j++) begin
      f_ds1 = 1.544e6 + OFFSETS[i];
      // Input disconnected: the detector sees B only.
      force dut.u_pd.a_pulse = 1'b0;
      #(0.5 * DISC_MS * 1.0e6);
      pd_seen = '0;
      #((0.5 * DISC_MS + 1.5 * real'(j)) * 1.0e6);
      $display("offset %5.1f Hz: disconnected, detector states seen %b, uf=%f V", OFFSETS[i], pd_seen, uf);
      check(pd_seen == 8'hFF, "detector sawtooth through all states while unlocked");
      // Connect the input and record the pull-in.
      release dut.u_pd.a_pulse;
      wraps_at_start = n_pd_wrap;
      for (int k = 0; k < N_SAMP; k++) begin
        #(RUN_MS * 1.0e6 / real'(N_SAMP));
        samp[k] = ph_unw;
      end
      final_ph = 0.0;
      for (int k = N_SAMP - 100; k < N_SAMP; k++) final_ph += samp[k] / 100.0;
      t_lock = 0.0;
      for (int k = 0; k < N_SAMP; k++) begin
        dev = samp[k] - final_ph;
        if (dev < 0.0) dev = -dev;
        if (dev > 0.5) t_lock = real'(k + 1) * RUN_MS / real'(N_SAMP);
      end
      n_fo = 0; n_ds1 = 0; counting = 1;
      #(50.0e6);
      counting = 0;
      $display("offset %5.1f Hz, try %0d: acquisition time %f ms, PD wraps %0d, fo=%0d ds1=%0d",
               OFFSETS[i], j, t_lock, n_pd_wrap - wraps_at_start, n_fo, n_ds1);
      check(t_lock < ((OFFSETS[i] > 300.0) ? 250.0 : 100.0), "acquires in time");
      check(n_fo >= n_ds1 - 2 && n_fo <= n_ds1 + 2, "recovered rate equals the reference after acquisition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
