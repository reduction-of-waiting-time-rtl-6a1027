// tb_workload_hold_range: hold range and lock range of the differential PLL, at
// the design's default parameters, measured as on the original circuit: the
// input frequency is swept slowly, and the points where the loop drops out of
// lock and where it locks again are noted.
//
// The DS-1 reference is swept at RAMP_HZ_S from 0 Hz to beyond each end and back
// to 0 Hz, first upwards, then downwards. A DS-1 offset df moves the input of the
// loop, the stuff rate f_n - f_1, to about 1796 Hz - df. Loss of lock is the
// first wrap of the phase detector state (+3 to -4 or back) on the way out;
// relock is the last wrap on the way back.
//
// Expected values. The original circuit held lock for input frequencies of
// 0.960 kHz to 2.895 kHz, that is DS-1 offsets of +836 Hz and -1099 Hz. The
// VCXO model stops tuning at those points. Past them the phase error grows
// quadratically with time during the sweep, and the detector wraps once it has
// gained about 3.5 more cycles: sqrt(2 * 3.5 / RAMP_HZ_S) s later, about 100 Hz
// further on. The check is that lock is lost between 30 Hz inside and 160 Hz
// beyond the hold limit. The original lock range was 1.430 kHz to 2.630 kHz
// (offsets +366 Hz and -834 Hz). Here the loop relocks as soon as the VCXO can
// follow again, about where it dropped out: with a VCXO that tunes linearly up to
// its limits and an eight-cycle detector, the model's lock range reaches the
// hold range. The relock points are reported; the check is only that the loop
// relocks on the way back and then runs at the reference rate.
module tb_workload_hold_range;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_DS2     = 6.312e6;
  localparam real F_N       = F_DS2 * 48.0 / 49.0 / 4.0;
  localparam real RAMP_HZ_S = 1500.0;
  localparam real HOLD_HI   = F_N - 0.960e3 - 1.544e6;   // +836 Hz
  localparam real HOLD_LO   = F_N - 2.895e3 - 1.544e6;   // -1099 Hz
  localparam real SWEEP_HI  = 1100.0;
  localparam real SWEEP_LO  = -1350.0;

  logic ds2_clk = 1'b0, ds1_ref = 1'b0, rst_n = 1'b0, data_in = 1'b0;
  logic frame_start, fn_en, stuff_opp, stuff_pulse, f1_en, b_sig, b_tick;
  logic vcxo_clk, fo, data_out, data_valid, store_overflow, store_underflow;
  logic [2:0] pd_state;
  logic [4:0] store_fill;
  real ud, uf;
  // The jitter meter is not used here.
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

  real df = 0.0;
  real t2 = 0.0, t1 = 0.0;
  always begin t2 = t2 + 0.5e9 / F_DS2; #(t2 - $realtime) ds2_clk = !ds2_clk; end
  always begin t1 = t1 + 0.5e9 / (1.544e6 + df); #(t1 - $realtime) ds1_ref = !ds1_ref; end

  // Wraps of the detector state, with the offset at the first and the last.
  int  n_pd_wrap = 0;
  real df_first = 0.0, df_last = 0.0;
  logic [2:0] pd_prev = '0;
  always @(posedge ds2_clk) begin
    if ((pd_prev == 3'b011 && pd_state == 3'b100) || (pd_prev == 3'b100 && pd_state == 3'b011)) begin
      if (n_pd_wrap == 0) df_first = df;
      df_last = df;
      n_pd_wrap++;
    end
    pd_prev <= pd_state;
  end

  int n_fo, n_ds1;
  bit counting = 0;
  always @(posedge fo)      if (counting) n_fo++;
  always @(posedge ds1_ref) if (counting) n_ds1++;

  initial begin
    #((0.2 + 2.0 * (SWEEP_HI - SWEEP_LO) / RAMP_HZ_S + 0.5) * 1.0e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Move df to the target at RAMP_HZ_S, in 10 us steps.
  task automatic sweep_to(input real target);
    real step;
    step = RAMP_HZ_S * 10.0e-6;
    while ((target > df && target - df > step) || (target < df && df - target > step)) begin
      #10_000;
      df = (target > df) ? df + step : df - step;
    end
    df = target;
  endtask

  real lose [2], relock [2];
  int  wraps_out [2];
  initial begin
    #1000.0 rst_n = 1'b1;
    #150.0e6;
    for (int side = 0; side < 2; side++) begin
      // Outwards.
      n_pd_wrap = 0;
      sweep_to(side == 0 ? SWEEP_HI : SWEEP_LO);
      lose[side] = df_first;
      wraps_out[side] = n_pd_wrap;
      // Back to 0 Hz.
      n_pd_wrap = 0;
      df_last = df;
      sweep_to(0.0);
      relock[side] = df_last;
      #100.0e6;
      n_fo = 0; n_ds1 = 0; counting = 1;
      #50.0e6;
      counting = 0;
      $display("%s sweep: lock lost at %8.1f Hz (hold limit %8.1f Hz), %0d wraps; relocked at %8.1f Hz (%0d wraps); fo=%0d ds1=%0d",
               side == 0 ? "upward" : "downward", lose[side], side == 0 ? HOLD_HI : HOLD_LO,
               wraps_out[side], relock[side], n_pd_wrap, n_fo, n_ds1);
      if (side == 0) begin
        check(wraps_out[0] > 0 && lose[0] > HOLD_HI - 30.0 && lose[0] < HOLD_HI + 160.0,
              "upper hold limit where the VCXO stops tuning");
        check(relock[0] > 0.0 && relock[0] < SWEEP_HI, "relocks on the way back from above");
      end else begin
        check(wraps_out[1] > 0 && lose[1] < HOLD_LO + 30.0 && lose[1] > HOLD_LO - 160.0,
              "lower hold limit where the VCXO stops tuning");
        check(relock[1] < 0.0 && relock[1] > SWEEP_LO, "relocks on the way back from below");
      end
      check(n_fo >= n_ds1 - 2 && n_fo <= n_ds1 + 2, "recovered rate equals the reference after relock");
    end
    $display("input frequency range held: %f .. %f kHz",
             (F_N - 1.544e6 - lose[0]) * 1.0e-3, (F_N - 1.544e6 - lose[1]) * 1.0e-3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
