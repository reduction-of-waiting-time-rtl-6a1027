// m12_dpll_desync_top: improved M12 desynchronizer for one DS-1 tributary. The
// recovered DS-1 clock is locked to the stuff pulses, which arrive at about
// 1.8 kHz, by a "differential PLL". It is not locked to the gapped 1.544 MHz data
// clock, so a loop bandwidth near 13 Hz is practical, and the PLL filters out far
// more of the waiting-time jitter that pulse stuffing causes.
//
// Structure (signal flow):
//   m12_stuff_generator : DS-2 clock + DS-1 reference -> fn, stuff pulses A, f1
//   dpll_phase_detector : counts A and B, S = count(B) - count(A)  (3 bits)
//   pd_summing_amp      : S -> u_d = 0.5*S + 4 V                  (behavioural)
//   lag_loop_filter     : u_d -> u_f                              (behavioural)
//   vcxo_mc4024         : u_f -> 8 x f_o                          (behavioural)
//   clk_div8            : -> recovered clock f_o
//   pfd_type4           : fn against f_o (the mixer's MC4044)
//   rc_schmitt          : RC filter + Schmitt -> B at f_n - f_o   (behavioural)
//   elastic_store       : data written by f1, read by f_o
//   jitter_meter        : EX-OR of f_o and the DS-1 clock, low-pass (behavioural)
// In lock, the rate of B equals the rate of A: f_n - f_o = f_n - f_1, so f_o
// equals the average rate of the gapped clock, the DS-1 rate.
//
// Interface and timing. ds2_clk (6.312 MHz) clocks the generator, the phase
// detector and the write side of the elastic store. ds1_ref is the DS-1 clock of
// the multiplexer side; the generator uses it only to decide when to stuff, as the
// multiplexer would. data_in is the tributary's data bit, sampled on ds2_clk when
// f1_en is high. fo is the recovered clock; data_out/data_valid come from the
// elastic store on fo. ud and uf are the PD and VCXO control voltages.
// meas_ref is the original DS-1 clock as the jitter meter sees it. It has the
// same rate as ds1_ref, and its phase is set about a quarter period ahead of fo.
// jitter_v is the meter's reading, -7.1 V per UI of phase (0.14 UI/V).
//
// From the document: the loop (Figure "measurement circuit for K_d": PD, loop
// filter, VCXO, mixer fed by fn), all component values, the generator, and the
// EX-OR jitter meter. This design's own choices: a synchronous PD, fn registered
// before it clocks the mixer, and the elastic store's depth and behaviour. The
// analog blocks are behavioural models, so this top level simulates but does not
// synthesize.
// Linters report rst_n and fo_rst_sync as used both as asynchronous resets and as
// data. Both are intended: rst_n also enters the mixer detector's combined clear,
// and fo_rst_sync is the two-stage synchroniser that releases the recovered-clock
// reset on a vcxo_clk edge.
module m12_dpll_desync_top
  import m12_pkg::*;
#(
  parameter int unsigned CHANNEL         = 1,
  parameter int          STUFF_THRESHOLD = 1,
  parameter int unsigned STORE_DEPTH     = 16,
  parameter real         VCXO_OFFSET_HZ  = 0.0,
  localparam int unsigned FILL_W         = $clog2(STORE_DEPTH) + 1
) (
  input  logic              ds2_clk,
  input  logic              ds1_ref,
  input  logic              rst_n,
  input  logic              data_in,
  // generator
  output logic              frame_start,
  output logic              fn_en,
  output logic              stuff_opp,
  output logic              stuff_pulse,
  output logic              f1_en,
  // differential PLL
  output logic [2:0]        pd_state,
  output logic              b_sig,
  output logic              b_tick,
  output real               ud,
  output real               uf,
  output logic              vcxo_clk,
  output logic              fo,
  // elastic store
  output logic              data_out,
  output logic              data_valid,
  output logic              store_overflow,
  output logic              store_underflow,
  output logic [FILL_W-1:0] store_fill,
  // jitter measurement
  input  logic              meas_ref,
  output real               jitter_v
);
  timeunit 1ns;
  timeprecision 1ps;

  logic              overhead_unused, stuff_flag_unused;
  logic signed [5:0] gen_phase_unused;
  logic [2:0]        cnt_a_unused, cnt_b_unused;
  logic              fn_clk, pfd_up, pfd_down_unused;
  real               vfilt_unused;
  logic              meas_xor_unused;
  logic              fo_rst_n;
  logic [1:0]        fo_rst_sync;

  m12_stuff_generator #(
    .CHANNEL(CHANNEL), .STUFF_THRESHOLD(STUFF_THRESHOLD)
  ) u_gen (
    .ds2_clk, .rst_n, .ds1_ref,
    .frame_start, .overhead(overhead_unused), .fn_en, .stuff_opp, .stuff_pulse,
    .f1_en, .stuff_flag(stuff_flag_unused), .phase(gen_phase_unused)
  );

  dpll_phase_detector u_pd (
    .clk(ds2_clk), .rst_n, .a_pulse(stuff_pulse), .b_in(b_sig),
    .s(pd_state), .cnt_a(cnt_a_unused), .cnt_b(cnt_b_unused), .b_tick
  );

  pd_summing_amp u_amp (.s(pd_state), .ud);

  lag_loop_filter u_lf (.ud, .uf);

  vcxo_mc4024 #(.OFFSET_HZ(VCXO_OFFSET_HZ)) u_vcxo (.vctrl(uf), .clk_out(vcxo_clk));

  // Reset for the recovered-clock domain, released synchronously to it.
  always_ff @(posedge vcxo_clk or negedge rst_n) begin
    if (!rst_n) fo_rst_sync <= '0;
    else        fo_rst_sync <= {fo_rst_sync[0], 1'b1};
  end
  assign fo_rst_n = fo_rst_sync[1];

  clk_div8 u_div (.clk_in(vcxo_clk), .rst_n(fo_rst_n), .fo);

  // fn as a clean clock for the mixer: one DS-2 period high per fn pulse.
  always_ff @(posedge ds2_clk or negedge rst_n) begin
    if (!rst_n) fn_clk <= 1'b0;
    else        fn_clk <= fn_en;
  end

  pfd_type4 u_mix_pfd (.r(fn_clk), .v(fo), .rst_n, .up(pfd_up), .down(pfd_down_unused));

  rc_schmitt u_mix_rc (.vin(pfd_up), .vout(b_sig), .vfilt(vfilt_unused));

  elastic_store #(.DEPTH(STORE_DEPTH), .WIDTH(1)) u_store (
    .wclk(ds2_clk), .wrst_n(rst_n), .wen(f1_en), .wdata(data_in),
    .overflow(store_overflow),
    .rclk(fo), .rrst_n(fo_rst_n), .rdata(data_out), .rvalid(data_valid),
    .underflow(store_underflow), .rd_fill(store_fill)
  );

  // Jitter measurement: the recovered clock against the original DS-1 clock.
  jitter_meter u_meter (.clk_rec(fo), .clk_ref(meas_ref), .xor_out(meas_xor_unused), .vj(jitter_v));

endmodule
