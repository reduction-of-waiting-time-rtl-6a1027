// jitter_meter: behavioural model (not synthesizable logic) of the waiting-time
// jitter measurement circuit: an EX-OR gate comparing the recovered DS-1 clock
// with the original DS-1 clock, followed by an active low-pass filter with a
// reference voltage that removes the DC offset.
//
// How it works. The EX-OR output is high while the two clocks differ, so its
// average is proportional to the time difference between them. For a delay d
// (in UI, 0 < d < 0.5) of one clock against the other, the duty cycle is 2d.
// The filter is inverting: an EX-OR output held high gives V_FS = -3.55 V, so the
// reading is 2 * V_FS = -7.1 V per UI, or K = 0.5 UI / 3.55 V = 0.14 UI/V. With
// the clocks about a quarter period (90 degrees) apart, the duty is one half.
// The reference voltage cancels that constant part through V_OFFSET, so
// vj = V_FS * 2d + V_OFFSET is 0 V at d = 0.25 UI. The filter is single-pole,
// with a 3 dB cutoff of FC_HZ. It passes the jitter, which mostly lies below
// 1 kHz, and removes the 3 MHz components of the EX-OR output. Its state is
// advanced with the exact exponential at every change of the EX-OR output and at
// every STEP_NS.
//
// Interface and timing. clk_rec and clk_ref are the two clocks; xor_out is the
// gate output; vj is the filter output in volts. The reading is unambiguous only
// while the delay stays between 0 and half a period, so the clocks should be set
// about a quarter period apart, as in the original measurement.
//
// From the document: the EX-OR gate, the active low-pass filter with a cutoff of
// about 1 kHz, its calibration (-3.55 V for a 180-degree phase difference with
// no reference voltage), and a reference voltage that cancels the offset near
// 90 degrees. This model's own choices: a first-order filter, and V_OFFSET set to
// cancel exactly 90 degrees.
module jitter_meter #(
  parameter real V_FS     = -3.55,
  parameter real V_OFFSET = 1.775,
  parameter real FC_HZ    = 1.0e3,
  parameter real STEP_NS  = 1000.0
) (
  input  logic clk_rec,
  input  logic clk_ref,
  output logic xor_out,
  output real  vj
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TAU_NS = 1.0e9 / (2.0 * 3.14159265358979 * FC_HZ);

  logic tick;
  logic level;
  real  t_last;
  real  vlp;
  real  target;

  initial begin
    tick   = 1'b0;
    level  = 1'b0;
    t_last = 0.0;
    vlp    = 0.0;
    vj     = V_OFFSET;
  end

  assign xor_out = clk_rec ^ clk_ref;

  always #(STEP_NS) tick = !tick;

  always @(xor_out or tick) begin
    target = level ? 1.0 : 0.0;
    vlp    = target + (vlp - target) * $exp(-($realtime - t_last) / TAU_NS);
    t_last = $realtime;
    level  = xor_out;
    vj     = V_FS * vlp + V_OFFSET;
  end

endmodule
