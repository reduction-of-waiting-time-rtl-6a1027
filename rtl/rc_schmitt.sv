// rc_schmitt: behavioural model (not synthesizable logic) of the output stage of
// the differential PLL's mixer: an RC low-pass filter (R = 1 kOhm, C = 15 nF,
// corner 10.6 kHz) followed by an SN7414 inverting Schmitt trigger.
//
// How it works. The filter averages the phase/frequency detector's pulse train,
// whose duty cycle ramps at the difference frequency f_n - f_o (about 1.8 kHz),
// into a sawtooth and removes the 1.5 MHz components. The Schmitt trigger squares
// the sawtooth into the logic signal B. The capacitor voltage is advanced with the
// exact exponential at every input edge and every STEP_NS, so pulses of any width
// are averaged correctly; the thresholds are checked at those same instants.
//
// Interface and timing. vin is the logic input (a high level is V_OH volts);
// vout is the Schmitt output, low once the filtered voltage has risen above VT_POS
// and high once it has fallen below VT_NEG; vfilt is the filtered voltage. R, C
// and the part types are the document's. The TTL levels (3.5 V high, thresholds
// 1.7 V and 0.9 V) are the usual values for these parts, and the STEP_NS
// resolution is this model's own choice.
module rc_schmitt #(
  parameter real R       = 1.0e3,
  parameter real C       = 15.0e-9,
  parameter real V_OH    = 3.5,
  parameter real VT_POS  = 1.7,
  parameter real VT_NEG  = 0.9,
  parameter real STEP_NS = 50.0
) (
  input  logic vin,
  output logic vout,
  output real  vfilt
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TAU_NS = R * C * 1.0e9;

  logic tick;
  logic level;
  real  t_last;
  real  target;

  initial begin
    tick   = 1'b0;
    level  = 1'b0;
    t_last = 0.0;
    vout   = 1'b1;
    vfilt  = 0.0;
  end

  always #(STEP_NS) tick = !tick;

  always @(vin or tick) begin
    target = level ? V_OH : 0.0;
    vfilt  = target + (vfilt - target) * $exp(-($realtime - t_last) / TAU_NS);
    t_last = $realtime;
    level  = vin;
    if (vfilt > VT_POS)      vout = 1'b0;
    else if (vfilt < VT_NEG) vout = 1'b1;
  end

endmodule
