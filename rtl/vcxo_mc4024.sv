// vcxo_mc4024: behavioural model (not synthesizable logic) of the voltage-
// controlled crystal oscillator of the differential PLL: an MC4024 multivibrator
// with a 12.36 MHz crystal, whose output is later divided by 8.
//
// The output frequency is F_CENTER + K_HZ_PER_V * (vctrl - V_CENTER), held inside
// the tuning range F_MIN..F_MAX. The defaults are the document's measured values
// scaled by the divide-by-8: centre 8 x 1.544 MHz at 3.80 V and 8 x 2393.5 Hz/V
// (K_o = 15039 rad/s/V at the divided output), a gain measured as linear over
// +/-200 Hz. The range limits come from the measured hold range of the loop:
// the difference frequency f_n - f_o stayed locked from 0.960 kHz to 2.895 kHz,
// so with f_n = 1545.796 kHz the divided output reaches 1542.901 kHz to
// 1544.836 kHz. Outside +/-200 Hz the real part is not linear; the model stays
// linear up to the limits. The crystal's nominal frequency, 12.36 MHz, is about
// 8 x 1.544 MHz; the model uses 8 x 1.544 MHz as its centre.
//
// Interface and timing. clk_out is a square wave. Each half period is computed
// from vctrl at the edge that starts it. Edge times are accumulated as real
// numbers, so rounding to the 1 ps time precision adds at most 1 ps of jitter per
// edge and no frequency error. OFFSET_HZ shifts the free-running frequency and is
// 0 by default; the clamp to the tuning range is this model's own choice.
// The half-period delay is a real variable, so a linter cannot prove it nonzero
// and warns of a possible zero delay; the clamp keeps it near 40 ns.
module vcxo_mc4024 #(
  parameter real F_CENTER   = 8.0 * 1.544e6,
  parameter real V_CENTER   = 3.80,
  parameter real K_HZ_PER_V = 8.0 * 2393.5,
  parameter real F_MIN      = 8.0 * 1542.901e3,
  parameter real F_MAX      = 8.0 * 1544.836e3,
  parameter real OFFSET_HZ  = 0.0
) (
  input  real  vctrl,
  output logic clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  real f_hz;
  real t_edge;

  initial begin
    clk_out = 1'b0;
    t_edge  = 0.0;
  end

  always begin
    f_hz = F_CENTER + OFFSET_HZ + K_HZ_PER_V * (vctrl - V_CENTER);
    if (f_hz < F_MIN) f_hz = F_MIN;
    if (f_hz > F_MAX) f_hz = F_MAX;
    t_edge = t_edge + 0.5e9 / f_hz;
    #(t_edge - $realtime);
    clk_out = !clk_out;
  end

endmodule
