// pd_summing_amp: behavioural model (not synthesizable logic) of the op-amp summer
// that turns the phase detector's 3-bit state into the PD output voltage u_d.
//
// Each state bit drives the summing node as a TTL level: 3.5 V for a 1, 0 V for a
// 0. S1, S2 and S3 enter with weights 1/7, 2/7 and -4/7 of that level, and a
// reference of -12 V through the 20k/60k divider adds a +4 V offset, so that
// u_d = 0.5*(S1 + 2*S2 - 4*S3) + 4 V: 2.0 V for S = -4 up to 5.5 V for S = +3 in
// steps of 0.5 V. The gain is 0.5 V per 2*pi, K_d = 0.0796 V/rad.
//
// Interface and timing. s is {S3, S2, S1}; ud follows it with no delay (the
// op-amp's own response is far faster than the loop and is not modelled). All the
// numbers are the document's.
module pd_summing_amp #(
  parameter real V_HIGH = 3.5,    // voltage of a logic 1
  parameter real V_REF  = 12.0,   // magnitude of the negative reference
  parameter real OFFSET_GAIN = 20.0 / 60.0
) (
  input  logic [2:0] s,
  output real        ud
);
  timeunit 1ns;
  timeprecision 1ps;


  always_comb begin
    ud = V_HIGH * ((1.0 / 7.0) * real'(s[0]) + (2.0 / 7.0) * real'(s[1])
                   - (4.0 / 7.0) * real'(s[2]))
         + OFFSET_GAIN * V_REF;
  end

endmodule
