// lag_loop_filter: behavioural model (not synthesizable logic) of the passive lag
// loop filter of the differential PLL, F(s) = (1 + s*tau2) / (1 + s*(tau1 + tau2)).
//
// The circuit is u_d -> R1 -> u_f, and u_f -> R2 -> C -> ground. The model keeps
// the capacitor voltage and advances it every STEP_NS nanoseconds with the exact
// solution for an input held constant over the step:
// vc <- ud + (vc - ud) * exp(-dt / ((R1 + R2) * C)), and u_f = vc + (ud - vc) * R2
// / (R1 + R2). With the document's R1 = 47 kOhm, R2 = 4.7 kOhm and C = 3.42 uF,
// tau1 = 160.7 ms and tau2 = 16.1 ms, giving omega_n = 82.5 rad/s and a damping
// factor of 0.7 together with K_o = 15039 rad/s/V and K_d = 0.08 V/rad.
//
// Interface and timing. ud is the PD voltage, uf the VCXO control voltage, both in
// volts. uf is updated every STEP_NS (1 us, far below the 177 ms filter time
// constant and the 0.55 ms period of the PD signals). The capacitor starts at
// V_INIT, the VCXO's centre-frequency voltage, as if the loop had been at rest;
// that starting value and the step are this model's own choices.
module lag_loop_filter #(
  parameter real R1      = 47.0e3,
  parameter real R2      = 4.7e3,
  parameter real C       = 3.42e-6,
  parameter real STEP_NS = 1000.0,
  parameter real V_INIT  = 3.80
) (
  input  real ud,
  output real uf
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TAU_NS = (R1 + R2) * C * 1.0e9;
  localparam real DECAY  = $exp(-STEP_NS / TAU_NS);
  localparam real DIVR   = R2 / (R1 + R2);

  real vc;

  initial vc = V_INIT;

  always #(STEP_NS) begin
    vc = ud + (vc - ud) * DECAY;
  end

  always_comb uf = vc + (ud - vc) * DIVR;

endmodule
