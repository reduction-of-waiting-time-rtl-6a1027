// pfd_type4: type-4 (edge-triggered, tri-state) phase/frequency detector, the
// function of the MC4044 used as the mixer of the differential PLL.
//
// How it works. A rising edge on r sets up, a rising edge on v sets down; as soon
// as both are set they are cleared together. up is therefore high from an r edge
// to the following v edge, so its duty cycle is the phase of v behind r. When r
// runs faster than v, that phase grows by the frequency difference every cycle and
// wraps once per difference-frequency period: the average of up is a sawtooth at
// |f_r - f_v|, which the RC filter and Schmitt trigger of the mixer turn into the
// difference-frequency square wave.
//
// Interface and timing. r and v are clocks; up and down are level outputs that
// change right after input edges. The mutual clear is a zero-delay feedback from
// the two flip-flop outputs to their asynchronous clears (a real part has a gate
// delay there); this loop is the intended structure of a type-4 detector, and a
// linter may report it as a combinational loop. rst_n clears both.
// Simulation sees the clear only on its rising edge, so if both flip-flops power
// up set, the clear acts at the first r or v edge instead, which finds clr high
// and clears that flip-flop; the detector is in step after one input cycle.
//
// From the document: the detector type, its inputs (fn on the signal input, fo on
// the VCO input) and its behaviour. This design's own choice: the two-flip-flop
// form with a common clear, instead of the gate-level latch circuit of the part.
module pfd_type4 (
  input  logic r,      // reference / signal input
  input  logic v,      // VCO input
  input  logic rst_n,
  output logic up,
  output logic down
);
  timeunit 1ns;
  timeprecision 1ps;


  logic clr;

  assign clr = (up && down) || !rst_n;

  always_ff @(posedge r or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge v or posedge clr) begin
    if (clr) down <= 1'b0;
    else     down <= 1'b1;
  end

endmodule
