// dpll_phase_detector: the digital part of the differential PLL's phase detector.
//
// Two 3-bit up-counters count the two PD inputs: the stuff pulses A, and the
// rising edges of the difference-frequency square wave B from the mixer. A 3-bit
// subtractor forms S = count(B) - count(A) modulo 8, read as a two's complement
// number -4..+3 with S3 the sign bit; S = S1 + 2*S2 - 4*S3. One pulse more on one
// input moves S by one step of 2*pi, so the detector is linear over about +/-4*pi
// of phase error and then wraps, which is what lets it pull in from larger
// frequency errors than a +/-2*pi phase/frequency detector.
//
// Interface and timing. Everything runs on clk (the DS-2 clock in the top level).
// a_pulse is a one-cycle strobe in the clk domain. b_in is asynchronous; it passes
// two synchroniser flip-flops and an edge detector, so a B edge reaches the
// counter 3 clk cycles later. The state s is registered.
//
// From the document: two 3-bit up-counters, a subtractor, the 8-state table
// S = S1 + 2*S2 - 4*S3. This design's own choices: the counters are clocked
// synchronously from clk with enables (the board counted the pulses directly),
// and the order of subtraction, count(B) - count(A), chosen so that a recovered
// clock that runs slow (B too fast) raises the PD voltage and speeds up the VCXO.
module dpll_phase_detector (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_pulse,   // stuff pulse strobe
  input  logic       b_in,      // difference-frequency signal from the mixer
  output logic [2:0] s,         // {S3, S2, S1}
  output logic [2:0] cnt_a,
  output logic [2:0] cnt_b,
  output logic       b_tick     // B edge seen by the counter
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [2:0] b_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_sync <= '0;
    else        b_sync <= {b_sync[1:0], b_in};
  end
  assign b_tick = b_sync[1] && !b_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_a <= '0;
      cnt_b <= '0;
    end else begin
      if (a_pulse) cnt_a <= cnt_a + 3'd1;
      if (b_tick)  cnt_b <= cnt_b + 3'd1;
    end
  end

  assign s = cnt_b - cnt_a;

endmodule
