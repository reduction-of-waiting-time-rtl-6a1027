// m12_stuff_generator: source of the stuff pulses and of the gapped clock of one
// DS-1 tributary of an M12 (DS-1 to DS-2) pulse-stuffing multiplex.
//
// How it works. A frame counter follows the 1176-bit M12 frame on the DS-2 clock.
// The DS-2 clock is inhibited during the 24 overhead bits and then divided by 4;
// the selected phase of the divider gives the overhead-free clock fn of tributary
// CHANNEL (about 1.5458 MHz). The stuff detector compares the gapped clock f1
// with the DS-1 reference clock: an up/down counter adds one for every f1 pulse
// and subtracts one for every DS-1 reference edge. When that phase difference
// reaches STUFF_THRESHOLD bits the stuff flag is set. At the tributary's next stuff
// opportunity (its first data slot after the last F bit of subframe CHANNEL) the
// fn pulse is turned into a stuff pulse, the flag clears, and the pulse is removed
// from f1. f1 therefore has the average rate of the DS-1 reference.
//
// Interface. All outputs are one-DS-2-cycle strobes in the ds2_clk domain.
// ds1_ref is an asynchronous clock; it is resynchronised with two flip-flops, so
// a reference edge is seen 2 to 3 DS-2 cycles late, which is a constant offset.
// The phase output is the stuff detector's counter (two's complement, bits).
//
// From the document: frame length and structure, overhead inhibit and divide by
// 4, flag set on a phase threshold and stuff at the next opportunity, f1 = fn with
// the stuff pulses removed. This design's own choices: the phase comparator is a
// bit counter rather than a phase/frequency detector with a flip-flop, the
// threshold value, and the synchroniser on the reference clock. The check that
// stuffs only happen at opportunities is disabled while rst_n is low, so rst_n is
// also read synchronously there; linters report that as a reset used both ways.
module m12_stuff_generator
  import m12_pkg::*;
#(
  parameter int unsigned CHANNEL         = 1,  // tributary 1..4
  parameter int          STUFF_THRESHOLD = 1,  // phase (bits) that sets the stuff flag
  parameter int unsigned PHASE_W         = 6
) (
  input  logic                      ds2_clk,
  input  logic                      rst_n,
  input  logic                      ds1_ref,      // DS-1 reference clock (asynchronous)
  output logic                      frame_start,  // first bit of a frame
  output logic                      overhead,     // current bit is an M, C or F bit
  output logic                      fn_en,        // overhead-free clock of the tributary
  output logic                      stuff_opp,    // stuff opportunity of the tributary
  output logic                      stuff_pulse,  // stuff bit inserted (pulse A)
  output logic                      f1_en,        // fully gapped clock
  output logic                      stuff_flag,
  output logic signed [PHASE_W-1:0] phase
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam logic [4:0] STUFF_BLK = 5'((CHANNEL - 1) * SUBFRAME_BLKS + STUFF_BLOCK);

  frame_pos_t pos;
  logic [1:0] div4;          // divide-by-4 of the overhead-inhibited DS-2 clock
  logic [2:0] ds1_sync;      // two synchroniser stages and an edge register
  logic       ds1_tick;
  logic       first_in_blk;  // fn pulse is the first of its block

  // Frame counter.
  always_ff @(posedge ds2_clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0;
    end else if (pos.bit_no == 6'(BLOCK_BITS - 1)) begin
      pos.bit_no <= '0;
      pos.block  <= (pos.block == 5'(BLOCKS - 1)) ? 5'd0 : pos.block + 5'd1;
    end else begin
      pos.bit_no <= pos.bit_no + 6'd1;
    end
  end

  assign overhead    = (pos.bit_no == 6'd0);
  assign frame_start = overhead && (pos.block == 5'd0);

  // Overhead inhibit, then divide by 4. The divider restarts with each block
  // (48 data bits are a whole number of divider cycles, so this only fixes the
  // phase after reset).
  always_ff @(posedge ds2_clk or negedge rst_n) begin
    if (!rst_n)        div4 <= '0;
    else if (overhead) div4 <= '0;
    else               div4 <= div4 + 2'd1;
  end

  assign fn_en        = !overhead && (div4 == 2'(CHANNEL - 1));
  assign first_in_blk = (pos.bit_no <= 6'd4);
  assign stuff_opp    = fn_en && first_in_blk && (pos.block == STUFF_BLK);

  // DS-1 reference edge detection.
  always_ff @(posedge ds2_clk or negedge rst_n) begin
    if (!rst_n) ds1_sync <= '0;
    else        ds1_sync <= {ds1_sync[1:0], ds1_ref};
  end
  assign ds1_tick = ds1_sync[1] && !ds1_sync[2];

  // Stuff detector.
  assign stuff_pulse = stuff_opp && stuff_flag;
  assign f1_en       = fn_en && !stuff_pulse;

  always_ff @(posedge ds2_clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      stuff_flag <= 1'b0;
    end else begin
      phase <= phase + PHASE_W'(f1_en) - PHASE_W'(ds1_tick);
      if (stuff_pulse)
        stuff_flag <= 1'b0;
      else if (phase >= PHASE_W'(STUFF_THRESHOLD))
        stuff_flag <= 1'b1;
    end
  end

  // A stuff pulse only replaces a data bit of the tributary at its opportunity.
  a_stuff_at_opp : assert property (@(posedge ds2_clk) disable iff (!rst_n)
                                    stuff_pulse |-> (stuff_opp && fn_en && !overhead));

  initial begin
    assert (CHANNEL >= 1 && CHANNEL <= TRIBUTARIES)
      else $error("CHANNEL must be 1..%0d", TRIBUTARIES);
  end

endmodule
