// m12_pkg: constants of the DS-1 to DS-2 (M12) pulse-stuffing frame and of the
// differential-PLL desynchronizer built around it.
//
// The M12 frame is 1176 DS-2 bits: 24 blocks, each one overhead bit (M, C or F)
// followed by 48 data bits that interleave the four DS-1 tributaries bit by bit.
// The 24 blocks form four subframes of six blocks. Subframe n carries the stuff
// opportunity of tributary n, in that tributary's first data slot after the last
// F bit of the subframe. The frame length, the block length, the four tributaries
// and the place of the stuff opportunity follow the document; the order of the
// overhead bits inside a subframe (M C F C C F) is the standard M12 order.
package m12_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned FRAME_BITS     = 1176;  // 24 x (1 + 4 x 12)
  localparam int unsigned BLOCK_BITS     = 49;    // 1 overhead + 48 data
  localparam int unsigned BLOCKS         = 24;
  localparam int unsigned SUBFRAME_BLKS  = 6;
  localparam int unsigned TRIBUTARIES    = 4;
  localparam int unsigned STUFF_BLOCK    = 5;     // block after the last F bit of a subframe

  // Kind of DS-2 bit slot within the frame.
  typedef enum logic [1:0] {
    SLOT_OVERHEAD = 2'd0,
    SLOT_DATA     = 2'd1,
    SLOT_STUFF    = 2'd2   // the stuff opportunity of the selected tributary
  } slot_e;

  // Position inside the frame.
  typedef struct packed {
    logic [4:0] block;   // 0..23
    logic [5:0] bit_no;  // 0..48, 0 is the overhead bit
  } frame_pos_t;

endpackage
