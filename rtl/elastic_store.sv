// elastic_store: the desynchronizer's elastic store. Data bits are written with
// the fully gapped clock (a write enable in the write-clock domain) and read out
// with the smooth recovered clock, one bit per read-clock cycle.
//
// How it works. A dual-clock FIFO of DEPTH entries with Gray-coded pointers; each
// pointer is passed to the other clock domain through two flip-flops. After reset
// the read side waits until the store is half full and then reads every cycle,
// so the store starts centred and absorbs the gaps of the write clock and the
// phase wander of the recovered clock. If the store runs empty (underflow) or
// full (overflow), the read or the write is skipped and a one-cycle flag is
// raised in that domain; after an underflow the read side waits again for half
// fill, which re-centres the store.
//
// Interface and timing. wen/wdata are sampled on wclk. rdata is registered and
// valid in the rclk cycle after rvalid's read; rvalid is high in cycles where a
// bit was read. rd_fill is the fill seen from the read side (up to 3 rclk cycles
// old on the write pointer).
//
// From the document: an elastic store written by the gapped clock and read by the
// recovered clock, of a few bits. This design's own choices: the depth (16), the
// FIFO structure and the start and slip behaviour.
module elastic_store #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned WIDTH  = 1,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic [WIDTH-1:0] rdata,
  output logic             rvalid,
  output logic             underflow,
  output logic [AW:0]      rd_fill
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] rptr_gray_w1, rptr_gray_w2, wptr_gray_r1, wptr_gray_r2;
  logic [AW:0] rptr_bin_w, wptr_bin_r, wr_fill;
  logic        full, empty, running;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write side.
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      rptr_gray_w1 <= '0;
      rptr_gray_w2 <= '0;
    end else begin
      rptr_gray_w1 <= rptr_gray;
      rptr_gray_w2 <= rptr_gray_w1;
    end
  end
  assign rptr_bin_w = gray2bin(rptr_gray_w2);
  assign wr_fill    = wptr_bin - rptr_bin_w;
  assign full       = (wr_fill == (AW+1)'(DEPTH));

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
      overflow  <= 1'b0;
    end else begin
      overflow <= wen && full;
      if (wen && !full) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wen && !full) mem[wptr_bin[AW-1:0]] <= wdata;
  end

  // Read side.
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      wptr_gray_r1 <= '0;
      wptr_gray_r2 <= '0;
    end else begin
      wptr_gray_r1 <= wptr_gray;
      wptr_gray_r2 <= wptr_gray_r1;
    end
  end
  assign wptr_bin_r = gray2bin(wptr_gray_r2);
  assign rd_fill    = wptr_bin_r - rptr_bin;
  assign empty      = (rd_fill == '0);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
      running   <= 1'b0;
      rvalid    <= 1'b0;
      underflow <= 1'b0;
      rdata     <= '0;
    end else begin
      rvalid    <= 1'b0;
      underflow <= 1'b0;
      if (!running) begin
        if (rd_fill >= (AW+1)'(DEPTH / 2)) running <= 1'b1;
      end else if (empty) begin
        underflow <= 1'b1;
        running   <= 1'b0;
      end else begin
        rdata     <= mem[rptr_bin[AW-1:0]];
        rvalid    <= 1'b1;
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

endmodule
