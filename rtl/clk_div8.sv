// clk_div8: the divide-by-8 that follows the crystal multivibrator of the VCXO,
// turning its 12.352 MHz (8 x DS-1) output into the recovered DS-1 clock fo.
//
// A 3-bit counter advances on every rising edge of clk_in; fo is its most
// significant bit, so fo is a square wave at clk_in/8 with 50% duty cycle and
// changes right after the 4th and
// 8th edge of each cycle. The divide ratio is the document's; the counter
// form and the asynchronous reset are this design's.
module clk_div8 (
  input  logic clk_in,
  input  logic rst_n,
  output logic fo
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [2:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 3'd1;
  end

  assign fo = cnt[2];

endmodule
