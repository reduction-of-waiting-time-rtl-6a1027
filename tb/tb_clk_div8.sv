// tb_clk_div8: the divider's output must change on every 4th input edge after
// reset (rising on the 4th, falling on the 8th, and so on), which gives a 50%
// square wave at 1/8 of the input frequency.
module tb_clk_div8;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_in = 1'b0, rst_n = 1'b0, fo;

  clk_div8 dut (.*);

  int checks = 0, failures = 0;
  always #40 clk_in = !clk_in;

  initial begin
    #1_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges = 0;
  initial begin
    @(negedge clk_in);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk_in);
      edges++;
      #1;
      checks++;
      if (fo != ((edges / 4) % 2 == 1)) begin
        failures++;
        $display("FAIL: after %0d edges fo=%b", edges, fo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
