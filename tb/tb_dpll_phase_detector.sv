// tb_dpll_phase_detector: self-checking test of the counter-and-subtractor phase
// detector. Random stuff pulses A and random edges on the asynchronous input B are
// applied; a model counts both and expects S = (count(B) - count(A)) mod 8, with
// the B edge taking effect 3 clocks after it is applied. The test also checks the
// S1/S2/S3 weighting of the state table (S = S1 + 2*S2 - 4*S3 spans -4..+3) and
// that one extra pulse on either input moves S by one step.
module tb_dpll_phase_detector;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, a_pulse = 1'b0, b_in = 1'b0;
  logic [2:0] s, cnt_a, cnt_b;
  logic b_tick;

  dpll_phase_detector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %t: %s", $realtime, what);
    end
  endtask

  always #79 clk = !clk;

  initial begin
    #10_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int na = 0, nb = 0;
  int b_pipe [3] = '{0, 0, 0};
  int signed s_val;
  bit [7:0] states_seen = '0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // Drive: A strobes now, B toggles (held at least 2 clocks per level).
      a_pulse = ($urandom_range(0, 9) == 0);
      if ($urandom_range(0, 4) == 0 && b_pipe[0] == b_pipe[1]) b_in = !b_in;
      @(posedge clk);
      #1;
      if (a_pulse) na++;
      // Model of the 2-stage synchroniser and edge detector.
      if (b_pipe[1] == 1 && b_pipe[2] == 0) nb++;
      b_pipe[2] = b_pipe[1];
      b_pipe[1] = b_pipe[0];
      b_pipe[0] = b_in;
      check(s == 3'(nb - na), "S equals count(B) - count(A) mod 8");
      s_val = int'(s[0]) + 2 * int'(s[1]) - 4 * int'(s[2]);
      check(s_val == ((nb - na) % 8 + 8 + 4) % 8 - 4, "S table weighting");
      states_seen[s] = 1'b1;
    end
    check(states_seen == 8'hFF, "all eight states reached");
    $display("A=%0d B=%0d", na, nb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
