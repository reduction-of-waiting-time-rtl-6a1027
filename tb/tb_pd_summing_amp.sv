// tb_pd_summing_amp: checks the PD output voltage for all eight detector states
// against the state table: S3 S2 S1 = 100 gives 2.0 V, rising in 0.5 V steps to
// 011 giving 5.5 V, with 000 at 4.0 V. The model's output is combinational, so
// each value is checked 1 ns after the state is applied.
module tb_pd_summing_amp;
  timeunit 1ns;
  timeprecision 1ps;

  logic [2:0] s;
  real ud;

  pd_summing_amp dut (.*);

  int checks = 0, failures = 0;
  real expected [8] = '{4.0, 4.5, 5.0, 5.5, 2.0, 2.5, 3.0, 3.5};  // indexed by {S3,S2,S1}

  initial begin
    #1000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      s = 3'(i);
      #1;
      checks++;
      if (ud < expected[i] - 1.0e-9 || ud > expected[i] + 1.0e-9) begin
        failures++;
        $display("FAIL: state %b gives %f V, expected %f V", s, ud, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
