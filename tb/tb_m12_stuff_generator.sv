// tb_m12_stuff_generator: self-checking test of the stuff-pulse and gapped-clock
// generator, for tributaries 1 and 3 at once.
//
// An independent model follows the DS-2 bit count since reset: bit k of the frame
// is overhead when k mod 49 == 0; a data bit at k mod 49 = j (1..48) belongs to
// tributary ((j-1) mod 4) + 1; the stuff opportunity of tributary n is its first
// data bit in block 6*(n-1)+5. The test checks every cycle that fn_en and
// stuff_opp match the model, that stuff pulses fall only on opportunities, that f1
// is fn without them, and over 400 frames that 288 fn pulses come per frame and
// that the stuff ratio and the f1 rate match the DS-1 reference.
module tb_m12_stuff_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real F_DS2 = 6.312e6;
  localparam real F_DS1 = 1.544e6;
  localparam int  FRAMES = 400;

  logic ds2_clk = 1'b0, ds1_ref = 1'b0, rst_n = 1'b0;
  logic fs1, oh1, fn1, so1, sp1, f11, fl1, fs3, oh3, fn3, so3, sp3, f13, fl3;
  logic signed [5:0] ph1, ph3;

  m12_stuff_generator #(.CHANNEL(1)) dut1 (
    .ds2_clk, .rst_n, .ds1_ref, .frame_start(fs1), .overhead(oh1), .fn_en(fn1),
    .stuff_opp(so1), .stuff_pulse(sp1), .f1_en(f11), .stuff_flag(fl1), .phase(ph1));
  m12_stuff_generator #(.CHANNEL(3)) dut3 (
    .ds2_clk, .rst_n, .ds1_ref, .frame_start(fs3), .overhead(oh3), .fn_en(fn3),
    .stuff_opp(so3), .stuff_pulse(sp3), .f1_en(f13), .stuff_flag(fl3), .phase(ph3));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %t: %s", $realtime, what);
    end
  endtask

  real t2 = 0.0, t1 = 0.0;
  always begin t2 = t2 + 0.5e9 / F_DS2; #(t2 - $realtime) ds2_clk = !ds2_clk; end
  always begin t1 = t1 + 0.5e9 / F_DS1; #(t1 - $realtime) ds1_ref = !ds1_ref; end

  initial begin
    #(20000.0 * 1176.0 * 1.0e9 / F_DS2);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  function automatic bit m_fn(int k, int ch);
    int j = k % 49;
    return (j != 0) && (((j - 1) % 4) + 1 == ch);
  endfunction
  function automatic bit m_opp(int k, int ch);
    int j = k % 49, blk = (k % 1176) / 49;
    return m_fn(k, ch) && (blk == 6 * (ch - 1) + 5) && (j <= 4);
  endfunction

  int k = 0;
  int n_fn1 = 0, n_f11 = 0, n_sp1 = 0, n_opp1 = 0, n_f13 = 0, n_sp3 = 0, n_ds1 = 0;
  int frames = 0;
  bit run = 0;

  always @(posedge ds1_ref) if (run) n_ds1++;

  always @(posedge ds2_clk) if (rst_n) begin
    check(fn1 == m_fn(k, 1) && fn3 == m_fn(k, 3), "fn_en position");
    check(so1 == m_opp(k, 1) && so3 == m_opp(k, 3), "stuff opportunity position");
    check(oh1 == (k % 49 == 0) && fs1 == (k % 1176 == 0), "overhead and frame start");
    check(!sp1 || so1, "stuff pulse only at an opportunity (1)");
    check(!sp3 || so3, "stuff pulse only at an opportunity (3)");
    check(f11 == (fn1 && !sp1) && f13 == (fn3 && !sp3), "f1 is fn without stuff pulses");
    if (run) begin
      if (fn1) n_fn1++;
      if (f11) n_f11++;
      if (sp1) n_sp1++;
      if (so1) n_opp1++;
      if (f13) n_f13++;
      if (sp3) n_sp3++;
    end
    k++;
    if (k % 1176 == 0) frames++;
    if (frames == 10) run = 1;
    if (frames == 10 + FRAMES && run) begin
      real rho1, rho_exp;
      run = 0;
      rho1    = real'(n_sp1) / real'(n_opp1);
      rho_exp = ((12.0 / 49.0) * F_DS2 - F_DS1) / (F_DS2 / 1176.0);
      $display("fn=%0d f1=%0d stuffs=%0d opps=%0d rho=%f (expected %f) ds1=%0d f1(ch3)=%0d",
               n_fn1, n_f11, n_sp1, n_opp1, rho1, rho_exp, n_ds1, n_f13);
      check(n_fn1 == 288 * FRAMES, "288 fn pulses per frame");
      check(n_opp1 == FRAMES, "one stuff opportunity per frame");
      check(rho1 > rho_exp - 0.01 && rho1 < rho_exp + 0.01, "stuff ratio");
      check(n_f11 >= n_ds1 - 3 && n_f11 <= n_ds1 + 3, "f1 rate equals DS-1 rate (1)");
      check(n_f13 >= n_ds1 - 3 && n_f13 <= n_ds1 + 3, "f1 rate equals DS-1 rate (3)");
      check(n_sp3 >= n_sp1 - 2 && n_sp3 <= n_sp1 + 2, "both tributaries stuff alike");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    @(negedge ds2_clk);
    @(negedge ds2_clk);
    rst_n = 1'b1;
  end

endmodule
