// tb_elastic_store: the desynchronizer's elastic store, 16 deep.
//  - Gapped writes (a pulse every 4 write clocks at 6.312 MHz, with one extra gap
//    cycle in 49 and a missing pulse now and then, like the M12 gapped clock) and
//    a smooth read clock at the same average rate: the read data must be the
//    written sequence, in order, with no overflow and no underflow.
//  - Reading starts only once the store is half full.
//  - Writes stopped: the store runs empty and flags underflow.
//  - Reads stopped (read clock halted) while writes go on: it flags overflow.
module tb_elastic_store;
  timeunit 1ns;
  timeprecision 1ps;

  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic wen = 1'b0, overflow, rvalid, underflow;
  logic [7:0] wdata = '0, rdata;
  logic [4:0] rd_fill;

  elastic_store #(.DEPTH(16), .WIDTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %t: %s", $realtime, what);
    end
  endtask

  initial begin
    #20_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write side: 6.312 MHz; rate of accepted writes = 12/49 x 6.312 MHz x 0.999.
  bit  write_on = 1, read_on = 1;
  int  wcyc = 0, n_wr = 0, n_of = 0, n_uf = 0;
  always #(0.5e9 / 6.312e6) wclk = !wclk;
  always @(posedge wclk) begin
    if (wrst_n) begin
      wcyc++;
      if (overflow) n_of++;
      wen <= write_on && (wcyc % 49 != 0) && ((wcyc % 49) % 4 == 1) && ($urandom_range(0, 999) != 0);
      if (wen) begin
        wdata <= wdata + 8'd1;
        n_wr++;
      end
    end
  end

  // Read side: smooth clock at the average write rate.
  real rper = 1.0e9 / (6.312e6 * 12.0 / 49.0 * 0.999);
  always begin
    #(rper / 2.0);
    if (read_on) rclk = !rclk;
  end

  logic [7:0] expect_d = '0;
  int  n_rd = 0, first_rd_fill = -1;
  always @(negedge rclk) begin
    if (underflow) n_uf++;
    if (rvalid) begin
      check(rdata == expect_d, "data in order");
      expect_d = rdata + 8'd1;
      n_rd++;
    end
  end
  // First read must wait for half fill.
  always @(posedge rclk) if (rrst_n && first_rd_fill < 0 && dut.running) first_rd_fill = int'(rd_fill);

  initial begin
    #500 wrst_n = 1'b1; rrst_n = 1'b1;
    #5_000_000;
    $display("reads=%0d writes=%0d overflow=%0d underflow=%0d first fill=%0d", n_rd, n_wr, n_of, n_uf, first_rd_fill);
    check(n_rd > 1000, "data flowing");
    check(n_of == 0 && n_uf == 0, "no slips at matched rates");
    check(first_rd_fill >= 8, "reading starts at half fill");
    // Stop writing: underflow.
    write_on = 0;
    #20_000;
    check(n_uf > 0, "underflow flagged when writes stop");
    // Stop reading, restart writes: overflow.
    read_on = 0;
    write_on = 1;
    #40_000;
    check(n_of > 0, "overflow flagged when reads stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
