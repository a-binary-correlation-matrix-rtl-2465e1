// tb_satsum -- self-checking test of one SATSUM device.
//
// Random 32-bit weight row slices are accumulated; after each row the
// testbench compares every counter, through the thresholded result and
// ge_count at random levels, with its own count of the ones seen in each bit
// position. It checks the counter clear, that rows are ignored without
// acc_en, the training write-back row | mask and the all-zero write-back of
// the clear operation. A second instance with 3-bit counters checks that
// counters saturate instead of wrapping.
`timescale 1ns/1ps
module tb_satsum;
  import presence_pkg::*;

  localparam int W = LANE_W;
  localparam int GW = $clog2(W + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  satsum_cmd_t cmd;
  logic [W-1:0] rdata, mask, wdata, result;
  logic [GW-1:0] ge_count;
  logic [W-1:0] wdata_s, result_s;
  logic [GW-1:0] ge_s;

  satsum dut (.clk, .rst_n, .cmd, .rdata, .mask, .wdata, .result, .ge_count);
  satsum #(.CW(3)) dut_sat (.clk, .rst_n, .cmd, .rdata, .mask,
                           .wdata(wdata_s), .result(result_s), .ge_count(ge_s));

  int checks = 0, failures = 0;
  int cnt [W];
  int cnt_sat [W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_level(input int lv);
    logic [W-1:0] e;
    int n = 0;
    cmd.thr = CNT_W'(lv);
    #1;
    for (int i = 0; i < W; i++) begin
      e[i] = (cnt[i] >= lv);
      n += int'(e[i]);
    end
    check(result == e, $sformatf("result at level %0d", lv));
    check(int'(ge_count) == n, $sformatf("ge_count at level %0d", lv));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = '0; rdata = '0; mask = '0;
    for (int i = 0; i < W; i++) begin cnt[i] = 0; cnt_sat[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_level(1);   // everything zero after reset

    // accumulate random rows
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      rdata = $urandom;
      cmd.acc_en = ($urandom_range(3) != 0);
      @(posedge clk);
      if (cmd.acc_en)
        for (int i = 0; i < W; i++) begin
          cnt[i] += int'(rdata[i]);
          if (rdata[i] && cnt_sat[i] < 7) cnt_sat[i]++;
        end
      @(negedge clk);
      cmd.acc_en = 0;
      check_level($urandom_range(1, 40));
    end
    for (int lv = 0; lv <= 61; lv += 3) check_level(lv);

    // saturating 3-bit counters
    cmd.thr = CNT_W'(7);
    #1;
    begin
      logic [W-1:0] e;
      for (int i = 0; i < W; i++) e[i] = (cnt_sat[i] >= 7);
      check(result_s == e, "3-bit counters saturate at 7");
      check(result_s != '0, "some 3-bit counter reached saturation");
    end

    // training write-back and clear write-back
    for (int k = 0; k < 20; k++) begin
      rdata = $urandom; mask = $urandom;
      cmd.wr_zero = 0;
      #1 check(wdata == (rdata | mask), "write-back is row OR mask");
      cmd.wr_zero = 1;
      #1 check(wdata == '0, "clear write-back is zero");
    end
    cmd.wr_zero = 0;

    // counter clear
    @(negedge clk);
    cmd.acc_clr = 1;
    @(negedge clk);
    cmd.acc_clr = 0;
    for (int i = 0; i < W; i++) cnt[i] = 0;
    check_level(1);
    check_level(0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
