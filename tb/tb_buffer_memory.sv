// tb_buffer_memory -- self-checking test of the double buffer memory.
//
// With the card idle the host writes random data into the control, input
// and output blocks of both areas and reads them back. The card then takes
// one area: the testbench checks that the card port reads what the host
// wrote there and writes its output block, that in the same cycles the host
// still reads and writes the other area, and that a host access to the
// card's area is refused (write dropped, read zero, host_conflict high).
`timescale 1ns/1ps
module tb_buffer_memory;
  import presence_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic h_en = 0, h_we = 0, h_area = 0;
  region_e h_region = REG_CTRL;
  logic [OFF_AW-1:0] h_off = '0;
  logic [WORD_W-1:0] h_wdata = '0, h_rdata;
  logic host_conflict;
  logic card_active = 0, card_area = 0;
  logic c_en = 0, c_we = 0;
  region_e c_region = REG_CTRL;
  logic [OFF_AW-1:0] c_off = '0;
  logic [WORD_W-1:0] c_wdata = '0, c_rdata;

  buffer_memory dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [2][3][int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int depth(input int rg);
    return rg == 0 ? 2**CTRL_AW : rg == 1 ? 2**IN_AW : 2**OUT_AW;
  endfunction

  task automatic host_wr(input bit a, input int rg, input int off, input logic [31:0] d);
    @(negedge clk);
    h_en = 1; h_we = 1; h_area = a; h_region = region_e'(rg); h_off = OFF_AW'(off); h_wdata = d;
    @(negedge clk);
    h_en = 0; h_we = 0;
  endtask

  task automatic host_rd(input bit a, input int rg, input int off, output logic [31:0] d,
                         output bit conflict);
    @(negedge clk);
    h_en = 1; h_we = 0; h_area = a; h_region = region_e'(rg); h_off = OFF_AW'(off);
    #1 conflict = host_conflict;
    @(negedge clk);
    h_en = 0;
    d = h_rdata;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bit cf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host fills both areas
    for (int k = 0; k < 200; k++) begin
      automatic bit a = 1'($urandom);
      automatic int rg = int'($urandom_range(2));
      automatic int off = int'($urandom_range(depth(rg) - 1));
      automatic logic [31:0] v = $urandom;
      host_wr(a, rg, off, v);
      model[a][rg][off] = v;
    end
    for (int a = 0; a < 2; a++)
      for (int rg = 0; rg < 3; rg++) begin
        automatic logic [31:0] m [int] = model[a][rg];
        foreach (m[off]) begin
          host_rd(1'(a), rg, off, d, cf);
          check(d == m[off], "host read back while card idle");
          check(!cf, "no conflict while card idle");
        end
      end

    // card takes area 1
    @(negedge clk);
    card_active = 1; card_area = 1;
    for (int rg = 0; rg < 3; rg++) begin
     automatic logic [31:0] m [int] = model[1][rg];
     foreach (m[off]) begin
      // card reads, host concurrently writes area 0 control block
      @(negedge clk);
      c_en = 1; c_we = 0; c_region = region_e'(rg); c_off = OFF_AW'(off);
      h_en = 1; h_we = 1; h_area = 0; h_region = REG_CTRL; h_off = OFF_AW'(off % 16);
      h_wdata = off ^ 32'h5a5a;
      model[0][0][off % 16] = off ^ 32'h5a5a;
      @(negedge clk);
      c_en = 0; h_en = 0; h_we = 0;
      check(c_rdata == m[off], "card port reads its area");
     end
    end
    // card writes its output block
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      c_en = 1; c_we = 1; c_region = REG_OUT; c_off = OFF_AW'(k); c_wdata = 32'hc000 + k;
      model[1][2][k] = 32'hc000 + k;
      @(negedge clk);
      c_en = 0; c_we = 0;
    end
    // host is refused on area 1
    host_wr(1, 2, 3, 32'hdead);
    host_rd(1, 2, 3, d, cf);
    check(d == 0, "read of card's area returns zero");
    check(cf, "host_conflict on card's area");
    // host still owns area 0
    host_rd(0, 0, 5, d, cf);
    check(d == model[0][0][5] && !cf, "host reads other area while card busy");
    // card releases; host sees the card's results and no dropped write
    @(negedge clk);
    card_active = 0;
    for (int k = 0; k < 16; k++) begin
      host_rd(1, 2, k, d, cf);
      check(d == model[1][2][k], "host reads card output after release");
    end
    for (int rg = 0; rg < 3; rg++) begin
      automatic logic [31:0] m [int] = model[0][rg];
      foreach (m[off]) begin
        host_rd(0, rg, off, d, cf);
        check(d == m[off], "area 0 content after concurrent writes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
