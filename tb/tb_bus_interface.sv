// tb_bus_interface -- self-checking test of the host bus interface.
//
// The buffer memory is replaced by a one-cycle-latency echo (read data =
// a function of the decoded area, region and offset) and SATCON by signals
// the testbench drives. Checked: the address decode of buffer accesses,
// read data and h_rvalid one clock after a read, the start pulse and its
// area, refusal of a start while busy, the interrupt set by done, masked by
// the enable register and cleared by acknowledge, the refusal flags, the
// completed-operation count and the status word.
`timescale 1ns/1ps
module tb_bus_interface;
  import presence_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic h_req = 0, h_we = 0;
  logic [HA_W-1:0] h_addr = '0;
  logic [WORD_W-1:0] h_wdata = '0, h_rdata;
  logic h_rvalid, irq;
  logic b_en, b_we, b_area;
  region_e b_region;
  logic [OFF_AW-1:0] b_off;
  logic [WORD_W-1:0] b_wdata, b_rdata;
  logic b_conflict = 0;
  logic start, start_area;
  logic busy = 0, done = 0, card_area = 0;

  bus_interface dut (.*);

  // buffer memory stand-in
  always_ff @(posedge clk)
    if (b_en && !b_we) b_rdata <= {15'd0, b_area, 2'(b_region), 1'b0, b_off} ^ 32'ha5000000;

  int checks = 0, failures = 0;
  int n_start = 0;
  logic last_start_area;
  always @(posedge clk) if (start) begin n_start++; last_start_area = start_area; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hwrite(input logic [HA_W-1:0] a, input logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk);
    h_req = 0; h_we = 0;
  endtask

  task automatic hread(input logic [HA_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 0; h_addr = a;
    #1 check(!h_rvalid, "no rvalid in the request cycle");
    @(negedge clk);
    h_req = 0;
    check(h_rvalid, "rvalid one clock after a read");
    d = h_rdata;
  endtask

  function automatic logic [HA_W-1:0] raddr(input int r);
    return {1'b1, (HA_W-1)'(r)};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // buffer accesses
    for (int k = 0; k < 50; k++) begin
      automatic bit a = 1'($urandom);
      automatic int rg = int'($urandom_range(2));
      automatic int off = int'($urandom_range(2**OFF_AW - 1));
      automatic logic [HA_W-1:0] ad = {1'b0, a, 2'(rg), OFF_AW'(off)};
      hread(ad, d);
      check(d == ({15'd0, a, 2'(rg), 1'b0, OFF_AW'(off)} ^ 32'ha5000000), "buffer read decode");
      @(negedge clk);
      h_req = 1; h_we = 1; h_addr = ad; h_wdata = $urandom;
      #1 check(b_en && b_we && b_area == a && int'(b_region) == rg && int'(b_off) == off
               && b_wdata == h_wdata, "buffer write decode");
      @(negedge clk);
      h_req = 0; h_we = 0;
    end
    // status after reset
    hread(raddr(R_STATUS), d);
    check(d == 32'd0, "status zero after reset");
    hread(raddr(R_IRQEN), d);
    check(d == 32'd1, "interrupt enabled after reset");
    // start on area 1
    hwrite(raddr(R_CMD), 32'h3);
    check(n_start == 1 && last_start_area == 1'b1, "start pulse with area 1");
    busy = 1; card_area = 1;
    // start while busy is refused
    hwrite(raddr(R_CMD), 32'h1);
    check(n_start == 1, "no start while busy");
    b_conflict = 1;
    @(negedge clk) b_conflict = 0;
    hread(raddr(R_STATUS), d);
    check(d[0] && d[2] && d[3] && d[4] && !d[1], "status busy, area, both refusals");
    // completion
    @(negedge clk) begin busy = 0; done = 1; end
    @(negedge clk) done = 0;
    check(irq, "interrupt after done");
    hread(raddr(R_STATUS), d);
    check(d[1] && !d[0] && d[31:16] == 16'd1, "status pending, count 1");
    // mask and unmask
    hwrite(raddr(R_IRQEN), 32'h0);
    check(!irq, "interrupt masked");
    hwrite(raddr(R_IRQEN), 32'h1);
    check(irq, "interrupt unmasked");
    hwrite(raddr(R_IRQACK), 32'h1);
    check(!irq, "interrupt acknowledged");
    hwrite(raddr(R_IRQACK), 32'h2);
    hread(raddr(R_STATUS), d);
    check(d[3] == 1'b0 && d[4] == 1'b0, "refusal flags zero");
    // second operation on area 0
    card_area = 0;
    hwrite(raddr(R_CMD), 32'h1);
    check(n_start == 2 && last_start_area == 1'b0, "start pulse with area 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
