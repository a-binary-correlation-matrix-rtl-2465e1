// tb_weight_memory -- self-checking test of the weights memory.
//
// Writes random rows to random addresses of a reduced-size memory, keeps a
// copy, and reads them back, checking the one-cycle read latency, that a
// write cycle leaves rdata unchanged and that untouched rows keep their
// contents.
`timescale 1ns/1ps
module tb_weight_memory;
  localparam int AW = 8, DW = 128;

  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] addr = '0;
  logic we = 0;
  logic [DW-1:0] wdata = '0, rdata;

  weight_memory #(.AW(AW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DW-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      addr = AW'(a); we = 1; wdata = rnd(); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    // read back in random order, one cycle latency
    for (int k = 0; k < 300; k++) begin
      automatic int a = int'($urandom_range(2**AW - 1));
      @(negedge clk);
      addr = AW'(a); we = 0;
      @(negedge clk);
      check(rdata == model[a], $sformatf("read row %0d", a));
      // a write cycle does not disturb rdata
      if (k % 3 == 0) begin
        automatic logic [DW-1:0] hold = rdata;
        automatic int b = int'($urandom_range(2**AW - 1));
        addr = AW'(b); we = 1; wdata = rnd(); model[b] = wdata;
        @(negedge clk);
        we = 0;
        check(rdata == hold, "rdata held during a write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
