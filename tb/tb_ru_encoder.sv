// tb_ru_encoder -- self-checking test of the RU encoder.
//
// Loads ascending random bin boundaries, encodes random samples (including
// values equal to a boundary and values at the ends of the range) and
// compares every emitted index value with d*NB*CB + bin*CB + j, where the
// testbench finds the bin by a linear search of the boundaries. Random
// back-pressure on m_ready checks that no index value is lost or repeated,
// and the output rate of one index value per clock is checked when m_ready
// stays high. Runs with CB = 2 to cover multi-bit codes.
`timescale 1ns/1ps
module tb_ru_encoder;
  localparam int D = 6, NB = 8, CB = 2, XW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0;
  logic [$clog2(D)-1:0] cfg_dim = '0;
  logic [$clog2(NB)-1:0] cfg_bin = '0;
  logic [XW-1:0] cfg_data = '0;
  logic s_valid = 0, s_ready;
  logic [D-1:0][XW-1:0] s_x = '0;
  logic m_valid, m_ready = 1, m_last;
  logic [31:0] m_index;

  ru_encoder #(.D(D), .NB(NB), .CB(CB), .XW(XW)) dut (.*);

  int checks = 0, failures = 0;
  int bnd [D][NB-1];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_bin(input int d, input int x);
    int b = 0;
    for (int i = 0; i < NB - 1; i++) if (x > bnd[d][i]) b++;
    return b;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < D; d++) begin
      automatic int v = 0;
      for (int b = 0; b < NB - 1; b++) begin
        v += int'($urandom_range(1, 8000));
        bnd[d][b] = v;
        @(negedge clk);
        cfg_we = 1; cfg_dim = d[$clog2(D)-1:0]; cfg_bin = b[$clog2(NB)-1:0]; cfg_data = XW'(v);
      end
    end
    @(negedge clk) cfg_we = 0;

    for (int t = 0; t < 200; t++) begin
      automatic int xs [D];
      automatic int n = 0;
      automatic longint t0;
      automatic bit stall = (t % 2 == 1);
      for (int d = 0; d < D; d++) begin
        case ($urandom_range(3))
          0: xs[d] = bnd[d][$urandom_range(NB - 2)];      // on a boundary
          1: xs[d] = (t % 3 == 0) ? 0 : 65535;            // range ends
          default: xs[d] = int'($urandom_range(0, 65535));
        endcase
        s_x[d] = XW'(xs[d]);
      end
      @(negedge clk);
      check(s_ready, "ready for a new sample");
      s_valid = 1;
      @(negedge clk);
      s_valid = 0;
      t0 = $time;
      while (n < D * CB) begin
        m_ready = stall ? 1'($urandom) : 1'b1;
        #1;
        if (m_valid && m_ready) begin
          automatic int d = n / CB, j = n % CB;
          check(m_index == 32'(d * NB * CB + ref_bin(d, xs[d]) * CB + j),
                $sformatf("index value %0d of sample %0d", n, t));
          check(m_last == (n == D * CB - 1), "m_last on the final index value");
          n++;
        end
        @(negedge clk);
      end
      if (!stall) check(($time - t0) == D * CB * 10, "one index value per clock");
      m_ready = 1;
      check(!m_valid, "no extra index values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
