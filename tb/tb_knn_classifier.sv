// tb_knn_classifier -- self-checking test of the k-NN stage.
//
// For random test samples, streams a random number of random candidates
// with random class labels (few classes, so that votes tie often, and
// repeated candidates, so that distances tie) and compares the decision with
// a reference in the testbench: sort the candidates by squared Euclidean
// distance (stable), take the K nearest, count the votes, break a tie in
// favour of the class of the nearer candidate. Also checks the no-candidate
// case and the candidate count.
`timescale 1ns/1ps
module tb_knn_classifier;
  localparam int D = 4, XW = 8, K = 5, CLS_W = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, c_valid = 0, finish = 0;
  logic [D-1:0][XW-1:0] t_x = '0, c_x = '0;
  logic [CLS_W-1:0] c_class = '0;
  logic out_valid, out_none;
  logic [CLS_W-1:0] out_class;
  logic [15:0] n_cand;

  knn_classifier #(.D(D), .XW(XW), .K(K), .CLS_W(CLS_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int n = (t % 25 == 0) ? 0 : int'($urandom_range(1, 30));
      automatic longint dl [$];
      automatic int cl [$];
      automatic int tx [D];
      automatic int exp_cls = 0;
      for (int d = 0; d < D; d++) begin tx[d] = int'($urandom_range(255)); t_x[d] = XW'(tx[d]); end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int i = 0; i < n; i++) begin
        automatic longint dd = 0;
        if (i > 0 && $urandom_range(3) == 0) ; // repeat the previous candidate
        else begin
          for (int d = 0; d < D; d++) c_x[d] = XW'($urandom_range(255));
          c_class = CLS_W'($urandom_range(3));
        end
        for (int d = 0; d < D; d++) dd += (int'(c_x[d]) - tx[d]) * (int'(c_x[d]) - tx[d]);
        // stable insertion into the reference list
        begin
          automatic int p = 0;
          while (p < dl.size() && dl[p] <= dd) p++;
          dl.insert(p, dd);
          cl.insert(p, int'(c_class));
        end
        c_valid = 1;
        @(negedge clk);
      end
      c_valid = 0;
      finish = 1;
      @(negedge clk);
      finish = 0;
      // reference vote
      begin
        automatic int m = (dl.size() < K) ? dl.size() : K;
        automatic int best = 0;
        for (int i = 0; i < m; i++) begin
          automatic int v = 0;
          for (int q = 0; q < m; q++) if (cl[q] == cl[i]) v++;
          if (v > best) begin best = v; exp_cls = cl[i]; end
        end
      end
      check(out_valid, "result one clock after finish");
      check(out_none == (n == 0), "no-candidate flag");
      if (n > 0) check(int'(out_class) == exp_cls, $sformatf("class of test %0d", t));
      check(int'(n_cand) == n, "candidate count");
      @(negedge clk);
      check(!out_valid, "out_valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
