// tb_cmm_classifier_top -- end-to-end classification with the CMM k-NN
// classifier at its default size (16 features, 16 bins, 128-bit card rows,
// 2^20-row weights memory, K = 5).
//
// The testbench plays the host. It generates a three-class data set
// (random class centres plus noise), computes equal-population bin
// boundaries per feature from the training samples (a simple form of the
// robust quantisation done offline on the host) and loads them into the
// encoder. It clears the CMM band in use, then trains every training sample:
// the encoder's index values go into one buffer area with a unique two-bit
// separator (bit i in slice 0 and bit 128+i in slice 1, so every operation
// spans two slices), and the next sample is written into the other area
// while the card works. Each test sample is encoded and recalled with a
// fixed threshold of THR matching features; if fewer than K training
// samples match, it is recalled again with L-max thresholding (L = K). The
// training samples whose two separator bits are both set are streamed into
// the k-NN stage, whose decision is compared with a reference computed in
// the testbench from the samples alone (bins, match counts, distances,
// vote). The start refusal, the busy-area refusal and the interrupt are also
// exercised, and every mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_cmm_classifier_top;
  import presence_pkg::*;

  localparam int D = 16, NB = 16, XW = 16, K = 5, CLS_W = 5;
  localparam int ROW_W  = 128;
  localparam int STRIDE = D * NB;        // input vector length
  localparam int KS     = 2;             // separator slices
  localparam int NTRAIN = 96, NTEST = 16, NCLS = 3;
  localparam int BASE   = 4096;
  localparam int THR    = 4;             // fixed threshold: matching features

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic enc_cfg_we = 0;
  logic [$clog2(D)-1:0] enc_cfg_dim = '0;
  logic [$clog2(NB)-1:0] enc_cfg_bin = '0;
  logic [XW-1:0] enc_cfg_data = '0;
  logic enc_s_valid = 0, enc_s_ready;
  logic [D-1:0][XW-1:0] enc_s_x = '0;
  logic enc_m_valid, enc_m_ready = 1, enc_m_last;
  logic [31:0] enc_m_index;
  logic h_req = 0, h_we = 0;
  logic [HA_W-1:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic h_rvalid, irq;
  logic knn_start = 0, knn_c_valid = 0, knn_finish = 0;
  logic [D-1:0][XW-1:0] knn_t_x = '0, knn_c_x = '0;
  logic [CLS_W-1:0] knn_c_class = '0, knn_out_class;
  logic knn_out_valid, knn_out_none;
  logic [15:0] knn_n_cand;

  cmm_classifier_top dut (.*);

  int checks = 0, failures = 0;
  int n_clear = 0, n_train = 0, n_fixed = 0, n_lmax = 0, n_multislice = 0, n_overlap = 0;
  int n_conflict = 0, n_start_refused = 0, n_irq = 0, n_encoded = 0, n_vote = 0, n_correct = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- data set ----------------------------------------------------------
  int trx [NTRAIN][D];
  int trc [NTRAIN];
  int tex [NTEST][D];
  int tec [NTEST];
  int bnd [D][NB-1];

  function automatic int clampx(input int v);
    return v < 0 ? 0 : (v > 65535 ? 65535 : v);
  endfunction

  function automatic int bin_of(input int d, input int x);
    int b = 0;
    for (int i = 0; i < NB - 1; i++) if (x > bnd[d][i]) b++;
    return b;
  endfunction

  // ---- host: card access -------------------------------------------------
  function automatic logic [HA_W-1:0] baddr(input bit area, input region_e rg, input int off);
    return {1'b0, area, 2'(rg), OFF_AW'(off)};
  endfunction
  function automatic logic [HA_W-1:0] raddr(input int r);
    return {1'b1, (HA_W-1)'(r)};
  endfunction
  task automatic hwrite(input logic [HA_W-1:0] a, input logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk);
    h_req = 0; h_we = 0;
  endtask
  task automatic hread(input logic [HA_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    h_req = 1; h_we = 0; h_addr = a;
    @(negedge clk);
    h_req = 0;
    d = h_rdata;
  endtask
  task automatic write_ctrl(input bit area, input op_e op, input int nidx, input int nsep,
                            input int nsl, input thmode_e tm, input int thv);
    hwrite(baddr(area, REG_CTRL, CB_OP), 32'(op));
    hwrite(baddr(area, REG_CTRL, CB_NIDX), nidx);
    hwrite(baddr(area, REG_CTRL, CB_NSEP), nsep);
    hwrite(baddr(area, REG_CTRL, CB_NSLICE), nsl);
    hwrite(baddr(area, REG_CTRL, CB_BASE), BASE);
    hwrite(baddr(area, REG_CTRL, CB_STRIDE), STRIDE);
    hwrite(baddr(area, REG_CTRL, CB_THMODE), 32'(tm));
    hwrite(baddr(area, REG_CTRL, CB_THVAL), thv);
  endtask
  task automatic start_op(input bit area);
    hwrite(raddr(R_CMD), {30'd0, area, 1'b1});
  endtask
  task automatic wait_irq();
    int guard = 0;
    while (!irq && guard < 100000) begin @(posedge clk); guard++; end
    check(irq, "interrupt at end of operation");
    if (irq) n_irq++;
    hwrite(raddr(R_IRQACK), 32'h1);
  endtask

  // ---- host: encoder access ----------------------------------------------
  task automatic encode(input int x[D], output int idx[$]);
    idx = {};
    for (int d = 0; d < D; d++) enc_s_x[d] = XW'(x[d]);
    @(negedge clk);
    while (!enc_s_ready) @(negedge clk);
    enc_s_valid = 1;
    @(negedge clk);
    enc_s_valid = 0;
    forever begin
      if (enc_m_valid) begin
        idx.push_back(int'(enc_m_index));
        if (enc_m_last) break;
      end
      @(negedge clk);
    end
    @(negedge clk);
    n_encoded++;
    // the index values must be those of the sample's bins
    for (int d = 0; d < D; d++)
      check(idx[d] == d * NB + bin_of(d, x[d]), "encoder index value");
  endtask

  // recall a test pattern, return the matched training samples
  task automatic recall(input int idx[$], input thmode_e tm, input int thv, output int m[$]);
    logic [31:0] w0, w1;
    m = {};
    write_ctrl(1, OP_RECALL, D, 0, KS, tm, thv);
    foreach (idx[i]) hwrite(baddr(1, REG_IN, i), idx[i]);
    start_op(1);
    wait_irq();
    n_multislice++;
    for (int i = 0; i < NTRAIN; i++) begin
      hread(baddr(1, REG_OUT, i / 32), w0);               // slice 0, bit i
      hread(baddr(1, REG_OUT, 4 + i / 32), w1);           // slice 1, bit 128+i
      if (w0[i % 32] && w1[i % 32]) m.push_back(i);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int centre [NCLS][D];
    logic [31:0] st, w;
    bit area;
    void'($urandom(11));
    // data set
    for (int c = 0; c < NCLS; c++)
      for (int d = 0; d < D; d++) centre[c][d] = int'($urandom_range(8000, 57000));
    for (int i = 0; i < NTRAIN; i++) begin
      trc[i] = i % NCLS;
      for (int d = 0; d < D; d++)
        trx[i][d] = clampx(centre[trc[i]][d] + int'($urandom_range(0, 6000)) - 3000);
    end
    for (int t = 0; t < NTEST; t++) begin
      automatic int spread = (t % 2 == 0) ? 3000 : 12000;
      tec[t] = int'($urandom_range(NCLS - 1));
      for (int d = 0; d < D; d++)
        tex[t][d] = clampx(centre[tec[t]][d] + int'($urandom_range(0, 2 * spread)) - spread);
    end
    // equal-population boundaries per feature
    for (int d = 0; d < D; d++) begin
      automatic int v[$];
      for (int i = 0; i < NTRAIN; i++) v.push_back(trx[i][d]);
      v.sort();
      for (int b = 0; b < NB - 1; b++) bnd[d][b] = v[((b + 1) * NTRAIN) / NB - 1];
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < D; d++)
      for (int b = 0; b < NB - 1; b++) begin
        @(negedge clk);
        enc_cfg_we = 1; enc_cfg_dim = d[$clog2(D)-1:0]; enc_cfg_bin = b[$clog2(NB)-1:0];
        enc_cfg_data = XW'(bnd[d][b]);
      end
    @(negedge clk) enc_cfg_we = 0;

    // clear the CMM band
    write_ctrl(0, OP_CLEAR, KS * STRIDE, 0, 0, TH_FIXED, 0);
    start_op(0);
    wait_irq();
    n_clear++;

    // train, double buffered
    area = 0;
    begin
      automatic int idx[$];
      encode(trx[0], idx);
      write_ctrl(0, OP_TRAIN, D, 2, KS, TH_FIXED, 0);
      foreach (idx[q]) hwrite(baddr(0, REG_IN, q), idx[q]);
      hwrite(baddr(0, REG_IN, D), 0);
      hwrite(baddr(0, REG_IN, D + 1), ROW_W + 0);
    end
    for (int i = 0; i < NTRAIN; i++) begin
      start_op(area);
      if (i == 0) begin
        hwrite(raddr(R_CMD), 32'h3);
        hread(raddr(R_STATUS), st);
        check(st[3], "start while busy refused");
        if (st[3]) n_start_refused++;
        hread(baddr(area, REG_IN, 0), w);
        hread(raddr(R_STATUS), st);
        check(st[4] && w == 0, "host access to busy area refused");
        if (st[4]) n_conflict++;
        hwrite(raddr(R_IRQACK), 32'h2);
      end
      if (i + 1 < NTRAIN) begin
        automatic int idx[$];
        encode(trx[i+1], idx);
        write_ctrl(!area, OP_TRAIN, D, 2, KS, TH_FIXED, 0);
        foreach (idx[q]) hwrite(baddr(!area, REG_IN, q), idx[q]);
        hwrite(baddr(!area, REG_IN, D), i + 1);
        hwrite(baddr(!area, REG_IN, D + 1), ROW_W + i + 1);
        if (dut.u_card.busy) n_overlap++;
      end
      wait_irq();
      n_train++;
      area = !area;
    end

    // classify
    for (int t = 0; t < NTEST; t++) begin
      automatic int idx[$], m[$], sums[NTRAIN], exp_m[$];
      automatic int lvl, exp_cls;
      automatic bit used_lmax = 0;
      encode(tex[t], idx);
      // reference: features in the same bin as each training sample
      for (int i = 0; i < NTRAIN; i++) begin
        sums[i] = 0;
        for (int d = 0; d < D; d++) sums[i] += int'(bin_of(d, trx[i][d]) == bin_of(d, tex[t][d]));
      end
      recall(idx, TH_FIXED, THR, m);
      lvl = THR;
      n_fixed++;
      if (m.size() < K) begin
        recall(idx, TH_LMAX, K, m);
        n_lmax++;
        used_lmax = 1;
        // L-max level: largest level reached by at least K separator bits
        lvl = 0;
        for (int l = 1; l <= D; l++) begin
          automatic int c = 0;
          foreach (sums[i]) if (sums[i] >= l) c++;
          if (c >= K) lvl = l;
        end
        if (lvl == 0) lvl = 1;
      end
      for (int i = 0; i < NTRAIN; i++) if (sums[i] >= lvl) exp_m.push_back(i);
      check(m == exp_m, $sformatf("matched training samples of test %0d (%s)", t,
                                  used_lmax ? "L-max" : "fixed"));
      // k-NN over the matches
      knn_t_x = '0;
      for (int d = 0; d < D; d++) knn_t_x[d] = XW'(tex[t][d]);
      @(negedge clk) knn_start = 1;
      @(negedge clk) knn_start = 0;
      foreach (m[q]) begin
        for (int d = 0; d < D; d++) knn_c_x[d] = XW'(trx[m[q]][d]);
        knn_c_class = CLS_W'(trc[m[q]]);
        knn_c_valid = 1;
        @(negedge clk);
      end
      knn_c_valid = 0;
      knn_finish = 1;
      @(negedge clk);
      knn_finish = 0;
      // reference k-NN
      begin
        automatic longint dl[$];
        automatic int cl[$];
        automatic int nn, best;
        foreach (exp_m[q]) begin
          automatic longint dd = 0;
          automatic int p = 0;
          for (int d = 0; d < D; d++)
            dd += longint'(trx[exp_m[q]][d] - tex[t][d]) * longint'(trx[exp_m[q]][d] - tex[t][d]);
          while (p < dl.size() && dl[p] <= dd) p++;
          dl.insert(p, dd);
          cl.insert(p, trc[exp_m[q]]);
        end
        nn = dl.size() < K ? dl.size() : K;
        best = 0;
        exp_cls = 0;
        for (int i = 0; i < nn; i++) begin
          automatic int v = 0;
          for (int q = 0; q < nn; q++) if (cl[q] == cl[i]) v++;
          if (v > best) begin best = v; exp_cls = cl[i]; end
        end
      end
      check(knn_out_valid, "k-NN decision valid");
      check(knn_out_none == (m.size() == 0), "k-NN no-candidate flag");
      check(m.size() == 0 || int'(knn_out_class) == exp_cls, $sformatf("class of test %0d", t));
      check(int'(knn_n_cand) == m.size(), "k-NN candidate count");
      n_vote++;
      if (int'(knn_out_class) == tec[t]) n_correct++;
    end

    check(n_clear > 0, "clear exercised");
    check(n_train > 0, "training exercised");
    check(n_fixed > 0, "fixed-threshold recall exercised");
    check(n_lmax > 0, "L-max recall exercised");
    check(n_multislice > 0, "multi-slice separator exercised");
    check(n_overlap > 0, "host transfer overlapped with card operation");
    check(n_conflict > 0, "busy-area access refused");
    check(n_start_refused > 0, "start while busy refused");
    check(n_irq > 0, "interrupt raised");
    check(n_encoded > 0, "encoder used");
    check(n_vote > 0, "k-NN vote taken");
    $display("mechanisms: clear=%0d train=%0d fixed=%0d lmax=%0d multislice=%0d overlap=%0d conflict=%0d start_refused=%0d irq=%0d encoded=%0d votes=%0d",
             n_clear, n_train, n_fixed, n_lmax, n_multislice, n_overlap, n_conflict,
             n_start_refused, n_irq, n_encoded, n_vote);
    $display("classification: %0d of %0d test samples in their generating class", n_correct, n_vote);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
