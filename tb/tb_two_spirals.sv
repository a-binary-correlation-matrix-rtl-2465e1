// tb_two_spirals -- the two-spirals benchmark run through the CMM k-NN
// classifier at its default size.
//
// The data set is the usual one: two interleaved spirals of 97 points each,
// point i of spiral A at angle i*pi/16 and radius 6.5*(104-i)/104, spiral B
// its mirror image through the origin. The (x, y) coordinates are scaled to
// 16-bit unsigned values and given as features 0 and 1; the other 14
// features of the classifier are held at 0, so they fall in bin 0 for every
// sample and match in every recall.
//
// The testbench plays the host. Equal-population bin boundaries are taken
// from the training points and loaded into the encoder. The CMM band is
// cleared, and each of the 194 training points is trained with a unique
// two-bit separator (bit i in slices 0-1, bit 256+i in slices 2-3, so every
// operation spans four slices), double buffered. Then every training point
// and 192 unseen points (half-way between neighbouring points of each
// spiral) are recalled with a fixed threshold of D (both coordinates in the
// same bin as the training point); where fewer than K training points match,
// the recall is repeated with L-max thresholding (L = K), which the card
// applies to each 128-bit slice on its own: points 0-127 and points 128-193
// are thresholded at their own level. The matched points
// go through the k-NN stage. Both the set of matches and the k-NN decision
// are compared with a reference worked out in the testbench from the points
// alone. The classification rate on the training and the unseen points is
// printed.
`timescale 1ns/1ps
module tb_two_spirals;
  import presence_pkg::*;

  localparam int D = 16, NB = 16, XW = 16, K = 5, CLS_W = 5;
  localparam int ROW_W  = 128;
  localparam int STRIDE = D * NB;
  localparam int NPS    = 97;            // points per spiral
  localparam int NTRAIN = 2 * NPS;
  localparam int NTEST  = 2 * (NPS - 1);
  localparam int KS     = 4;             // separator slices (512 bits)
  localparam int BASE   = 0;
  localparam int OUTW   = KS * ROW_W / 32;

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
  int n_train = 0, n_fixed = 0, n_lmax = 0, n_overlap = 0;
  int ok_train = 0, ok_test = 0;

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

  // point at position pos (may be fractional) along a spiral, scaled to 16 bits
  task automatic spiral_point(input real pos, input int cls, output int x[D]);
    real ang, r, px, py;
    ang = pos * 3.14159265358979 / 16.0;
    r   = 6.5 * (104.0 - pos) / 104.0;
    px  = r * $sin(ang);
    py  = r * $cos(ang);
    if (cls == 1) begin px = -px; py = -py; end
    foreach (x[d]) x[d] = 0;
    x[0] = int'(32768.0 + px * 4800.0);
    x[1] = int'(32768.0 + py * 4800.0);
  endtask

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
    for (int d = 0; d < D; d++)
      check(idx[d] == d * NB + bin_of(d, x[d]), "encoder index value");
  endtask

  // recall, return the training points whose two separator bits are both set
  task automatic recall(input int idx[$], input thmode_e tm, input int thv, output int m[$]);
    logic [31:0] w [OUTW];
    m = {};
    write_ctrl(1, OP_RECALL, D, 0, KS, tm, thv);
    foreach (idx[i]) hwrite(baddr(1, REG_IN, i), idx[i]);
    start_op(1);
    wait_irq();
    for (int q = 0; q < OUTW; q++) hread(baddr(1, REG_OUT, q), w[q]);
    for (int i = 0; i < NTRAIN; i++)
      if (w[i / 32][i % 32] && w[(256 + i) / 32][i % 32]) m.push_back(i);
  endtask

  // classify one point through the card and the k-NN stage, check both
  // against the reference; returns the decided class
  task automatic classify(input int x[D], output int cls);
    int idx[$], m[$], exp_m[$], sums[NTRAIN];
    int lvl [2];
    int exp_cls;
    bit used_lmax;
    used_lmax = 0;
    encode(x, idx);
    for (int i = 0; i < NTRAIN; i++) begin
      sums[i] = 0;
      for (int d = 0; d < D; d++) sums[i] += int'(bin_of(d, trx[i][d]) == bin_of(d, x[d]));
    end
    recall(idx, TH_FIXED, D, m);
    n_fixed++;
    lvl = '{D, D};
    if (m.size() < K) begin
      recall(idx, TH_LMAX, K, m);
      n_lmax++;
      used_lmax = 1;
      // L-max acts on each slice: points 0-127 (slices 0 and 2) and points
      // 128-193 (slices 1 and 3) get their own level
      for (int g = 0; g < 2; g++) begin
        lvl[g] = 0;
        for (int l = 1; l <= D; l++) begin
          automatic int c = 0;
          foreach (sums[i]) if (i / ROW_W == g && sums[i] >= l) c++;
          if (c >= K) lvl[g] = l;
        end
        if (lvl[g] == 0) lvl[g] = 1;
      end
    end
    for (int i = 0; i < NTRAIN; i++) if (sums[i] >= lvl[i / ROW_W]) exp_m.push_back(i);
    check(m == exp_m, $sformatf("matched training points (%s)", used_lmax ? "L-max" : "fixed"));
    // k-NN stage
    knn_t_x = '0;
    for (int d = 0; d < D; d++) knn_t_x[d] = XW'(x[d]);
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
    // reference k-NN: stable sort by squared distance, vote, ties to nearer
    begin
      automatic longint dl[$];
      automatic int cl[$];
      automatic int nn, best;
      foreach (exp_m[q]) begin
        automatic longint dd = 0;
        automatic int p = 0;
        for (int d = 0; d < D; d++)
          dd += longint'(trx[exp_m[q]][d] - x[d]) * longint'(trx[exp_m[q]][d] - x[d]);
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
    check(knn_out_valid && !knn_out_none, "k-NN decision valid");
    check(int'(knn_out_class) == exp_cls, "k-NN class");
    check(int'(knn_n_cand) == m.size(), "k-NN candidate count");
    cls = int'(knn_out_class);
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit area;
    for (int i = 0; i < NPS; i++)
      for (int c = 0; c < 2; c++) begin
        automatic int x[D];
        spiral_point(real'(i), c, x);
        trx[2*i+c] = x;
        trc[2*i+c] = c;
      end
    for (int i = 0; i < NPS - 1; i++)
      for (int c = 0; c < 2; c++) begin
        automatic int x[D];
        spiral_point(real'(i) + 0.5, c, x);
        tex[2*i+c] = x;
        tec[2*i+c] = c;
      end
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

    write_ctrl(0, OP_CLEAR, KS * STRIDE, 0, 0, TH_FIXED, 0);
    start_op(0);
    wait_irq();

    // train, double buffered: point i+1 is loaded while point i is trained
    area = 0;
    begin
      automatic int idx[$];
      encode(trx[0], idx);
      write_ctrl(0, OP_TRAIN, D, 2, KS, TH_FIXED, 0);
      foreach (idx[q]) hwrite(baddr(0, REG_IN, q), idx[q]);
      hwrite(baddr(0, REG_IN, D), 0);
      hwrite(baddr(0, REG_IN, D + 1), 2 * ROW_W + 0);
    end
    for (int i = 0; i < NTRAIN; i++) begin
      start_op(area);
      if (i + 1 < NTRAIN) begin
        automatic int idx[$];
        encode(trx[i+1], idx);
        write_ctrl(!area, OP_TRAIN, D, 2, KS, TH_FIXED, 0);
        foreach (idx[q]) hwrite(baddr(!area, REG_IN, q), idx[q]);
        hwrite(baddr(!area, REG_IN, D), i + 1);
        hwrite(baddr(!area, REG_IN, D + 1), 2 * ROW_W + i + 1);
        if (dut.u_card.busy) n_overlap++;
      end
      wait_irq();
      n_train++;
      area = !area;
    end

    // classify the training points, then the unseen ones
    for (int i = 0; i < NTRAIN; i++) begin
      automatic int cls;
      classify(trx[i], cls);
      if (cls == trc[i]) ok_train++;
    end
    for (int t = 0; t < NTEST; t++) begin
      automatic int cls;
      classify(tex[t], cls);
      if (cls == tec[t]) ok_test++;
    end

    check(n_train == NTRAIN, "all points trained");
    check(n_fixed == NTRAIN + NTEST, "every point recalled");
    check(n_overlap > 0, "host transfer overlapped with card operation");
    $display("recalls: fixed=%0d lmax=%0d", n_fixed, n_lmax);
    $display("two spirals: training points %0d of %0d correct, unseen points %0d of %0d correct",
             ok_train, NTRAIN, ok_test, NTEST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
