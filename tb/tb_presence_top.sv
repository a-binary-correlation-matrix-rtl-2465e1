// tb_presence_top -- end-to-end test of the PRESENCE card at its default
// size (4 SATSUM devices, 128-bit rows, 2^20-row weights memory).
//
// A host model drives the memory-mapped port. The test clears the part of
// the CMM it uses, trains a set of random sparse patterns with two-bit
// separators spread over two 128-bit slices, then recalls every pattern with
// the fixed threshold n_p (exact match), recalls partial patterns with a
// lower fixed threshold, and recalls with L-max thresholding. Each output
// block is compared with a reference CMM kept in the testbench (the same
// M = OR s^T p rule and column sums computed independently). Operations
// alternate between the two buffer areas, and the next operation is written
// into the free area while the card is busy. The test also checks the cycle
// count of a recall against 13 + K*(N + 6 + R) and the bound of the
// description, T/C = 23 + K*(N + 38 + 2R), that a start written while busy
// and a host access to the busy area are refused, and that the interrupt is
// raised and cleared. Every mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_presence_top;
  import presence_pkg::*;

  localparam int unsigned R     = 4;
  localparam int unsigned ROW_W = R * LANE_W;
  localparam int unsigned STRIDE = 256;   // input vector length (rows per slice)
  localparam int unsigned K      = 2;     // separator slices (separator = 256 bits)
  localparam int unsigned NP     = 8;     // bits set per input pattern
  localparam int unsigned NPAT   = 10;    // stored patterns
  localparam int unsigned BASE   = 1000;

  logic clk = 0, rst_n = 0;
  logic h_req = 0, h_we = 0;
  logic [HA_W-1:0]   h_addr = '0;
  logic [WORD_W-1:0] h_wdata = '0;
  logic [WORD_W-1:0] h_rdata;
  logic h_rvalid, irq;

  always #25 clk = ~clk;   // 50 ns system cycle

  presence_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_clear = 0, n_train = 0, n_rec_fixed = 0, n_rec_lmax = 0, n_partial = 0;
  int n_overlap = 0, n_conflict = 0, n_start_refused = 0, n_irq = 0, n_multislice = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- host bus model -----------------------------------------------------
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

  // ---- reference CMM ------------------------------------------------------
  logic [ROW_W-1:0] refm [int];

  function automatic logic [ROW_W-1:0] ref_row(input int a);
    return refm.exists(a) ? refm[a] : '0;
  endfunction

  // column sums of slice j for pattern idx
  function automatic void ref_sums(input int idx[$], input int j, output int sums[ROW_W]);
    for (int b = 0; b < ROW_W; b++) sums[b] = 0;
    foreach (idx[i]) begin
      logic [ROW_W-1:0] row = ref_row(BASE + j * STRIDE + idx[i]);
      for (int b = 0; b < ROW_W; b++) sums[b] += int'(row[b]);
    end
  endfunction

  function automatic int lmax_level(input int sums[ROW_W], input int L);
    int t = 0;
    for (int lv = 1; lv <= 65535; lv++) begin
      int c = 0;
      for (int b = 0; b < ROW_W; b++) if (sums[b] >= lv) c++;
      if (c >= L) t = lv; else break;
    end
    return (t == 0) ? 1 : t;
  endfunction

  // ---- operations -----------------------------------------------------------
  task automatic write_ctrl(input bit area, input op_e op, input int nidx, input int nsep,
                            input int nslice, input thmode_e tm, input int thval);
    hwrite(baddr(area, REG_CTRL, CB_OP), 32'(op));
    hwrite(baddr(area, REG_CTRL, CB_NIDX), nidx);
    hwrite(baddr(area, REG_CTRL, CB_NSEP), nsep);
    hwrite(baddr(area, REG_CTRL, CB_NSLICE), nslice);
    hwrite(baddr(area, REG_CTRL, CB_BASE), BASE);
    hwrite(baddr(area, REG_CTRL, CB_STRIDE), STRIDE);
    hwrite(baddr(area, REG_CTRL, CB_THMODE), 32'(tm));
    hwrite(baddr(area, REG_CTRL, CB_THVAL), thval);
  endtask

  task automatic write_list(input bit area, input int off, input int v[$]);
    foreach (v[i]) hwrite(baddr(area, REG_IN, off + i), v[i]);
  endtask

  longint t_start;
  task automatic start_op(input bit area);
    @(negedge clk);
    h_req = 1; h_we = 1; h_addr = raddr(R_CMD); h_wdata = {30'd0, area, 1'b1};
    @(posedge clk);
    t_start = cycle;
    @(negedge clk);
    h_req = 0; h_we = 0;
  endtask

  longint t_done;
  task automatic wait_irq();
    logic [31:0] st;
    int guard = 0;
    while (!irq && guard < 200000) begin
      @(posedge clk);
      guard++;
    end
    t_done = cycle;
    check(irq, "interrupt raised at end of operation");
    if (irq) n_irq++;
    hread(raddr(R_STATUS), st);
    check(st[0] == 1'b0 && st[1] == 1'b1, "status idle with interrupt pending");
    hwrite(raddr(R_IRQACK), 32'h1);
    @(negedge clk);
    check(!irq, "interrupt cleared by acknowledge");
  endtask

  // compare a recall's output block with the reference
  task automatic check_output(input bit area, input int idx[$], input thmode_e tm, input int thval);
    for (int j = 0; j < K; j++) begin
      int sums[ROW_W];
      int thr;
      logic [ROW_W-1:0] expv, got;
      ref_sums(idx, j, sums);
      thr = (tm == TH_LMAX) ? lmax_level(sums, thval) : thval;
      for (int b = 0; b < ROW_W; b++) expv[b] = (sums[b] >= thr);
      for (int r = 0; r < R; r++) begin
        logic [31:0] w;
        hread(baddr(area, REG_OUT, j * R + r), w);
        got[r*LANE_W +: LANE_W] = w;
      end
      check(got == expv, $sformatf("recall output slice %0d", j));
      if (got != expv) $display("  got %h exp %h thr %0d", got, expv, thr);
    end
  endtask

  // random patterns
  int pats[NPAT][$];
  int seps[NPAT][$];

  function automatic void make_pattern(output int p[$], input int n, input int range);
    p = {};
    while (p.size() < n) begin
      int v = int'($urandom_range(range - 1));
      bit dup = 0;
      foreach (p[i]) if (p[i] == v) dup = 1;
      if (!dup) p.push_back(v);
    end
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] st, w;
    bit area;
    void'($urandom(7));
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- clear the band of the CMM in use ---------------------------------
    write_ctrl(0, OP_CLEAR, K * STRIDE, 0, 0, TH_FIXED, 0);
    start_op(0);
    wait_irq();
    n_clear++;

    // ---- train, double buffered ------------------------------------------
    for (int i = 0; i < NPAT; i++) begin
      make_pattern(pats[i], NP, STRIDE);
      make_pattern(seps[i], 2, K * ROW_W);
    end
    // first pattern prepared in area 0
    write_ctrl(0, OP_TRAIN, NP, 2, K, TH_FIXED, 0);
    write_list(0, 0, pats[0]);
    write_list(0, NP, seps[0]);
    area = 0;
    for (int i = 0; i < NPAT; i++) begin
      start_op(area);
      if (i == 0) begin
        // a second start while busy is refused
        hwrite(raddr(R_CMD), {30'd0, 1'b1, 1'b1});
        hread(raddr(R_STATUS), st);
        check(st[3] == 1'b1, "start while busy refused");
        if (st[3]) n_start_refused++;
        // a host access to the busy area is refused
        hread(baddr(area, REG_CTRL, CB_NIDX), w);
        check(w == 0, "read of busy area returns zero");
        hread(raddr(R_STATUS), st);
        check(st[4] == 1'b1, "host access to busy area flagged");
        if (st[4]) n_conflict++;
        hwrite(raddr(R_IRQACK), 32'h2);
      end
      // prepare the next pattern in the other area while the card works
      if (i + 1 < NPAT) begin
        write_ctrl(!area, OP_TRAIN, NP, 2, K, TH_FIXED, 0);
        write_list(!area, 0, pats[i+1]);
        write_list(!area, NP, seps[i+1]);
        if (dut.busy) n_overlap++;
      end
      wait_irq();
      n_train++;
      // reference update: M = M OR s^T p
      for (int j = 0; j < K; j++) begin
        automatic logic [ROW_W-1:0] m = '0;
        foreach (seps[i][s]) if (seps[i][s] / ROW_W == j) m[seps[i][s] % ROW_W] = 1'b1;
        foreach (pats[i][q]) refm[BASE + j * STRIDE + pats[i][q]] = ref_row(BASE + j * STRIDE + pats[i][q]) | m;
      end
      area = !area;
    end
    hread(raddr(R_STATUS), st);
    check(st[3] == 1'b0 && st[4] == 1'b0, "refusal flags cleared");

    // ---- exact recall of every stored pattern, fixed threshold n_p --------
    for (int i = 0; i < NPAT; i++) begin
      area = i[0];
      write_ctrl(area, OP_RECALL, NP, 0, K, TH_FIXED, NP);
      write_list(area, 0, pats[i]);
      start_op(area);
      wait_irq();
      // timing of the recall
      begin
        automatic longint measured = t_done - t_start;
        automatic longint expect_c = 13 + K * (NP + 6 + R);
        automatic longint eq4      = 23 + ((K * ROW_W - 1) / (32 * R) + 1) * (NP + 38 + 2 * R);
        check(measured == expect_c, $sformatf("recall cycles %0d, expected %0d", measured, expect_c));
        check(measured <= eq4, "recall cycles within equation 4 bound");
      end
      check_output(area, pats[i], TH_FIXED, NP);
      // the stored separator bits must be among the recalled ones
      for (int s = 0; s < 2; s++) begin
        hread(baddr(area, REG_OUT, seps[i][s] / 32), w);
        check(w[seps[i][s] % 32] == 1'b1, "stored separator bit recalled");
      end
      n_rec_fixed++;
      n_multislice++;
    end

    // ---- partial match: half of a pattern plus noise, lower threshold -----
    for (int i = 0; i < 3; i++) begin
      int p[$];
      for (int q = 0; q < NP / 2; q++) p.push_back(pats[i][q]);
      p.push_back((pats[i][0] + 1) % STRIDE);
      write_ctrl(0, OP_RECALL, p.size(), 0, K, TH_FIXED, NP / 2);
      write_list(0, 0, p);
      start_op(0);
      wait_irq();
      check_output(0, p, TH_FIXED, NP / 2);
      n_partial++;
    end

    // ---- L-max recall ----------------------------------------------------
    for (int i = 0; i < 4; i++) begin
      int p[$];
      automatic int L = 1 + i;
      make_pattern(p, NP, STRIDE);
      for (int q = 0; q < 4; q++) p[q] = pats[i][q];
      write_ctrl(1, OP_RECALL, p.size(), 0, K, TH_LMAX, L);
      write_list(1, 0, p);
      start_op(1);
      wait_irq();
      check(t_done - t_start == 13 + K * (NP + 6 + R + 64'(CNT_W)), $sformatf("L-max recall cycles %0d", t_done - t_start));
      check_output(1, p, TH_LMAX, L);
      n_rec_lmax++;
    end

    // ---- timing slope: one index value per clock ---------------------------
    begin
      int p[$];
      longint c1, c2;
      make_pattern(p, 40, STRIDE);
      write_ctrl(0, OP_RECALL, 20, 0, K, TH_FIXED, 1);
      write_list(0, 0, p);
      start_op(0); wait_irq(); c1 = t_done - t_start;
      write_ctrl(0, OP_RECALL, 40, 0, K, TH_FIXED, 1);
      start_op(0); wait_irq(); c2 = t_done - t_start;
      check(c2 - c1 == K * 20, $sformatf("20 more index values cost %0d clocks over %0d slices", c2 - c1, K));
      check_output(0, p, TH_FIXED, 1);
    end

    // ---- every mechanism happened ------------------------------------------
    check(n_clear > 0, "clear operation exercised");
    check(n_train > 0, "training exercised");
    check(n_rec_fixed > 0, "fixed-threshold recall exercised");
    check(n_partial > 0, "partial-match recall exercised");
    check(n_rec_lmax > 0, "L-max recall exercised");
    check(n_multislice > 0, "multi-slice separator exercised");
    check(n_overlap > 0, "host transfer overlapped with card operation");
    check(n_conflict > 0, "busy-area host access refused");
    check(n_start_refused > 0, "start while busy refused");
    check(n_irq > 0, "interrupt raised");
    $display("mechanisms: clear=%0d train=%0d fixed=%0d partial=%0d lmax=%0d multislice=%0d overlap=%0d conflict=%0d start_refused=%0d irq=%0d",
             n_clear, n_train, n_rec_fixed, n_partial, n_rec_lmax, n_multislice, n_overlap,
             n_conflict, n_start_refused, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
