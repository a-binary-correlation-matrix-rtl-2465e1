// tb_satcon -- self-checking test of the SATCON controller.
//
// SATCON is connected to a buffer memory, four SATSUM devices and a reduced
// (2^12-row) weights memory; the testbench plays the host on the buffer
// memory's host port and loads the weights memory directly with random rows.
// Checked against a reference model in the testbench:
//   recall  - output block of multi-slice recalls with random index lists,
//             fixed and L-max thresholds (L-max level = largest t with at
//             least L counters >= t, at least 1);
//   train   - every selected row becomes row | separator-slice mask, other
//             rows unchanged;
//   clear   - exactly the requested rows become zero;
//   timing  - acc_en three clocks after a stage-1 index issue (the row is
//             added at the fourth clock edge),
//             one index value per clock in recall, one per two clocks in
//             training, done 12 + K*(N + 6 + R) clocks after start;
//   a control block with zero slices finishes without touching memory.
`timescale 1ns/1ps
module tb_satcon;
  import presence_pkg::*;

  localparam int R = 4, WM_AW = 12, ROW_W = R * LANE_W, GC_W = $clog2(LANE_W + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, start_area = 0, busy, done, card_area;
  logic c_en, c_we; region_e c_region; logic [OFF_AW-1:0] c_off;
  logic [WORD_W-1:0] c_wdata, c_rdata;
  logic h_en = 0, h_we = 0, h_area = 0; region_e h_region = REG_CTRL;
  logic [OFF_AW-1:0] h_off = '0; logic [WORD_W-1:0] h_wdata = '0, h_rdata; logic host_conflict;
  logic [WM_AW-1:0] wm_addr; logic wm_we;
  logic [ROW_W-1:0] wm_wdata, wm_rdata, mask, result;
  logic [R*GC_W-1:0] ge_count;
  satsum_cmd_t cmd;

  satcon #(.R(R), .WM_AW(WM_AW)) dut (.*);

  buffer_memory u_buf (.clk, .rst_n, .h_en, .h_we, .h_area, .h_region, .h_off, .h_wdata,
    .h_rdata, .host_conflict, .card_active(busy), .card_area, .c_en, .c_we, .c_region,
    .c_off, .c_wdata, .c_rdata);
  for (genvar r = 0; r < R; r++) begin : g_s
    satsum u_s (.clk, .rst_n, .cmd, .rdata(wm_rdata[r*LANE_W +: LANE_W]),
      .mask(mask[r*LANE_W +: LANE_W]), .wdata(wm_wdata[r*LANE_W +: LANE_W]),
      .result(result[r*LANE_W +: LANE_W]), .ge_count(ge_count[r*GC_W +: GC_W]));
  end
  weight_memory #(.AW(WM_AW), .DW(ROW_W)) u_wm (.clk, .addr(wm_addr), .we(wm_we),
    .wdata(wm_wdata), .rdata(wm_rdata));

  int checks = 0, failures = 0;
  logic [ROW_W-1:0] refm [2**WM_AW];
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // pipeline monitors
  longint first_issue, first_acc, last_we, min_we_gap;
  int n_acc, n_we;
  always @(posedge clk) begin
    if (c_en && !c_we && c_region == REG_IN && first_issue < 0) first_issue = cycle;
    if (cmd.acc_en) begin
      if (first_acc < 0) first_acc = cycle;
      n_acc++;
    end
    if (wm_we) begin
      if (last_we >= 0 && cycle - last_we < min_we_gap) min_we_gap = cycle - last_we;
      last_we = cycle;
      n_we++;
    end
  end
  task automatic reset_mon();
    first_issue = -1; first_acc = -1; last_we = -1; min_we_gap = 1000; n_acc = 0; n_we = 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hwr(input bit a, input region_e rg, input int off, input logic [31:0] d);
    @(negedge clk);
    h_en = 1; h_we = 1; h_area = a; h_region = rg; h_off = OFF_AW'(off); h_wdata = d;
    @(negedge clk);
    h_en = 0; h_we = 0;
  endtask
  task automatic hrd(input bit a, input region_e rg, input int off, output logic [31:0] d);
    @(negedge clk);
    h_en = 1; h_we = 0; h_area = a; h_region = rg; h_off = OFF_AW'(off);
    @(negedge clk);
    h_en = 0;
    d = h_rdata;
  endtask

  task automatic ctrl(input bit a, input op_e op, input int nidx, input int nsep, input int nsl,
                      input int base, input int stride, input thmode_e tm, input int thv);
    hwr(a, REG_CTRL, CB_OP, 32'(op));   hwr(a, REG_CTRL, CB_NIDX, nidx);
    hwr(a, REG_CTRL, CB_NSEP, nsep);    hwr(a, REG_CTRL, CB_NSLICE, nsl);
    hwr(a, REG_CTRL, CB_BASE, base);    hwr(a, REG_CTRL, CB_STRIDE, stride);
    hwr(a, REG_CTRL, CB_THMODE, 32'(tm)); hwr(a, REG_CTRL, CB_THVAL, thv);
  endtask

  longint t0, t1;
  task automatic run(input bit a);
    reset_mon();
    @(negedge clk);
    start = 1; start_area = a;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    t1 = cycle;
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random dense CMM
    for (int a = 0; a < 2**WM_AW; a++) begin
      refm[a] = {$urandom, $urandom, $urandom, $urandom};
      u_wm.mem[a] = refm[a];
    end

    // ---- recalls -----------------------------------------------------------
    for (int t = 0; t < 12; t++) begin
      automatic int n = int'($urandom_range(1, 40));
      automatic int k = int'($urandom_range(1, 3));
      automatic int base = int'($urandom_range(0, 500));
      automatic int stride = 300;
      automatic thmode_e tm = thmode_e'(t % 2);
      automatic int thv = (tm == TH_LMAX) ? int'($urandom_range(1, 20)) : int'($urandom_range(1, n));
      automatic bit a = 1'(t / 2);
      automatic int idx[$];
      for (int i = 0; i < n; i++) idx.push_back(int'($urandom_range(0, stride - 1)));
      ctrl(a, OP_RECALL, n, 0, k, base, stride, tm, thv);
      foreach (idx[i]) hwr(a, REG_IN, i, idx[i]);
      run(a);
      check(t1 - t0 == 12 + k * (n + 6 + R + (tm == TH_LMAX ? CNT_W : 0)),
            $sformatf("recall cycles %0d (n=%0d k=%0d)", t1 - t0, n, k));
      check(first_acc - first_issue == 3, $sformatf("acc_en 3 clocks after the stage-1 issue, got %0d", first_acc - first_issue));
      check(n_acc == n * k, "one accumulation per index value and slice");
      check(n_we == 0, "recall does not write the weights");
      for (int j = 0; j < k; j++) begin
        automatic int sums[ROW_W];
        automatic int thr;
        automatic logic [ROW_W-1:0] e, g;
        for (int b = 0; b < ROW_W; b++) sums[b] = 0;
        foreach (idx[i]) for (int b = 0; b < ROW_W; b++)
          sums[b] += int'(refm[(base + j * stride + idx[i]) % (2**WM_AW)][b]);
        if (tm == TH_FIXED) thr = thv;
        else begin
          thr = 0;
          for (int lv = 1; lv < 1000; lv++) begin
            automatic int c = 0;
            for (int b = 0; b < ROW_W; b++) if (sums[b] >= lv) c++;
            if (c >= thv) thr = lv;
          end
          if (thr == 0) thr = 1;
        end
        for (int b = 0; b < ROW_W; b++) e[b] = (sums[b] >= thr);
        for (int r = 0; r < R; r++) begin
          hrd(a, REG_OUT, j * R + r, w);
          g[r*LANE_W +: LANE_W] = w;
        end
        check(g == e, $sformatf("recall output, test %0d slice %0d", t, j));
      end
    end

    // ---- training ------------------------------------------------------------
    for (int t = 0; t < 6; t++) begin
      automatic int n = int'($urandom_range(1, 12));
      automatic int k = 2, base = 2000, stride = 64;
      automatic int idx[$], sep[$];
      for (int i = 0; i < n; i++) begin
        automatic int v;
        automatic bit dup;
        do begin
          v = int'($urandom_range(0, stride - 1));
          dup = 0;
          foreach (idx[q]) if (idx[q] == v) dup = 1;
        end while (dup);
        idx.push_back(v);
      end
      for (int i = 0; i < 3; i++) sep.push_back(int'($urandom_range(0, k * ROW_W - 1)));
      ctrl(0, OP_TRAIN, n, sep.size(), k, base, stride, TH_FIXED, 0);
      foreach (idx[i]) hwr(0, REG_IN, i, idx[i]);
      foreach (sep[i]) hwr(0, REG_IN, n + i, sep[i]);
      run(0);
      check(n_we == n * k, "one write per index value and slice");
      check(n == 1 || min_we_gap == 2, "training writes every second clock");
      for (int j = 0; j < k; j++) begin
        automatic logic [ROW_W-1:0] m = '0;
        foreach (sep[s]) if (sep[s] / ROW_W == j) m[sep[s] % ROW_W] = 1'b1;
        foreach (idx[i]) refm[base + j * stride + idx[i]] |= m;
      end
      for (int a = base - 4; a < base + k * stride + 4; a++)
        check(u_wm.mem[a] == refm[a], $sformatf("row %0d after training", a));
    end

    // ---- clear ---------------------------------------------------------------
    ctrl(1, OP_CLEAR, 100, 0, 0, 3000, 0, TH_FIXED, 0);
    run(1);
    check(n_we == 100, "clear writes the requested rows");
    for (int a = 2990; a < 3110; a++) begin
      if (a >= 3000 && a < 3100) refm[a] = '0;
      check(u_wm.mem[a] == refm[a], $sformatf("row %0d after clear", a));
    end

    // ---- empty operation -----------------------------------------------------
    ctrl(1, OP_RECALL, 5, 0, 0, 0, 0, TH_FIXED, 1);
    run(1);
    check(n_acc == 0 && n_we == 0, "zero-slice operation does nothing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
