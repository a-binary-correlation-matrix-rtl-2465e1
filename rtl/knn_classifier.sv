// knn_classifier -- k-NN rule applied to the training samples pre-selected
// by the CMM.
//
// The CMM recall returns a small set of stored training samples that match
// the test sample in the quantised (binary) space. Those candidates are then
// ranked by their distance to the test sample in the original numerical
// input space, and the test sample takes the majority class of the K nearest
// ones. Because only the candidates are ranked, far fewer distances are
// computed than in a plain k-NN search over the whole training set.
//
// Operation: a start pulse latches the test sample t_x and empties the list.
// Each cycle with c_valid high presents one candidate (features c_x, class
// label c_class): its squared Euclidean distance is computed in that cycle
// and the candidate is inserted into a sorted list of the K nearest seen so
// far (a candidate at the same distance as a listed one is placed after
// it). A finish pulse takes the vote over the list: the class held by most
// of the listed candidates wins; a tie goes to the class of the nearer
// candidate. The result appears one clock later with out_valid high for one
// clock; out_none is high if no candidate was presented (the CMM found no
// match). n_cand counts the candidates of the current test sample.
//
// Timing: one candidate per clock, no back-pressure; result one clock after
// finish. Candidates presented in the same clock as finish are not counted.
//
// From the description: k-NN rule on the CMM matches, distances in the
// original input space. The distance measure (squared Euclidean), the tie
// rule, K, the widths and the streaming interface are this design's own
// choices; the description runs this stage in host software.
module knn_classifier #(
  parameter int unsigned D     = 16,  // features per sample
  parameter int unsigned XW    = 16,  // feature width, unsigned
  parameter int unsigned K     = 5,   // neighbours voting
  parameter int unsigned CLS_W = 5,   // class label width
  parameter int unsigned NC_W  = 16   // candidate counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [D-1:0][XW-1:0] t_x,
  input  logic                 c_valid,
  input  logic [D-1:0][XW-1:0] c_x,
  input  logic [CLS_W-1:0]     c_class,
  input  logic                 finish,
  output logic                 out_valid,
  output logic [CLS_W-1:0]     out_class,
  output logic                 out_none,
  output logic [NC_W-1:0]      n_cand
);

  localparam int unsigned DIST_W = 2 * XW + $clog2(D + 1);
  localparam int unsigned KC_W   = $clog2(K + 1);

  logic [D-1:0][XW-1:0] t_q;
  logic [DIST_W-1:0]    l_dist  [K];
  logic [CLS_W-1:0]     l_class [K];
  logic                 l_valid [K];

  // squared Euclidean distance of the presented candidate
  logic [DIST_W-1:0] c_dist;
  always_comb begin
    c_dist = '0;
    for (int d = 0; d < D; d++) begin
      logic [XW-1:0] diff;
      diff = (c_x[d] > t_q[d]) ? (c_x[d] - t_q[d]) : (t_q[d] - c_x[d]);
      c_dist = c_dist + DIST_W'(diff) * DIST_W'(diff);
    end
  end

  // position of the new candidate in the sorted list
  // bef[i+1]: the new candidate goes before entry i; bef[0] is a sentinel.
  logic [K:0] bef;
  always_comb begin
    bef[0] = 1'b0;
    for (int i = 0; i < K; i++)
      bef[i+1] = !l_valid[i] || (c_dist < l_dist[i]);
  end

  // vote: votes[i] = number of listed entries with the class of entry i
  logic [KC_W-1:0]  votes [K];
  logic [CLS_W-1:0] win_class;
  logic             win_any;
  always_comb begin
    logic [KC_W-1:0] best;
    best      = '0;
    win_class = l_class[0];
    win_any   = l_valid[0];
    for (int i = 0; i < K; i++) begin
      votes[i] = '0;
      for (int m = 0; m < K; m++)
        if (l_valid[m] && l_valid[i] && l_class[m] == l_class[i]) votes[i] = votes[i] + 1'b1;
      if (l_valid[i] && votes[i] > best) begin
        best      = votes[i];
        win_class = l_class[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q       <= '0;
      n_cand    <= '0;
      out_valid <= 1'b0;
      out_class <= '0;
      out_none  <= 1'b0;
      for (int i = 0; i < K; i++) begin
        l_dist[i]  <= '0;
        l_class[i] <= '0;
        l_valid[i] <= 1'b0;
      end
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        t_q    <= t_x;
        n_cand <= '0;
        for (int i = 0; i < K; i++) l_valid[i] <= 1'b0;
      end else if (finish) begin
        out_valid <= 1'b1;
        out_class <= win_class;
        out_none  <= !win_any;
      end else if (c_valid) begin
        n_cand <= n_cand + 1'b1;
        for (int i = 0; i < K; i++) begin
          if (bef[i+1]) begin
            if (!bef[i]) begin
              l_dist[i]  <= c_dist;
              l_class[i] <= c_class;
              l_valid[i] <= 1'b1;
            end else if (i > 0) begin
              l_dist[i]  <= l_dist[i-1];
              l_class[i] <= l_class[i-1];
              l_valid[i] <= l_valid[i-1];
            end
          end
        end
      end
    end
  end

endmodule
