// cmm_classifier_top -- the CMM k-NN classifier: robust uniform encoder,
// PRESENCE CMM card and k-NN stage.
//
// Classification runs in three steps. The RU encoder quantises a sample's
// numerical features against per-dimension bin boundaries and gives the
// index values of its sparse binary code. The PRESENCE card stores the codes
// of the training samples in a binary correlation matrix memory, one unique
// separator per sample (training), and for a test sample returns the
// separator bits of all stored samples that match it fully or partly
// (recall with a fixed or L-max threshold). The k-NN stage ranks the matched
// training samples by their distance to the test sample in the original
// feature space and votes over the K nearest.
//
// The three stages are connected by the host, which owns the training set:
// it moves index values from the encoder into the card's buffer memory,
// turns recalled separator bits back into training-sample numbers, and
// streams those samples into the k-NN stage. This top therefore brings out
// the ports of each stage side by side and contains no glue between them;
// all three share the clock and the active-low reset.
//
//   encoder:  enc_cfg_* boundary table, enc_s_* sample in, enc_m_* index out
//   card:     h_* memory-mapped host port, irq
//   k-NN:     knn_* test sample, candidate stream and decision
//
// Defaults: the card as in presence_top (4 x 32-bit SATSUMs, 2^20 rows of
// 128 bits); 16 features of 16 bits, 16 bins, one-hot component codes;
// K = 5 nearest neighbours, 5-bit class labels.
module cmm_classifier_top
  import presence_pkg::*;
#(
  parameter int unsigned R_DEV = 4,
  parameter int unsigned WM_AW = 20,
  parameter int unsigned D     = 16,
  parameter int unsigned NB    = 16,
  parameter int unsigned CB    = 1,
  parameter int unsigned XW    = 16,
  parameter int unsigned K     = 5,
  parameter int unsigned CLS_W = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // RU encoder
  input  logic                 enc_cfg_we,
  input  logic [$clog2(D)-1:0] enc_cfg_dim,
  input  logic [$clog2(NB)-1:0] enc_cfg_bin,
  input  logic [XW-1:0]        enc_cfg_data,
  input  logic                 enc_s_valid,
  output logic                 enc_s_ready,
  input  logic [D-1:0][XW-1:0] enc_s_x,
  output logic                 enc_m_valid,
  input  logic                 enc_m_ready,
  output logic [WORD_W-1:0]    enc_m_index,
  output logic                 enc_m_last,
  // PRESENCE card host port
  input  logic                 h_req,
  input  logic                 h_we,
  input  logic [HA_W-1:0]      h_addr,
  input  logic [WORD_W-1:0]    h_wdata,
  output logic [WORD_W-1:0]    h_rdata,
  output logic                 h_rvalid,
  output logic                 irq,
  // k-NN stage
  input  logic                 knn_start,
  input  logic [D-1:0][XW-1:0] knn_t_x,
  input  logic                 knn_c_valid,
  input  logic [D-1:0][XW-1:0] knn_c_x,
  input  logic [CLS_W-1:0]     knn_c_class,
  input  logic                 knn_finish,
  output logic                 knn_out_valid,
  output logic [CLS_W-1:0]     knn_out_class,
  output logic                 knn_out_none,
  output logic [15:0]          knn_n_cand
);

  ru_encoder #(.D(D), .NB(NB), .CB(CB), .XW(XW), .IW(WORD_W)) u_enc (
    .clk, .rst_n,
    .cfg_we (enc_cfg_we), .cfg_dim (enc_cfg_dim), .cfg_bin (enc_cfg_bin),
    .cfg_data (enc_cfg_data),
    .s_valid (enc_s_valid), .s_ready (enc_s_ready), .s_x (enc_s_x),
    .m_valid (enc_m_valid), .m_ready (enc_m_ready), .m_index (enc_m_index),
    .m_last (enc_m_last)
  );

  presence_top #(.R_DEV(R_DEV), .WM_AW(WM_AW)) u_card (
    .clk, .rst_n,
    .h_req, .h_we, .h_addr, .h_wdata, .h_rdata, .h_rvalid, .irq
  );

  knn_classifier #(.D(D), .XW(XW), .K(K), .CLS_W(CLS_W), .NC_W(16)) u_knn (
    .clk, .rst_n,
    .start (knn_start), .t_x (knn_t_x),
    .c_valid (knn_c_valid), .c_x (knn_c_x), .c_class (knn_c_class),
    .finish (knn_finish),
    .out_valid (knn_out_valid), .out_class (knn_out_class),
    .out_none (knn_out_none), .n_cand (knn_n_cand)
  );

endmodule
