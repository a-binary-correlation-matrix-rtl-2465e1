// ru_encoder -- robust uniform (RU) encoder of the CMM classifier: turns a
// D-dimensional numerical sample into the index values of a sparse binary
// CMM input vector.
//
// Each feature x_d is quantised against the NB-1 right bin boundaries of its
// dimension: bin = number of boundaries strictly below x_d (a value equal to
// a boundary belongs to that boundary's bin). The bin selects a sparse code
// c_d of NB*CB bits with CB consecutive bits set (CB = 1 gives a one-hot,
// fully orthogonal code), and the D codes are concatenated into the input
// vector p. The encoder does not produce p itself but the index values of
// its set bits, which is the form the card's input block takes:
//   index = d*NB*CB + bin*CB + j,  j = 0..CB-1.
//
// The boundaries are the encoder's parameters. They are produced offline by
// the robust quantisation of the training set (sorting, handling identical
// values, equalising the bin populations) and are written through the cfg
// port: cfg_dim, cfg_bin (0..NB-2) and cfg_data. Boundaries of a dimension
// must be written in ascending order.
//
// Interface and timing: a sample is accepted on s_valid & s_ready. The
// encoder then emits D*CB index values on m_index with m_valid/m_ready, one
// per clock when m_ready is high, dimension 0 first; m_last marks the last
// one. s_ready is high only when the previous sample has been fully emitted.
// The comparison of one feature against its NB-1 boundaries is done in
// parallel in the clock its first index value is presented.
//
// From the description: quantisation into NB bins per dimension with stored
// boundaries, sparse orthogonal codes with 1-3 bits set, concatenation of the
// D codes. The code pattern (CB consecutive bits), the feature width, the
// streaming handshake and running this stage in hardware at all (the design
// description runs it in host software) are this design's own choices.
module ru_encoder #(
  parameter int unsigned D   = 16,   // dimensions (features per sample)
  parameter int unsigned NB  = 16,   // bins per dimension
  parameter int unsigned CB  = 1,    // bits set per component code (1..3)
  parameter int unsigned XW  = 16,   // feature width, unsigned fixed point
  parameter int unsigned IW  = 32    // index value width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // boundary table
  input  logic                     cfg_we,
  input  logic [$clog2(D)-1:0]     cfg_dim,
  input  logic [$clog2(NB)-1:0]    cfg_bin,
  input  logic [XW-1:0]            cfg_data,
  // sample in
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic [D-1:0][XW-1:0]     s_x,
  // index values out
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic [IW-1:0]            m_index,
  output logic                     m_last
);

  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned BW = $clog2(NB + 1);
  localparam int unsigned JW = (CB > 1) ? $clog2(CB) : 1;

  logic [XW-1:0]          bnd [D][NB-1];
  logic [D-1:0][XW-1:0]   x_q;
  logic                   busy;
  logic [DW-1:0]          dim;
  logic [JW-1:0]          j;
  logic [BW-1:0]          bin;

  always_ff @(posedge clk)
    if (cfg_we && 32'(cfg_bin) < NB - 1) bnd[cfg_dim][cfg_bin] <= cfg_data;

  // Quantiser: count the boundaries below the current feature.
  always_comb begin
    bin = '0;
    for (int b = 0; b < NB - 1; b++)
      if (x_q[dim] > bnd[dim][b]) bin = bin + 1'b1;
  end

  assign s_ready = !busy;
  assign m_valid = busy;
  assign m_index = IW'(32'(dim) * NB * CB + 32'(bin) * CB + 32'(j));
  assign m_last  = busy && (32'(dim) == D - 1) && (32'(j) == CB - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      dim  <= '0;
      j    <= '0;
      x_q  <= '0;
    end else if (!busy) begin
      if (s_valid) begin
        x_q  <= s_x;
        busy <= 1'b1;
        dim  <= '0;
        j    <= '0;
      end
    end else if (m_ready) begin
      if (32'(j) == CB - 1) begin
        j <= '0;
        if (32'(dim) == D - 1) busy <= 1'b0;
        else                   dim  <= dim + 1'b1;
      end else begin
        j <= j + 1'b1;
      end
    end
  end

endmodule
