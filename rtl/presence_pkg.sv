// presence_pkg -- shared types and constants of the PRESENCE binary CMM card.
//
// The card stores a binary Correlation Matrix Memory (CMM) in an external
// weights memory. An input pattern p is handed to the card as a list of
// "index values", one per bit set in p; each index selects one row of the
// matrix. Rows are LANE_W*R_DEV bits wide (one LANE_W-bit slice per SATSUM
// device). A separator wider than one row is processed in several passes
// ("slices"), each over its own band of rows.
//
// Fixed by the design description: 32-bit SATSUM devices, four of them on a
// board (128-bit data path), 16 MByte of weights memory, fixed global and
// L-max thresholding, a double (ping-pong) buffer memory with control, input
// and output blocks. The control block layout, the opcodes, the buffer block
// sizes and the counter width are this design's own choices.
package presence_pkg;

  // ---- data path ---------------------------------------------------------
  localparam int unsigned LANE_W = 32;   // bits per SATSUM device
  localparam int unsigned CNT_W  = 16;   // accumulator (counter) width
  localparam int unsigned WORD_W = 32;   // buffer memory / host word

  // ---- buffer memory layout (per area) -----------------------------------
  localparam int unsigned CTRL_AW = 4;   // 16-word control block
  localparam int unsigned IN_AW   = 13;  // 8192-word input block (index values)
  localparam int unsigned OUT_AW  = 10;  // 1024-word output block
  localparam int unsigned OFF_AW  = 13;  // widest block offset

  typedef enum logic [1:0] {
    REG_CTRL = 2'd0,
    REG_IN   = 2'd1,
    REG_OUT  = 2'd2,
    REG_NONE = 2'd3
  } region_e;

  // ---- control block word offsets ----------------------------------------
  localparam int unsigned CB_OP      = 0;  // operation, see op_e
  localparam int unsigned CB_NIDX    = 1;  // number of input index values N
  localparam int unsigned CB_NSEP    = 2;  // number of separator bit indexes (train)
  localparam int unsigned CB_NSLICE  = 3;  // number of separator slices ceil(S/(32R))
  localparam int unsigned CB_BASE    = 4;  // weights memory offset of slice 0
  localparam int unsigned CB_STRIDE  = 5;  // rows between consecutive slices
  localparam int unsigned CB_THMODE  = 6;  // threshold mode, see thmode_e
  localparam int unsigned CB_THVAL   = 7;  // fixed threshold level, or L for L-max
  localparam int unsigned CB_NWORDS  = 8;  // number of control words read by SATCON

  typedef enum logic [1:0] {
    OP_RECALL = 2'd0,
    OP_TRAIN  = 2'd1,
    OP_CLEAR  = 2'd2
  } op_e;

  typedef enum logic {
    TH_FIXED = 1'b0,
    TH_LMAX  = 1'b1
  } thmode_e;

  // Decoded control block.
  typedef struct packed {
    op_e          op;
    logic [31:0]  n_idx;
    logic [31:0]  n_sep;
    logic [31:0]  n_slice;
    logic [31:0]  base;
    logic [31:0]  stride;
    thmode_e      thmode;
    logic [31:0]  thval;
  } ctrl_block_t;

  // SIMD command broadcast by SATCON to every SATSUM device.
  typedef struct packed {
    logic             acc_clr;  // zero all counters
    logic             acc_en;   // add the weight row slice into the counters
    logic             wr_zero;  // write-back data is all zero (clear op)
    logic [CNT_W-1:0] thr;      // threshold level compared with each counter
  } satsum_cmd_t;

  // ---- host register space (address bit HA_W-1 set) ----------------------
  localparam int unsigned R_CMD    = 0;  // write: bit0 start, bit1 area
  localparam int unsigned R_STATUS = 1;  // read: see bus_interface
  localparam int unsigned R_IRQACK = 2;  // write 1 to bit0 clears the interrupt
  localparam int unsigned R_IRQEN  = 3;  // bit0 interrupt enable

  // Host address: {space, area, region[1:0], offset[OFF_AW-1:0]}
  localparam int unsigned HA_W = OFF_AW + 4;

endpackage
