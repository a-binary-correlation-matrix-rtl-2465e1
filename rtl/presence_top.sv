// presence_top -- the PRESENCE card: a hardware engine for binary
// Correlation Matrix Memories (CMMs), used as the match stage of a CMM k-NN
// classifier.
//
// The host writes an operation (control block) and an input pattern given as
// index values (input block) into one of the two buffer memory areas, then
// writes the start command. SATCON reads the control block, streams the index
// values through its address pipeline into the weights memory, and the R
// SATSUM devices (LANE_W bits each, working in SIMD) accumulate the selected
// rows and threshold the sums. The thresholded separator bits are written to
// the area's output block and the interrupt is raised. While the card works
// on one area the host can prepare the other.
//
//   host --> bus_interface --> buffer_memory (2 areas) <--> satcon
//                                                           |  |
//                              weight_memory <--------------+  |
//                                   |  rows (R x LANE_W)       | cmd, mask
//                                   +--> satsum x R <----------+
//
// Interface: clk (one system cycle: 50 ns on the VME card, i.e. one
// 128-bit row accumulated per 50 ns), active-low asynchronous reset, the
// synchronous host access port of bus_interface and the interrupt.
//
// Defaults follow the VME card of the description: 4 SATSUM devices of 32
// bits (128-bit rows) and 16 MByte of weights memory (2^20 rows).
module presence_top
  import presence_pkg::*;
#(
  parameter int unsigned R_DEV = 4,
  parameter int unsigned WM_AW = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              h_req,
  input  logic              h_we,
  input  logic [HA_W-1:0]   h_addr,
  input  logic [WORD_W-1:0] h_wdata,
  output logic [WORD_W-1:0] h_rdata,
  output logic              h_rvalid,
  output logic              irq
);

  localparam int unsigned ROW_W = R_DEV * LANE_W;
  localparam int unsigned GC_W  = $clog2(LANE_W + 1);

  // bus interface <-> buffer memory
  logic              b_en, b_we, b_area, b_conflict;
  region_e           b_region;
  logic [OFF_AW-1:0] b_off;
  logic [WORD_W-1:0] b_wdata, b_rdata;
  // bus interface <-> SATCON
  logic              start, start_area, busy, done, card_area;
  // SATCON <-> buffer memory
  logic              c_en, c_we;
  region_e           c_region;
  logic [OFF_AW-1:0] c_off;
  logic [WORD_W-1:0] c_wdata, c_rdata;
  // weights memory
  logic [WM_AW-1:0]  wm_addr;
  logic              wm_we;
  logic [ROW_W-1:0]  wm_wdata, wm_rdata;
  // SATSUM array
  satsum_cmd_t             cmd;
  logic [ROW_W-1:0]        mask, result;
  logic [R_DEV*GC_W-1:0]   ge_count;

  bus_interface u_bus (
    .clk, .rst_n,
    .h_req, .h_we, .h_addr, .h_wdata, .h_rdata, .h_rvalid, .irq,
    .b_en, .b_we, .b_area, .b_region, .b_off, .b_wdata, .b_rdata, .b_conflict,
    .start, .start_area, .busy, .done, .card_area
  );

  buffer_memory u_buf (
    .clk, .rst_n,
    .h_en (b_en), .h_we (b_we), .h_area (b_area), .h_region (b_region),
    .h_off (b_off), .h_wdata (b_wdata), .h_rdata (b_rdata),
    .host_conflict (b_conflict),
    .card_active (busy), .card_area (card_area),
    .c_en, .c_we, .c_region, .c_off, .c_wdata, .c_rdata
  );

  satcon #(.R(R_DEV), .WM_AW(WM_AW)) u_satcon (
    .clk, .rst_n,
    .start, .start_area, .busy, .done, .card_area,
    .c_en, .c_we, .c_region, .c_off, .c_wdata, .c_rdata,
    .wm_addr, .wm_we,
    .cmd, .mask, .result, .ge_count
  );

  for (genvar r = 0; r < R_DEV; r++) begin : g_satsum
    satsum u_satsum (
      .clk, .rst_n,
      .cmd      (cmd),
      .rdata    (wm_rdata[r*LANE_W +: LANE_W]),
      .mask     (mask[r*LANE_W +: LANE_W]),
      .wdata    (wm_wdata[r*LANE_W +: LANE_W]),
      .result   (result[r*LANE_W +: LANE_W]),
      .ge_count (ge_count[r*GC_W +: GC_W])
    );
  end

  weight_memory #(.AW(WM_AW), .DW(ROW_W)) u_wmem (
    .clk,
    .addr  (wm_addr),
    .we    (wm_we),
    .wdata (wm_wdata),
    .rdata (wm_rdata)
  );

endmodule
