// buffer_memory -- the double buffer between the host bus and the card.
//
// Two identical memory areas (buffer_bank), each holding a control block, an
// input block and an output block. While the card works on one area the host
// can fill the other with the next operation and read back the previous
// results, so bus transfers overlap with processing.
//
// Ownership: while card_active is high the area card_area belongs to the
// card port; every other area belongs to the host port. When the card is
// idle the host owns both areas. A host access to the area the card owns is
// refused: a write is dropped, a read returns zero, and host_conflict pulses
// in the cycle of the access so the bus interface can record it.
//
// Timing: both ports are synchronous with one cycle of read latency. The two
// ports can be active in the same cycle because they always address
// different areas.
//
// From the description: two areas, each with control, input and output
// blocks, one used by the external bus while the other is used by the card.
// The refusal rule for conflicting host accesses is this design's choice.
module buffer_memory
  import presence_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host port
  input  logic              h_en,
  input  logic              h_we,
  input  logic              h_area,
  input  region_e           h_region,
  input  logic [OFF_AW-1:0] h_off,
  input  logic [WORD_W-1:0] h_wdata,
  output logic [WORD_W-1:0] h_rdata,
  output logic              host_conflict,
  // card port
  input  logic              card_active,
  input  logic              card_area,
  input  logic              c_en,
  input  logic              c_we,
  input  region_e           c_region,
  input  logic [OFF_AW-1:0] c_off,
  input  logic [WORD_W-1:0] c_wdata,
  output logic [WORD_W-1:0] c_rdata
);

  logic              b_en    [2];
  logic              b_we    [2];
  region_e           b_reg   [2];
  logic [OFF_AW-1:0] b_off   [2];
  logic [WORD_W-1:0] b_wdata [2];
  logic [WORD_W-1:0] b_rdata [2];

  logic host_blocked;
  assign host_blocked  = card_active && (h_area == card_area);
  assign host_conflict = h_en && host_blocked;

  for (genvar k = 0; k < 2; k++) begin : g_area
    logic card_owns;
    assign card_owns = card_active && (card_area == 1'(k));

    always_comb begin
      if (card_owns) begin
        b_en[k]    = c_en;
        b_we[k]    = c_we;
        b_reg[k]   = c_region;
        b_off[k]   = c_off;
        b_wdata[k] = c_wdata;
      end else begin
        b_en[k]    = h_en && (h_area == 1'(k));
        b_we[k]    = h_we;
        b_reg[k]   = h_region;
        b_off[k]   = h_off;
        b_wdata[k] = h_wdata;
      end
    end

    buffer_bank u_bank (
      .clk    (clk),
      .en     (b_en[k]),
      .we     (b_we[k]),
      .region (b_reg[k]),
      .off    (b_off[k]),
      .wdata  (b_wdata[k]),
      .rdata  (b_rdata[k])
    );
  end

  // Remember which area answers each read and whether the host was refused.
  logic h_area_q, h_blocked_q, c_area_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_area_q    <= 1'b0;
      h_blocked_q <= 1'b0;
      c_area_q    <= 1'b0;
    end else begin
      if (h_en) begin
        h_area_q    <= h_area;
        h_blocked_q <= host_blocked;
      end
      if (c_en) c_area_q <= card_area;
    end
  end

  assign h_rdata = h_blocked_q ? '0 : b_rdata[h_area_q];
  assign c_rdata = b_rdata[c_area_q];

endmodule
