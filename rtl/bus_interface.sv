// bus_interface -- host side of the PRESENCE card.
//
// The card is a memory-mapped device that reports the end of each operation
// with an interrupt. This block decodes a simple synchronous host access
// (the on-card side of the host bus adapter) into:
//
//   h_addr[HA_W-1] = 0 : buffer memory,
//                        h_addr = {0, area, region[1:0], offset[OFF_AW-1:0]}
//   h_addr[HA_W-1] = 1 : card registers, h_addr[1:0] selects
//     R_CMD    (write) bit0 = start, bit1 = buffer area to process
//     R_STATUS (read)  bit0 busy, bit1 interrupt pending, bit2 area in use,
//                      bit3 start refused (card was busy), bit4 host access
//                      refused (area in use by the card), [31:16] number of
//                      completed operations
//     R_IRQACK (write) bit0 = 1 clears the pending interrupt,
//                      bit1 = 1 clears the two refusal flags
//     R_IRQEN  (r/w)   bit0 = interrupt enable (reset value 1)
//
// Timing: h_req/h_we/h_addr/h_wdata are sampled on a clock edge; read data
// is returned with h_rvalid one clock later, for both spaces. A start
// written while the card is busy is refused and flagged. irq is high while
// an interrupt is pending and enabled.
//
// From the description: memory-mapped card, interrupts confirming the end of
// each operation, two buffer areas. The VME/PCI bus signalling itself is a
// standard bus adapter and is not part of this block; the register map is
// this design's own.
module bus_interface
  import presence_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host access
  input  logic              h_req,
  input  logic              h_we,
  input  logic [HA_W-1:0]   h_addr,
  input  logic [WORD_W-1:0] h_wdata,
  output logic [WORD_W-1:0] h_rdata,
  output logic              h_rvalid,
  output logic              irq,
  // buffer memory host port
  output logic              b_en,
  output logic              b_we,
  output logic              b_area,
  output region_e           b_region,
  output logic [OFF_AW-1:0] b_off,
  output logic [WORD_W-1:0] b_wdata,
  input  logic [WORD_W-1:0] b_rdata,
  input  logic              b_conflict,
  // SATCON
  output logic              start,
  output logic              start_area,
  input  logic              busy,
  input  logic              done,
  input  logic              card_area
);

  logic        is_reg;
  logic [1:0]  reg_sel;
  logic        irq_pend, irq_en, err_start, err_conflict;
  logic [15:0] n_done;
  logic        rd_reg_q;
  logic [WORD_W-1:0] reg_rdata_q;

  assign is_reg   = h_addr[HA_W-1];
  assign reg_sel  = h_addr[1:0];

  assign b_en     = h_req && !is_reg;
  assign b_we     = h_we;
  assign b_area   = h_addr[HA_W-2];
  assign b_region = region_e'(h_addr[HA_W-3:HA_W-4]);
  assign b_off    = h_addr[OFF_AW-1:0];
  assign b_wdata  = h_wdata;

  logic wr_reg;
  assign wr_reg     = h_req && h_we && is_reg;
  assign start      = wr_reg && (32'(reg_sel) == R_CMD) && h_wdata[0] && !busy;
  assign start_area = h_wdata[1];

  logic [WORD_W-1:0] status;
  assign status = {n_done, 11'd0, err_conflict, err_start, card_area, irq_pend, busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_pend     <= 1'b0;
      irq_en       <= 1'b1;
      err_start    <= 1'b0;
      err_conflict <= 1'b0;
      n_done       <= '0;
      h_rvalid     <= 1'b0;
      rd_reg_q     <= 1'b0;
      reg_rdata_q  <= '0;
    end else begin
      h_rvalid <= h_req && !h_we;
      if (h_req && !h_we) begin
        rd_reg_q <= is_reg;
        unique case (32'(reg_sel))
          R_STATUS: reg_rdata_q <= status;
          R_IRQEN:  reg_rdata_q <= WORD_W'(irq_en);
          default:  reg_rdata_q <= '0;
        endcase
      end
      if (done) begin
        irq_pend <= 1'b1;
        n_done   <= n_done + 1'b1;
      end
      if (b_conflict) err_conflict <= 1'b1;
      if (wr_reg) begin
        unique case (32'(reg_sel))
          R_CMD:    if (h_wdata[0] && busy) err_start <= 1'b1;
          R_IRQACK: begin
            if (h_wdata[0] && !done) irq_pend <= 1'b0;
            if (h_wdata[1]) begin
              err_start    <= 1'b0;
              err_conflict <= b_conflict;
            end
          end
          R_IRQEN:  irq_en <= h_wdata[0];
          default: ;
        endcase
      end
    end
  end

  assign h_rdata = rd_reg_q ? reg_rdata_q : b_rdata;
  assign irq     = irq_pend && irq_en;

endmodule
