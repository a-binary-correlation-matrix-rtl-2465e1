// buffer_bank -- one memory area of the buffer memory: a control block, an
// input block (index values) and an output block (thresholded results).
//
// A single synchronous port serves the whole area; region selects the
// block and off the word in it. Reads have one cycle of latency (rdata is
// valid on the clock after en=1, we=0); writes take effect at the clock
// edge. Offsets beyond a block's size wrap inside the block. Reading region
// REG_NONE returns zero. The block sizes come from presence_pkg and are this
// design's choice; the description gives only the three-block structure.
module buffer_bank
  import presence_pkg::*;
(
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  region_e           region,
  input  logic [OFF_AW-1:0] off,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] ctrl_mem [2**CTRL_AW];
  logic [WORD_W-1:0] in_mem   [2**IN_AW];
  logic [WORD_W-1:0] out_mem  [2**OUT_AW];

  logic [CTRL_AW-1:0] a_ctrl;
  logic [IN_AW-1:0]   a_in;
  logic [OUT_AW-1:0]  a_out;

  assign a_ctrl = off[CTRL_AW-1:0];
  assign a_in   = off[IN_AW-1:0];
  assign a_out  = off[OUT_AW-1:0];

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (region)
        REG_CTRL: if (we) ctrl_mem[a_ctrl] <= wdata; else rdata <= ctrl_mem[a_ctrl];
        REG_IN:   if (we) in_mem[a_in]     <= wdata; else rdata <= in_mem[a_in];
        REG_OUT:  if (we) out_mem[a_out]   <= wdata; else rdata <= out_mem[a_out];
        default:  if (!we) rdata <= '0;
      endcase
    end
  end

endmodule
