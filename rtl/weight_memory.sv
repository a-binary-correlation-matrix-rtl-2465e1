// weight_memory -- the binary CMM weight store of the card.
//
// One row of DW bits per address; a row holds one LANE_W-bit slice for every
// SATSUM device. The default size is the 16 MByte static RAM of the VME card:
// 2^20 rows of 128 bits. The card reads or writes one whole row per clock
// (one 50 ns system cycle), which is what gives the 128-bit-per-cycle
// accumulation rate.
//
// Interface: a single synchronous port. When we=1 the row at addr is written
// with wdata; otherwise the row at addr is read and appears on rdata on the
// next clock edge (one cycle of read latency). There is no reset: the CMM is
// cleared by the controller's clear operation, as the matrix must hold all
// zeros before any training.
//
// The memory is written as an array so that synthesis can map it to RAM; on
// the real board it is a bank of off-the-shelf SRAM chips, whose own timing
// (20 ns access) is inside one system cycle.
module weight_memory #(
  parameter int unsigned AW = 20,
  parameter int unsigned DW = 128
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
