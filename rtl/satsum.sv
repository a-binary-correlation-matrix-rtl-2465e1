// satsum -- one SATSUM device: a LANE_W-bit slice of the CMM accumulator
// array with its thresholding logic.
//
// Recall: every cycle in which SATCON asserts cmd.acc_en, the LANE_W-bit
// weight row slice on rdata is added into LANE_W counters, one counter per
// separator bit (counter i is incremented when rdata[i] is 1). Counting the
// rows selected by the index values of a pattern p this way computes the
// column sums v = M p^T of the matrix. cmd.acc_clr zeroes the counters
// before a new slice. Counters saturate at their maximum value.
//
// Thresholding: result[i] = (counter[i] >= cmd.thr). SATCON broadcasts the
// same level to every device, which implements fixed global thresholding
// directly. For L-max thresholding SATCON searches for the level: ge_count is
// the number of counters at or above cmd.thr in this device, and SATCON adds
// the counts of all devices.
//
// Training: the weight row slice read from memory is ORed with this device's
// slice of the separator (mask) and offered back on wdata for the
// read-modify-write of M = M OR s^T p. cmd.wr_zero makes wdata all zero, used
// to clear the matrix.
//
// Timing: counters update on the clock edge at which acc_en/acc_clr are
// sampled; result, ge_count and wdata are combinational from the counters,
// rdata, mask and cmd. One row per clock: the design's 50 ns system cycle.
//
// Follows the description: 32-bit devices used side by side in SIMD, counters
// plus thresholding in the same device, fixed and L-max thresholding. The
// saturation, the counter width and the split of the L-max search between
// SATSUM (counting) and SATCON (searching) are this design's choices.
module satsum
  import presence_pkg::*;
#(
  parameter int unsigned W  = LANE_W,
  parameter int unsigned CW = CNT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  satsum_cmd_t           cmd,
  input  logic [W-1:0]          rdata,
  input  logic [W-1:0]          mask,
  output logic [W-1:0]          wdata,
  output logic [W-1:0]          result,
  output logic [$clog2(W+1)-1:0] ge_count
);

  logic [CW-1:0] acc [W];
  logic [CW-1:0] thr;

  // Counter width is set by the package; the broadcast level is CNT_W wide.
  assign thr = CW'(cmd.thr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) acc[i] <= '0;
    end else if (cmd.acc_clr) begin
      for (int i = 0; i < W; i++) acc[i] <= '0;
    end else if (cmd.acc_en) begin
      for (int i = 0; i < W; i++)
        if (rdata[i] && acc[i] != {CW{1'b1}}) acc[i] <= acc[i] + 1'b1;
    end
  end

  always_comb begin
    ge_count = '0;
    for (int i = 0; i < W; i++) begin
      result[i] = (acc[i] >= thr);
      ge_count  = ge_count + $clog2(W+1)'(result[i]);
    end
  end

  assign wdata = cmd.wr_zero ? '0 : (rdata | mask);

endmodule
