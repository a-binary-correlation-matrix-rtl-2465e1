// satcon -- SATCON, the control unit of the PRESENCE card.
//
// On a start pulse SATCON takes the buffer memory area start_area, reads its
// control block and carries out one operation on the binary CMM:
//
//   OP_RECALL  for each separator slice: clear the SATSUM counters, stream the
//              N index values of the input block through the address pipeline
//              so that every selected weight row is added into the counters
//              (one row per clock), threshold the counts (fixed level, or the
//              L-max level found by a search), and write the R thresholded
//              LANE_W-bit words of the slice to the output block.
//   OP_TRAIN   for each separator slice: read the separator's bit indexes
//              from the input block (stored after the N input index values)
//              and build this slice's separator mask, then stream the N index
//              values and read-modify-write each selected row as row | mask,
//              which is the one-shot CMM learning rule M = M OR s^T p.
//   OP_CLEAR   write zero to N consecutive rows from BASE (the CMM must start
//              with all elements 0).
//
// Address pipeline (five stages, one index value per clock in recall):
//   1 index value count      icnt addresses the input block
//   2 latch address into the buffer memory (its synchronous read)
//   3 add the index value to the memory offset (BASE + slice*STRIDE)
//   4 latch the result of the index calculation (addr_q)
//   5 access the weights memory with the address (its synchronous read)
// An index value issued in stage 1 in clock c is added into the counters at
// the end of clock c+3 (acc_en high in clock c+3). In training an index
// value is issued every second clock so that the write of one row never
// collides with the read of the next on the single-port weights memory.
//
// Timing: start is sampled in IDLE; busy stays high until the cycle after
// the last write; done pulses for one clock when the operation completes.
// Recall of N index values over K slices with fixed thresholding takes
// 12 + K*(N + 6 + R) clocks from the clock edge that samples start to the
// first edge at which done is seen high (L-max adds CNT_W clocks per slice); with the
// interrupt register of the bus interface the host sees the end after
// 13 + K*(N + 6 + R) clocks, within the bound T/C = 23 + K*(N + 38 + 2R)
// given for the original card. Each index value costs one clock in recall
// and two in training.
//
// From the description: control block read by the control unit, index values
// one per set input bit, the five pipeline stages, SIMD control of R SATSUMs,
// separator processed in slices of 32R bits, fixed and L-max thresholding,
// completion reported to the host. The control block layout, the separator
// format for training, the clear operation, per-slice L-max and the bitwise
// L-max level search are this design's choices.
module satcon
  import presence_pkg::*;
#(
  parameter int unsigned R     = 4,
  parameter int unsigned WM_AW = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command from the bus interface
  input  logic                      start,
  input  logic                      start_area,
  output logic                      busy,
  output logic                      done,
  output logic                      card_area,
  // card port of the buffer memory
  output logic                      c_en,
  output logic                      c_we,
  output region_e                   c_region,
  output logic [OFF_AW-1:0]         c_off,
  output logic [WORD_W-1:0]         c_wdata,
  input  logic [WORD_W-1:0]         c_rdata,
  // weights memory address and write strobe (data comes from the SATSUMs)
  output logic [WM_AW-1:0]          wm_addr,
  output logic                      wm_we,
  // SIMD control of the SATSUM devices
  output satsum_cmd_t               cmd,
  output logic [R*LANE_W-1:0]       mask,
  input  logic [R*LANE_W-1:0]       result,
  input  logic [R*$clog2(LANE_W+1)-1:0] ge_count
);

  localparam int unsigned ROW_W = R * LANE_W;
  localparam int unsigned GC_W  = $clog2(LANE_W + 1);
  localparam int unsigned TOT_W = $clog2(ROW_W + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_CTRL, S_DISPATCH, S_CLEAR, S_SLICE, S_SEP, S_STREAM,
    S_LMAX, S_OUT, S_NEXT, S_FINISH
  } state_e;

  state_e      state;
  ctrl_block_t cb;
  logic        cb_area;     // buffer memory area being worked on

  logic [31:0]       ccnt;        // control words issued / rows cleared
  logic              cap_v;       // a control word read is returning
  logic [CTRL_AW-1:0] cap_k;
  logic [31:0]       slice;       // current separator slice
  logic [31:0]       slice_off;   // BASE + slice*STRIDE
  logic [31:0]       icnt;        // stage 1: index values issued
  logic              issued_q;    // training: issued last clock
  logic              v2, v4, v5;  // pipeline valid bits
  logic [WM_AW-1:0]  addr_q;      // stage 4
  logic [WM_AW-1:0]  addr_wb;     // row being read in stage 5 (training write-back)
  logic [31:0]       scnt;        // separator indexes issued
  logic              sep_v;       // a separator index is returning
  logic [CNT_W-1:0]  thr_q;       // chosen threshold level
  logic [CNT_W-1:0]  lm_t;        // L-max search: level found so far
  logic [$clog2(CNT_W+1)-1:0] lm_b; // L-max search: bit under test
  logic [$clog2(R+1)-1:0] ocnt;   // output words written in this slice
  logic [OFF_AW-1:0] out_ptr;
  logic [ROW_W-1:0]  mask_q;

  // ---- combinational helpers ---------------------------------------------
  logic              is_train, is_recall;
  logic              issue;
  logic [CNT_W-1:0]  lm_try;
  logic [TOT_W-1:0]  ge_total;
  logic [31:0]       sep_rel;

  assign is_train  = (cb.op == OP_TRAIN);
  assign is_recall = (cb.op == OP_RECALL);
  assign issue     = (state == S_STREAM) && (icnt < cb.n_idx) && !(is_train && issued_q);
  assign lm_try    = lm_t | (CNT_W'(1) << lm_b);
  assign sep_rel   = c_rdata - slice * ROW_W;

  // L-max: keep the trial level if at least L counters reach it.
  logic [CNT_W-1:0] lm_next;
  assign lm_next = (32'(ge_total) >= cb.thval) ? lm_try : lm_t;

  always_comb begin
    ge_total = '0;
    for (int r = 0; r < R; r++)
      ge_total = ge_total + TOT_W'(ge_count[r*GC_W +: GC_W]);
  end

  // ---- buffer memory card port -------------------------------------------
  always_comb begin
    c_en     = 1'b0;
    c_we     = 1'b0;
    c_region = REG_NONE;
    c_off    = '0;
    c_wdata  = '0;
    unique case (state)
      S_CTRL: begin
        c_en     = (ccnt < CB_NWORDS);
        c_region = REG_CTRL;
        c_off    = OFF_AW'(ccnt);
      end
      S_SEP: begin
        c_en     = (scnt < cb.n_sep);
        c_region = REG_IN;
        c_off    = OFF_AW'(cb.n_idx + scnt);
      end
      S_STREAM: begin
        c_en     = issue;
        c_region = REG_IN;
        c_off    = OFF_AW'(icnt);
      end
      S_OUT: begin
        c_en     = 1'b1;
        c_we     = 1'b1;
        c_region = REG_OUT;
        c_off    = out_ptr;
        c_wdata  = result[ocnt*LANE_W +: LANE_W];
      end
      default: ;
    endcase
  end

  // ---- weights memory and SATSUM control ---------------------------------
  always_comb begin
    wm_addr     = addr_q;
    wm_we       = 1'b0;
    cmd.acc_clr = (state == S_SLICE) && is_recall;
    cmd.acc_en  = (state == S_STREAM) && v5 && is_recall;
    cmd.wr_zero = (state == S_CLEAR);
    cmd.thr     = (state == S_LMAX) ? lm_try : thr_q;
    if (state == S_CLEAR) begin
      wm_addr = WM_AW'(cb.base + ccnt);
      wm_we   = (ccnt < cb.n_idx);
    end else if (state == S_STREAM && v5 && is_train) begin
      wm_addr = addr_wb;
      wm_we   = 1'b1;
    end
  end

  assign mask      = mask_q;
  assign busy      = (state != S_IDLE);
  assign card_area = cb_area;

  // ---- sequencer ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cb        <= '0;
      cb_area   <= 1'b0;
      ccnt      <= '0;
      cap_v     <= 1'b0;
      cap_k     <= '0;
      slice     <= '0;
      slice_off <= '0;
      icnt      <= '0;
      issued_q  <= 1'b0;
      v2        <= 1'b0;
      v4        <= 1'b0;
      v5        <= 1'b0;
      addr_q    <= '0;
      addr_wb   <= '0;
      scnt      <= '0;
      sep_v     <= 1'b0;
      thr_q     <= '0;
      lm_t      <= '0;
      lm_b      <= '0;
      ocnt      <= '0;
      out_ptr   <= '0;
      mask_q    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            cb_area <= start_area;
            ccnt    <= '0;
            cap_v   <= 1'b0;
            state   <= S_CTRL;
          end
        end

        // Read the control block, one word per clock.
        S_CTRL: begin
          if (ccnt < CB_NWORDS) ccnt <= ccnt + 1;
          cap_v <= (ccnt < CB_NWORDS);
          cap_k <= CTRL_AW'(ccnt);
          if (cap_v) begin
            unique case (int'(cap_k))
              CB_OP:     cb.op      <= op_e'(c_rdata[1:0]);
              CB_NIDX:   cb.n_idx   <= c_rdata;
              CB_NSEP:   cb.n_sep   <= c_rdata;
              CB_NSLICE: cb.n_slice <= c_rdata;
              CB_BASE:   cb.base    <= c_rdata;
              CB_STRIDE: cb.stride  <= c_rdata;
              CB_THMODE: cb.thmode  <= thmode_e'(c_rdata[0]);
              CB_THVAL:  cb.thval   <= c_rdata;
              default: ;
            endcase
            if (int'(cap_k) == CB_NWORDS - 1) state <= S_DISPATCH;
          end
        end

        S_DISPATCH: begin
          slice     <= '0;
          slice_off <= cb.base;
          out_ptr   <= '0;
          ccnt      <= '0;
          thr_q     <= CNT_W'(cb.thval);
          if (cb.op == OP_CLEAR)      state <= S_CLEAR;
          else if (cb.n_slice == 0)   state <= S_FINISH;
          else                        state <= S_SLICE;
        end

        S_CLEAR: begin
          if (ccnt < cb.n_idx) ccnt <= ccnt + 1;
          else                 state <= S_FINISH;
        end

        // Start of a slice (recall: counters are cleared in this clock).
        S_SLICE: begin
          icnt     <= '0;
          issued_q <= 1'b0;
          v2       <= 1'b0;
          v4       <= 1'b0;
          v5       <= 1'b0;
          scnt     <= '0;
          sep_v    <= 1'b0;
          mask_q   <= '0;
          state    <= is_train ? S_SEP : S_STREAM;
        end

        // Training: build this slice's separator mask from its bit indexes.
        S_SEP: begin
          if (scnt < cb.n_sep) scnt <= scnt + 1;
          sep_v <= (scnt < cb.n_sep);
          if (sep_v && sep_rel < ROW_W) mask_q[sep_rel[$clog2(ROW_W)-1:0]] <= 1'b1;
          if (sep_v && scnt == cb.n_sep) state <= S_STREAM;
          if (cb.n_sep == 0)             state <= S_STREAM;
        end

        S_STREAM: begin
          // stage 1: index value count
          if (issue) icnt <= icnt + 1;
          issued_q <= issue;
          // stage 2: the buffer memory latches the address (its read)
          v2 <= issue;
          // stages 3 and 4: add the index value to the offset and latch it
          v4 <= v2;
          if (v2) addr_q <= WM_AW'(slice_off + c_rdata);
          // stage 5: the weights memory is read with addr_q
          v5 <= v4;
          if (v4) addr_wb <= addr_q;
          // the SATSUMs accumulate (recall) or the row is written back (train)
          if (icnt == cb.n_idx && !issue && !v2 && !v4 && !v5) begin
            if (is_train) state <= S_NEXT;
            else if (cb.thmode == TH_LMAX) begin
              lm_t  <= '0;
              lm_b  <= ($clog2(CNT_W+1))'(CNT_W - 1);
              state <= S_LMAX;
            end else begin
              ocnt  <= '0;
              state <= S_OUT;
            end
          end
        end

        // L-max: find the largest level t with at least L counters >= t,
        // one bit of t per clock, most significant first.
        S_LMAX: begin
          lm_t <= lm_next;
          if (lm_b == 0) begin
            thr_q <= (lm_next == '0) ? CNT_W'(1) : lm_next;
            ocnt  <= '0;
            state <= S_OUT;
          end else begin
            lm_b <= lm_b - 1'b1;
          end
        end

        // Write the R thresholded words of this slice to the output block.
        S_OUT: begin
          out_ptr <= out_ptr + 1'b1;
          if (ocnt == ($clog2(R+1))'(R - 1)) state <= S_NEXT;
          else                               ocnt  <= ocnt + 1'b1;
        end

        S_NEXT: begin
          slice     <= slice + 1;
          slice_off <= slice_off + cb.stride;
          if (slice + 1 >= cb.n_slice) state <= S_FINISH;
          else                         state <= S_SLICE;
        end

        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
