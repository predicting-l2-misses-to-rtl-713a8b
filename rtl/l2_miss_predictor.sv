// l2_miss_predictor: perceptron predictor of whether a load will miss in L2.
//
// It is looked up with the PC of each load early in the pipeline, so the
// prediction is known by the time the load is renamed. A 1-bit-per-entry
// filter table (FILTER_BITS entries, indexed by PC) first tells whether the
// static load has ever missed L2; loads that never did are predicted to hit
// and do not touch the perceptron. The others index a table of ENTRIES
// perceptrons, each with a bias weight and one weight per history bit
// (WBITS-bit signed, saturating). The output y = w0 + sum(+-w_i), with +w_i
// when history bit i records a miss, predicts a miss when y >= 0.
//
// History: an 11-bit global history register (bit 0 = newest) is shifted
// speculatively with every perceptron prediction. Each prediction gets a
// sequence number; when a load's real outcome is known and differs from its
// prediction, the corresponding history bit is corrected in place if it is
// still in the register. A checkpoint output (history plus sequence number)
// lets the front end restore the register after a branch misprediction.
// Training happens at commit: the filter bit of a load that missed is set,
// and loads whose filter bit is set train their perceptron with the history
// they were predicted with, when the prediction was wrong or |y| <= THETA.
//
// Timing: up to LW lookups per cycle (a lane sees the history shifted by the
// lower lanes); their predictions are registered and appear one cycle later
// on rsp_*. Corrections, restores and training take effect at the clock
// edge; a restore discards the lookups of the same cycle.
//
// Follows the document: perceptron with 256 entries, 11-bit history, 7-bit
// counters, 2Kbit filter, speculative history with correction, training at
// commit only with loads that have missed L2. Choices of this design: PC bits
// [.. :2] as indices, THETA = floor(1.93*11 + 14) (the usual perceptron
// threshold), predict miss on y >= 0, one training and one correction port.
module l2_miss_predictor
  import l2p_pkg::*;
#(
  parameter int unsigned ENTRIES     = 256,
  parameter int unsigned FILTER_BITS = 2048,
  parameter int unsigned LW          = 4,
  parameter int          THETA       = 35
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup, one lane per fetched instruction slot
  input  logic [LW-1:0]   lk_valid,
  input  logic [PC_W-1:0] lk_pc   [LW],
  output logic [LW-1:0]   rsp_valid,
  output pred_t           rsp_pred [LW],
  // history correction when a load's L2 outcome is known
  input  logic            corr_valid,
  input  pred_t           corr_pred,
  input  logic            corr_miss,
  // branch checkpoint / restore of the history register
  output logic [GHR_LEN-1:0] ckpt_ghr,
  output logic [PSEQ_W-1:0]  ckpt_seq,
  input  logic               restore_valid,
  input  logic [GHR_LEN-1:0] restore_ghr,
  input  logic [PSEQ_W-1:0]  restore_seq,
  // training at commit
  input  logic            tr_valid,
  input  logic [PC_W-1:0] tr_pc,
  input  pred_t           tr_pred,
  input  logic            tr_miss
);

  localparam int unsigned NW    = GHR_LEN + 1;
  localparam int unsigned PIDXW = $clog2(ENTRIES);
  localparam int unsigned FIDXW = $clog2(FILTER_BITS);
  localparam int          WMAX  = (1 << (WCNT_W - 1)) - 1;
  localparam int          WMIN  = -(1 << (WCNT_W - 1));

  typedef logic signed [WCNT_W-1:0] wgt_t;

  wgt_t                 w_q   [ENTRIES][NW];
  logic [FILTER_BITS-1:0] filt_q;
  logic [GHR_LEN-1:0]   ghr_q;
  logic [PSEQ_W-1:0]    seq_q;

  assign ckpt_ghr = ghr_q;
  assign ckpt_seq = seq_q;

  function automatic logic [PIDXW-1:0] pidx(input logic [PC_W-1:0] pc);
    return pc[2 +: PIDXW];
  endfunction

  function automatic logic [FIDXW-1:0] fidx(input logic [PC_W-1:0] pc);
    return pc[2 +: FIDXW];
  endfunction

  // perceptron output for one table row and one history
  function automatic int perceptron_y(input logic [PIDXW-1:0] row, input logic [GHR_LEN-1:0] h);
    int y;
    y = int'(w_q[row][0]);
    for (int i = 0; i < GHR_LEN; i++) begin
      if (h[i]) y += int'(w_q[row][i+1]);
      else      y -= int'(w_q[row][i+1]);
    end
    return y;
  endfunction

  // ---------------------------------------------------------------- lookup
  pred_t              lk_pred  [LW];
  logic [GHR_LEN-1:0] ghr_after;
  logic [PSEQ_W-1:0]  seq_after;

  always_comb begin
    logic [GHR_LEN-1:0] h;
    logic [PSEQ_W-1:0]  s;
    h = ghr_q;
    s = seq_q;
    for (int unsigned l = 0; l < LW; l++) begin
      lk_pred[l] = '0;
      lk_pred[l].ghr = h;
      lk_pred[l].seq = s;
      if (lk_valid[l] && filt_q[fidx(lk_pc[l])]) begin
        lk_pred[l].used = 1'b1;
        lk_pred[l].miss = (perceptron_y(pidx(lk_pc[l]), h) >= 0);
        h = {h[GHR_LEN-2:0], lk_pred[l].miss};
        s = s + 1'b1;
      end
    end
    ghr_after = h;
    seq_after = s;
  end

  // ------------------------------------------------------------ correction
  logic [GHR_LEN-1:0] ghr_next;
  always_comb begin
    logic [PSEQ_W-1:0] hpos;
    ghr_next = ghr_after;
    hpos = seq_after - corr_pred.seq - 1'b1;   // 0 = newest bit
    if (corr_valid && corr_pred.used && (corr_pred.miss != corr_miss) &&
        (int'(hpos) < GHR_LEN)) begin
      ghr_next[hpos[$clog2(GHR_LEN)-1:0]] = corr_miss;
    end
  end

  // -------------------------------------------------------------- training
  logic [PIDXW-1:0] tr_row;
  logic             tr_do;
  int               tr_y;
  assign tr_row = pidx(tr_pc);
  assign tr_y   = perceptron_y(tr_row, tr_pred.ghr);
  assign tr_do  = tr_valid && (filt_q[fidx(tr_pc)] || tr_miss) &&
                  (((tr_y >= 0) != tr_miss) || (tr_y <= THETA && tr_y >= -THETA));

  function automatic wgt_t sat_step(input wgt_t w, input logic up);
    if (up) return (int'(w) >= WMAX) ? w : w + wgt_t'(1);
    else    return (int'(w) <= WMIN) ? w : w - wgt_t'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < ENTRIES; e++)
        for (int unsigned i = 0; i < NW; i++) w_q[e][i] <= '0;
      filt_q    <= '0;
      ghr_q     <= '0;
      seq_q     <= '0;
      rsp_valid <= '0;
      for (int unsigned l = 0; l < LW; l++) rsp_pred[l] <= '0;
    end else begin
      if (restore_valid) begin
        ghr_q     <= restore_ghr;
        seq_q     <= restore_seq;
        rsp_valid <= '0;
      end else begin
        ghr_q     <= ghr_next;
        seq_q     <= seq_after;
        rsp_valid <= lk_valid;
      end
      for (int unsigned l = 0; l < LW; l++) rsp_pred[l] <= lk_pred[l];
      if (tr_valid && tr_miss) filt_q[fidx(tr_pc)] <= 1'b1;
      if (tr_do) begin
        w_q[tr_row][0] <= sat_step(w_q[tr_row][0], tr_miss);
        for (int unsigned i = 0; i < GHR_LEN; i++)
          w_q[tr_row][i+1] <= sat_step(w_q[tr_row][i+1], tr_miss == tr_pred.ghr[i]);
      end
    end
  end

endmodule
