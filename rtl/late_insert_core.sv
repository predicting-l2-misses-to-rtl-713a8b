// late_insert_core: scheduler of an out-of-order core that delays the insertion
// of instructions dependent on predicted L2 misses into the issue queues.
//
// Loads are looked up early (pl_*) in the L2 hit/miss predictor; the renamed
// group that carries the predictions (rn_*) then passes the Filter. Loads
// predicted to miss enter the issue queue, but their consumers, and the
// consumers of those, are only written to the Instruction Buffer (IB) and
// marked in the L2-dependence vector. When the miss resolves (rs_*), the
// scanner walks the IB from the load and inserts the now independent
// instructions into the issue queues; meanwhile nothing enters the queues
// from Rename. The IB holds every in-flight
// instruction so the same path also serves recovery: the Recovery Buffer
// keeps every issued instruction for RB_LEN cycles in issue order. When a
// load's outcome is reported on rb_ev_* it either drops the dependants (L1
// hit: nothing to do), replays them with issue from the queues stopped (L2
// hit), or takes the load's dependants out of the scheduler (L2 miss that
// was not predicted): they are marked in the IB and in the L2-dependence
// vector and wait for the resolution like the consumers of a predicted miss.
//
// Blocks: l2_miss_predictor, filter_stage, instruction_buffer, ib_scanner,
// two preg_bitvec (the L2-dependence vector, and the register-ready
// scoreboard that gives inserted sources their initial ready bit), the
// issue-queue input multiplexer (Filter or scanner, scanner first), an
// integer and a floating-point issue_queue that share ISSUE_W issue slots
// (integer first), and the recovery_buffer. Register read, execution,
// caches and MSHRs, rename, ROB and branch handling are outside; their
// signals are the ports.
//
// Timing: predictions return one cycle after pl_*; a renamed group is taken
// in the cycle rn_ready is high; issued instructions appear on iss_* in the
// cycle they are selected, replayed groups take the issue slots while
// `replaying` is high; issue_block stops issue from the queues for the
// environment (for example a full execution pipe); wakeups (wk_*) mark
// registers ready at the next edge and wake queue entries in the same
// cycle. A resolution starts a scan the next cycle; an rb_ev_* event is
// taken in the cycle rb_ev_ready is high.
//
// Structure and sizes follow the document (4-wide rename/issue, 8-wide
// commit, 2048-entry IB, two issue queues of 20/30/40 entries, perceptron of
// 256 x 12 7-bit weights with a 2Kbit filter, recovery buffer covering the
// 2 + 2 + 9 cycles from issue to a known L2 hit). The number of physical
// registers (2048 + 64), the wakeup port count and all port protocols are
// choices of this design.
module late_insert_core
  import l2p_pkg::*;
#(
  parameter int unsigned W        = 4,     // fetch/rename width
  parameter int unsigned ISSUE_W  = 4,     // issue width (both queues together)
  parameter int unsigned CW       = 8,     // commit width
  parameter int unsigned IB_DEPTH = 2048,  // = ROB entries
  parameter int unsigned IQ_SIZE  = 20,    // per queue
  parameter int unsigned NPREGS   = 2112,
  parameter int unsigned WK       = 4,     // wakeup broadcast ports
  parameter int unsigned PRED_ENTRIES = 256,
  parameter int unsigned PRED_FILTER  = 2048,
  parameter int unsigned RB_LEN   = 13     // cycles until a load's L2 outcome is known
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // predictor lookup (early in the pipeline)
  input  logic [W-1:0]           pl_valid,
  input  logic [PC_W-1:0]        pl_pc     [W],
  output logic [W-1:0]           pr_valid,
  output pred_t                  pr_pred   [W],
  output logic [GHR_LEN-1:0]     ckpt_ghr,
  output logic [PSEQ_W-1:0]      ckpt_seq,
  input  logic                   restore_valid,
  input  logic [GHR_LEN-1:0]     restore_ghr,
  input  logic [PSEQ_W-1:0]      restore_seq,
  // predictor correction (L2 outcome known) and training (commit)
  input  logic                   corr_valid,
  input  pred_t                  corr_pred,
  input  logic                   corr_miss,
  input  logic                   tr_valid,
  input  logic [PC_W-1:0]        tr_pc,
  input  pred_t                  tr_pred,
  input  logic                   tr_miss,
  // renamed group
  input  logic [W-1:0]           rn_valid,
  input  uop_t                   rn_uop    [W],
  output logic                   rn_ready,
  output ibid_t                  rn_ib_id  [W],
  // issue
  input  logic                   issue_block,
  output logic [ISSUE_W-1:0]     iss_valid,
  output iq_in_t                 iss       [ISSUE_W],
  // wakeup from execution
  input  logic [WK-1:0]          wk_valid,
  input  preg_t                  wk_tag    [WK],
  // resolution (L2 miss resolved, STA executed, STD available, MSHR available)
  input  logic                   rs_valid,
  input  ibid_t                  rs_id,
  input  logic                   rs_dest_v,
  input  preg_t                  rs_dest,
  // load outcome for the Recovery Buffer's re-issue logic
  input  logic                   rb_ev_valid,
  input  rb_ev_t                 rb_ev_kind,
  input  ibid_t                  rb_ev_id,
  output logic                   rb_ev_ready,
  output logic                   replaying,
  // commit and squash
  input  logic [$clog2(CW+1)-1:0] cm_count,
  input  logic                   sq_valid,
  input  ibid_t                  sq_id,
  // status
  output logic                   scan_busy,
  output logic [$clog2(IB_DEPTH+1)-1:0] ib_count,
  output logic [$clog2(IQ_SIZE+1)-1:0]  iq_int_occ,
  output logic [$clog2(IQ_SIZE+1)-1:0]  iq_fp_occ
);

  typedef logic [$clog2(W+1)-1:0] wcnt_t;

  // ------------------------------------------------------------ predictor
  l2_miss_predictor #(.ENTRIES(PRED_ENTRIES), .FILTER_BITS(PRED_FILTER), .LW(W)) u_pred (
    .clk, .rst_n,
    .lk_valid(pl_valid), .lk_pc(pl_pc), .rsp_valid(pr_valid), .rsp_pred(pr_pred),
    .corr_valid, .corr_pred, .corr_miss,
    .ckpt_ghr, .ckpt_seq, .restore_valid, .restore_ghr, .restore_seq,
    .tr_valid, .tr_pc, .tr_pred, .tr_miss
  );

  // instructions taken back by the Recovery Buffer
  logic  ex_valid, ex_wait, ex_dest_v;
  ibid_t ex_id;
  preg_t ex_dest;

  // --------------------------------------------------------- IB and scan
  ibid_t              ib_head, ib_al_id [W], ib_rd_id;
  ibid_t              scan_ins_ids [W];
  logic               ib_al_ready;
  logic [W-1:0]       ib_al_valid, ib_al_wait, ib_rd_valid, ib_rd_wait;
  uop_t               ib_rd_uop [W];
  logic [W-1:0]       scan_ins_valid, flt_ins_valid;
  iq_in_t             scan_ins [W], flt_ins [W];

  instruction_buffer #(.DEPTH(IB_DEPTH), .W(W), .CW(CW)) u_ib (
    .clk, .rst_n,
    .al_valid(ib_al_valid), .al_uop(rn_uop), .al_wait(ib_al_wait), .al_id(ib_al_id),
    .al_ready(ib_al_ready),
    .cm_count, .sq_valid, .sq_id,
    .rd_id(ib_rd_id), .rd_uop(ib_rd_uop), .rd_valid(ib_rd_valid), .rd_wait(ib_rd_wait),
    .clr_valid(scan_ins_valid), .clr_id(scan_ins_ids),
    .set_valid(ex_valid && ex_wait), .set_id(ex_id),
    .head(ib_head), .tail(), .count(ib_count)
  );

  always_comb for (int unsigned i = 0; i < W; i++) scan_ins_ids[i] = scan_ins[i].ib_id;
  assign rn_ib_id = ib_al_id;

  // room in the queues
  wcnt_t room_int, room_fp;

  // L2-dependence vector: ports [resolve, filter x W, scanner x W, recovery]
  localparam int unsigned PNW = 2*W + 2;
  logic [PNW-1:0]   pv_we, pv_wdata;
  preg_t            pv_waddr [PNW];
  preg_t            pv_raddr [4*W];
  logic [4*W-1:0]   pv_rdata;
  preg_t            flt_praddr [2*W], scan_praddr [2*W];
  logic [W-1:0]     flt_pwe, flt_pwd, scan_pwe, scan_pwd;
  preg_t            flt_pwa [W], scan_pwa [W];

  always_comb begin
    pv_we[0] = rs_valid && rs_dest_v; pv_waddr[0] = rs_dest; pv_wdata[0] = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      pv_we[1+i]   = flt_pwe[i];  pv_waddr[1+i]   = flt_pwa[i];  pv_wdata[1+i]   = flt_pwd[i];
      pv_we[1+W+i] = scan_pwe[i]; pv_waddr[1+W+i] = scan_pwa[i]; pv_wdata[1+W+i] = scan_pwd[i];
    end
    pv_we[PNW-1] = ex_valid && ex_dest_v; pv_waddr[PNW-1] = ex_dest; pv_wdata[PNW-1] = 1'b1;
    for (int unsigned i = 0; i < 2*W; i++) begin
      pv_raddr[i]       = flt_praddr[i];
      pv_raddr[2*W + i] = scan_praddr[i];
    end
  end

  preg_bitvec #(.N(NPREGS), .NW(PNW), .NR(4*W), .RST_VAL(1'b0)) u_l2dep (
    .clk, .rst_n, .we(pv_we), .waddr(pv_waddr), .wdata(pv_wdata),
    .raddr(pv_raddr), .rdata(pv_rdata)
  );

  filter_stage #(.W(W)) u_filter (
    .in_valid(rn_valid), .in_uop(rn_uop), .in_ready(rn_ready), .scan_busy,
    .pend_raddr(flt_praddr), .pend_rdata(pv_rdata[2*W-1:0]),
    .pend_we(flt_pwe), .pend_waddr(flt_pwa), .pend_wdata(flt_pwd),
    .ib_ready(ib_al_ready), .ib_id(ib_al_id), .ib_valid(ib_al_valid), .ib_wait(ib_al_wait),
    .room_int, .room_fp, .ins_valid(flt_ins_valid), .ins(flt_ins)
  );

  ib_scanner #(.DEPTH(IB_DEPTH), .W(W), .CW(CW)) u_scan (
    .clk, .rst_n,
    .ev_valid(rs_valid), .ev_id(rs_id),
    .ib_head, .ib_count, .ib_cm_count(cm_count),
    .rd_id(ib_rd_id), .rd_uop(ib_rd_uop), .rd_valid(ib_rd_valid), .rd_wait(ib_rd_wait),
    .pend_raddr(scan_praddr), .pend_rdata(pv_rdata[4*W-1:2*W]),
    .pend_we(scan_pwe), .pend_waddr(scan_pwa), .pend_wdata(scan_pwd),
    .room_int, .room_fp, .ins_valid(scan_ins_valid), .ins(scan_ins), .busy(scan_busy)
  );

  // ------------------------------------------- issue-queue input multiplexer
  logic [W-1:0] mux_valid;
  iq_in_t       mux_ins [W];
  logic         from_rename;
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      mux_valid[i] = scan_busy ? scan_ins_valid[i] : flt_ins_valid[i];
      mux_ins[i]   = scan_busy ? scan_ins[i]       : flt_ins[i];
    end
  end
  assign from_rename = !scan_busy;

  // register-ready scoreboard: rename clears a new destination, wakeup sets
  localparam int unsigned RNW = W + WK;
  logic [RNW-1:0] rt_we, rt_wdata;
  preg_t          rt_waddr [RNW];
  preg_t          rt_raddr [2*W];
  logic [2*W-1:0] rt_rdata;
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      rt_we[i]    = ib_al_valid[i] && rn_uop[i].d_v;
      rt_waddr[i] = rn_uop[i].d;
      rt_wdata[i] = 1'b0;
      rt_raddr[2*i]   = mux_ins[i].uop.s1;
      rt_raddr[2*i+1] = mux_ins[i].uop.s2;
    end
    for (int unsigned k = 0; k < WK; k++) begin
      rt_we[W+k] = wk_valid[k]; rt_waddr[W+k] = wk_tag[k]; rt_wdata[W+k] = 1'b1;
    end
  end

  preg_bitvec #(.N(NPREGS), .NW(RNW), .NR(2*W), .RST_VAL(1'b1)) u_ready (
    .clk, .rst_n, .we(rt_we), .waddr(rt_waddr), .wdata(rt_wdata),
    .raddr(rt_raddr), .rdata(rt_rdata)
  );

  // initial ready bits; a source written by an older instruction of the same
  // renamed group is not ready yet
  logic [W-1:0] ins_r1, ins_r2;
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      ins_r1[i] = rt_rdata[2*i];
      ins_r2[i] = rt_rdata[2*i+1];
      if (from_rename) begin
        for (int unsigned k = 0; k < i; k++) begin
          if (rn_valid[k] && rn_uop[k].d_v) begin
            if (rn_uop[k].d == mux_ins[i].uop.s1) ins_r1[i] = 1'b0;
            if (rn_uop[k].d == mux_ins[i].uop.s2) ins_r2[i] = 1'b0;
          end
        end
      end
    end
  end

  // --------------------------------------------------------- issue queues
  logic [W-1:0] ins_int, ins_fp;
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      ins_int[i] = mux_valid[i] && !mux_ins[i].uop.is_fp;
      ins_fp[i]  = mux_valid[i] &&  mux_ins[i].uop.is_fp;
    end
  end

  typedef logic [$clog2(ISSUE_W+1)-1:0] icnt_t;
  icnt_t              lim_int, lim_fp, n_int;
  logic [ISSUE_W-1:0] iv_int, iv_fp;
  iq_in_t             is_int [ISSUE_W], is_fp [ISSUE_W];

  assign lim_int = (issue_block || replaying) ? '0 : icnt_t'(ISSUE_W);
  assign lim_fp  = (issue_block || replaying) ? '0 : icnt_t'(ISSUE_W) - n_int;

  issue_queue #(.SIZE(IQ_SIZE), .W(W), .IW(ISSUE_W), .WK(WK), .IB_DEPTH(IB_DEPTH)) u_iq_int (
    .clk, .rst_n,
    .ins_valid(ins_int), .ins(mux_ins), .ins_r1, .ins_r2, .room(room_int),
    .wk_valid, .wk_tag,
    .issue_limit(lim_int), .iss_valid(iv_int), .iss(is_int), .iss_count(n_int),
    .sq_valid, .sq_id, .ib_head, .occupancy(iq_int_occ)
  );

  icnt_t n_fp_unused;
  issue_queue #(.SIZE(IQ_SIZE), .W(W), .IW(ISSUE_W), .WK(WK), .IB_DEPTH(IB_DEPTH)) u_iq_fp (
    .clk, .rst_n,
    .ins_valid(ins_fp), .ins(mux_ins), .ins_r1, .ins_r2, .room(room_fp),
    .wk_valid, .wk_tag,
    .issue_limit(lim_fp), .iss_valid(iv_fp), .iss(is_fp), .iss_count(n_fp_unused),
    .sq_valid, .sq_id, .ib_head, .occupancy(iq_fp_occ)
  );

  // merge: integer instructions take the first slots, floating point the
  // rest; a replay from the Recovery Buffer takes the whole issue path
  logic [ISSUE_W-1:0] q_valid, rp_valid;
  iq_in_t             q_iss [ISSUE_W], rp_iss [ISSUE_W];
  always_comb begin
    for (int unsigned j = 0; j < ISSUE_W; j++) begin
      q_valid[j] = 1'b0;
      q_iss[j]   = '0;
      if (j < int'(n_int)) begin
        q_valid[j] = iv_int[j];
        q_iss[j]   = is_int[j];
      end else begin
        q_valid[j] = iv_fp[j - int'(n_int)];
        q_iss[j]   = is_fp[j - int'(n_int)];
      end
      iss_valid[j] = replaying ? rp_valid[j] : q_valid[j];
      iss[j]       = replaying ? rp_iss[j]   : q_iss[j];
    end
  end

  // ------------------------------------------------------- Recovery Buffer
  recovery_buffer #(.IW(ISSUE_W), .LEN(RB_LEN)) u_rb (
    .clk, .rst_n,
    .in_valid(iss_valid), .in(iss),
    .ev_valid(rb_ev_valid), .ev_kind(rb_ev_kind), .ev_id(rb_ev_id), .ev_ready(rb_ev_ready),
    .replaying, .rp_valid, .rp(rp_iss),
    .ex_valid, .ex_id, .ex_wait, .ex_dest_v, .ex_dest
  );

endmodule
