// tb_late_insert_core: end-to-end test of the late-inserting scheduler.
//
// The testbench plays the rest of the processor around the scheduler:
//  * a front end that runs a 16-instruction loop (three loads per iteration,
//    some floating-point operations) and looks each group's loads up in the
//    predictor one cycle before presenting the renamed group;
//  * renaming onto physical registers with a free list;
//  * execution: ALU results after 1 cycle; loads hit in 3 cycles or miss in
//    L2 and return after MISS_LAT cycles, by static PC (one load always
//    misses, one misses every other time, one always hits); wakeups are
//    broadcast on up to four ports per cycle;
//  * the memory side: one load in four of one static load misses L1 and hits
//    L2; it wakes its consumers speculatively after 3 cycles, its data comes
//    after 12, and the Recovery Buffer is told of the L2 hit (rb_ev_*) so it
//    replays the consumers that ran too early; a load that misses L2 without
//    having been predicted to miss is reported as an L2 miss so the Recovery
//    Buffer takes it back (its destination becomes L2-dependent); every load
//    so handled or predicted to miss sends a resolution (rs_*) when its data
//    returns; wrong predictions correct the history (corr_*);
//  * in-order commit, up to 8 per cycle, training the predictor with the
//    committed loads; one checkpoint/restore of the history.
// Checks: an instruction issues again only in a replay and only if its last
// execution read a source not yet produced; a replayed instruction has its
// sources; every instruction commits having executed with its operands, the buffers are empty at
// the end, and each mechanism (prediction of a miss, hold in the IB, scanner
// insertion, go-back of the scanner, rename stalled by the scanner, issue
// queue full, IB full, history correction, filter training, restore, L2 miss
// taken back, replay after an L2 hit) happened at least once.
module tb_late_insert_core;
  import l2p_pkg::*;
  localparam int unsigned W = 4, ISSUE_W = 4, CW = 8, WK = 4;
  localparam int unsigned IB_DEPTH = 64, IQ_SIZE = 8, NPREGS = 256;
  localparam int N_INSTR  = 3000;
  localparam int MISS_LAT = 80;
  localparam int L2_KNOWN = 12;        // cycles from issue until L2 outcome is known
  localparam bit FULL_SIZE = 1'b0;     // the reduced build must also fill the IB

  logic clk = 0, rst_n = 0;
  logic [W-1:0] pl_valid, pr_valid, rn_valid;
  logic [PC_W-1:0] pl_pc [W];
  pred_t pr_pred [W];
  logic [GHR_LEN-1:0] ckpt_ghr, restore_ghr;
  logic [PSEQ_W-1:0] ckpt_seq, restore_seq;
  logic restore_valid, corr_valid, corr_miss, tr_valid, tr_miss;
  pred_t corr_pred, tr_pred;
  logic [PC_W-1:0] tr_pc;
  uop_t rn_uop [W];
  logic rn_ready;
  ibid_t rn_ib_id [W];
  logic issue_block;
  logic [ISSUE_W-1:0] iss_valid;
  iq_in_t iss [ISSUE_W];
  logic [WK-1:0] wk_valid;
  preg_t wk_tag [WK];
  logic rs_valid, rs_dest_v, sq_valid;
  ibid_t rs_id, sq_id;
  preg_t rs_dest;
  logic rb_ev_valid, rb_ev_ready, replaying;
  rb_ev_t rb_ev_kind;
  ibid_t rb_ev_id;
  logic [$clog2(CW+1)-1:0] cm_count;
  logic scan_busy;
  logic [$clog2(IB_DEPTH+1)-1:0] ib_count;
  logic [$clog2(IQ_SIZE+1)-1:0] iq_int_occ, iq_fp_occ;

  late_insert_core #(.W(W), .ISSUE_W(ISSUE_W), .CW(CW), .IB_DEPTH(IB_DEPTH),
                     .IQ_SIZE(IQ_SIZE), .NPREGS(NPREGS), .WK(WK)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%0d FAIL: %s", cyc, what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d, %0d committed, %0d issued", cyc, n_committed, n_issued);
    if (in_fl.size() > 0)
      $display("oldest: ib %0d pc %0d issued %0d ok %b done %0d s1 p%0d@%0d s2 p%0d@%0d",
               in_fl[0].ib, in_fl[0].pc_i, in_fl[0].issued_at, in_fl[0].last_ok, in_fl[0].done_at,
               in_fl[0].u.s1, avail[in_fl[0].u.s1], in_fl[0].u.s2, avail[in_fl[0].u.s2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- program
  localparam int BODY = 16;
  function automatic bit   p_load(int i);  return i == 2 || i == 7 || i == 12; endfunction
  function automatic bit   p_fp(int i);    return (i % 5) == 4; endfunction
  function automatic int   p_dst(int i);   return (i * 3 + 1) % 7; endfunction
  function automatic int   p_s1(int i);    return p_load(i) ? 7 : (i == 13) ? p_dst(12) : (i * 5 + 2) % 7; endfunction
  function automatic int   p_s2(int i);    return (i + 4) % 7; endfunction

  // ------------------------------------------------------ instruction state
  typedef struct {
    int   pc_i;
    uop_t u;
    int   old_preg;
    int   ib;
    int   issued_at, done_at;
    bit   l2miss, resolve_needed, last_ok;
  } ins_t;
  ins_t in_fl [$];                 // renamed, in program order (the ROB)
  int   map [8];
  int   freel [$];
  int   avail [NPREGS];           // cycle of the wakeup that produced it (-1: not yet)
  int   n_renamed = 0, n_committed = 0, n_issued = 0;
  int   iter_of_load [BODY];

  // events
  typedef struct { int t; int tag; int rob; bit ok; } wk_ev_t;
  wk_ev_t wk_q [$];
  typedef struct { int ib; int dest; } rs_ev_t;
  rs_ev_t rs_q [$];
  typedef struct { int t; pred_t p; bit miss; int rob; } cr_ev_t;
  cr_ev_t cr_q [$];
  typedef struct { int t; rb_ev_t kind; int ib; } rb_ev_s;
  rb_ev_s rbe_q [$];

  // mechanism counters
  int c_pred_miss = 0, c_held = 0, c_scan_ins = 0, c_goback = 0, c_scan_stall = 0;
  int c_iq_full = 0, c_ib_full = 0, c_corr = 0, c_train_filter = 0, c_restore = 0, c_ex = 0;
  int c_replay = 0, c_l2hit = 0, c_lost_ev = 0;

  // front end: a group is looked up, then presented until accepted
  typedef enum logic [1:0] {FE_BUILD, FE_LOOKUP, FE_PRESENT} fe_t;
  fe_t  fe;
  int   grp_n;
  int   grp_pc [W];
  uop_t grp_u [W];
  int   next_pc_i = 0;
  int   loads_seen [BODY];
  logic [GHR_LEN-1:0] saved_ghr;
  logic [PSEQ_W-1:0]  saved_seq;

  function automatic int rob_find(int ib);
    foreach (in_fl[k]) if (in_fl[k].ib == ib) return k;
    return -1;
  endfunction

  initial begin
    pl_valid = '0; rn_valid = '0; restore_valid = 0; corr_valid = 0; corr_miss = 0;
    tr_valid = 0; tr_miss = 0; corr_pred = '0; tr_pred = '0; tr_pc = '0;
    restore_ghr = '0; restore_seq = '0; issue_block = 0; wk_valid = '0;
    rs_valid = 0; rs_dest_v = 0; sq_valid = 0; rb_ev_valid = 0; rb_ev_kind = EV_L1_HIT;
    rs_id = '0; rb_ev_id = '0; sq_id = '0; rs_dest = '0; cm_count = '0;
    for (int i = 0; i < W; i++) begin pl_pc[i] = '0; rn_uop[i] = '0; end
    for (int k = 0; k < WK; k++) wk_tag[k] = '0;
    for (int r = 0; r < 8; r++) map[r] = r;
    for (int p = 0; p < NPREGS; p++) avail[p] = (p < 8) ? -100 : -1;
    for (int p = 8; p < NPREGS; p++) freel.push_back(p);
    for (int i = 0; i < BODY; i++) loads_seen[i] = 0;
    fe = FE_BUILD; grp_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    while (n_committed < N_INSTR) begin
      int ncm, nwk;
      bit trained;
      logic [ISSUE_W-1:0] s_iss_valid;
      iq_in_t s_iss [ISSUE_W];
      bit s_rn_acc, s_held [W], s_scan_ins [W];
      @(negedge clk);
      cyc++;
      pl_valid = '0; rn_valid = '0; wk_valid = '0; rs_valid = 0; rb_ev_valid = 0;
      corr_valid = 0; tr_valid = 0; restore_valid = 0; cm_count = '0;

      // wakeups due now
      nwk = 0;
      for (int e = 0; e < wk_q.size() && nwk < WK; ) begin
        if (wk_q[e].t <= cyc) begin
          int k;
          wk_valid[nwk] = 1; wk_tag[nwk] = preg_t'(wk_q[e].tag);
          k = rob_find(wk_q[e].rob);
          if (wk_q[e].ok) begin
            avail[wk_q[e].tag] = cyc;
            in_fl[k].done_at = cyc;
            if (in_fl[k].resolve_needed) rs_q.push_back('{in_fl[k].ib, wk_q[e].tag});
          end
          wk_q.delete(e);
          nwk++;
        end else e++;
      end
      // a resolution whose wakeup has been sent
      if (rs_q.size() > 0) begin
        rs_valid = 1; rs_id = ibid_t'(rs_q[0].ib); rs_dest_v = 1; rs_dest = preg_t'(rs_q[0].dest);
        if (scan_busy && (int'(rs_id - ib_head_now()) % IB_DEPTH) <
                         (int'(dut.u_scan.rd_id - ib_head_now()) % IB_DEPTH)) c_goback++;
        void'(rs_q.pop_front());
      end
      // load outcome to the Recovery Buffer (L2 hits first: they must find
      // their dependants still recorded)
      begin
        int pick;
        pick = -1;
        foreach (rbe_q[x]) if (pick < 0 && rbe_q[x].t <= cyc && rbe_q[x].kind == EV_L2_HIT) pick = x;
        foreach (rbe_q[x]) if (pick < 0 && rbe_q[x].t <= cyc) pick = x;
        if (pick >= 0 && rb_ev_ready) begin
          int k;
          rb_ev_valid = 1; rb_ev_kind = rbe_q[pick].kind; rb_ev_id = ibid_t'(rbe_q[pick].ib);
          k = rob_find(rbe_q[pick].ib);
          if (rbe_q[pick].kind == EV_L2_HIT) c_l2hit++;
          else if (k >= 0) begin in_fl[k].resolve_needed = 1; c_ex++; end
          if (cyc - rbe_q[pick].t > 0) c_lost_ev++;
          rbe_q.delete(pick);
        end
      end
      // history correction once the L2 outcome is known
      if (cr_q.size() > 0 && cr_q[0].t <= cyc) begin
        corr_valid = 1; corr_pred = cr_q[0].p; corr_miss = cr_q[0].miss;
        if (cr_q[0].p.used && cr_q[0].p.miss != cr_q[0].miss) c_corr++;
        void'(cr_q.pop_front());
      end
      // commit, at most one load (one training port)
      ncm = 0; trained = 0;
      while (ncm < CW && ncm < in_fl.size() && in_fl[ncm].done_at >= 0 && in_fl[ncm].done_at < cyc) begin
        if (in_fl[ncm].u.is_load) begin
          if (trained) break;
          trained = 1;
          tr_valid = 1; tr_pc = in_fl[ncm].u.pc; tr_pred = in_fl[ncm].u.pred; tr_miss = in_fl[ncm].l2miss;
          if (in_fl[ncm].l2miss && !in_fl[ncm].u.pred.used) c_train_filter++;
        end
        ncm++;
      end
      cm_count = 4'(ncm);
      check(int'(ib_count) == in_fl.size(), $sformatf("IB holds %0d, %0d in flight", ib_count, in_fl.size()));

      // front end
      if (fe == FE_BUILD && n_renamed < N_INSTR && freel.size() >= W) begin
        grp_n = (N_INSTR - n_renamed) < W ? N_INSTR - n_renamed : W;
        for (int i = 0; i < grp_n; i++) begin
          int pi;
          pi = next_pc_i % BODY;
          grp_pc[i] = pi;
          grp_u[i] = '0;
          grp_u[i].pc = 32'h4000 + 32'(pi * 4);
          grp_u[i].op = 16'(pi);
          grp_u[i].is_load = p_load(pi);
          grp_u[i].is_fp = p_fp(pi);
          grp_u[i].s1_v = 1; grp_u[i].s1 = preg_t'(map[p_s1(pi)]);
          grp_u[i].s2_v = !p_load(pi) && pi != 13;   // 13: single-source consumer of load 12 grp_u[i].s2 = preg_t'(map[p_s2(pi)]);
          grp_u[i].d_v = 1; grp_u[i].d = preg_t'(freel.pop_front());
          map[p_dst(pi)] = grp_u[i].d;
          pl_valid[i] = p_load(pi);
          pl_pc[i] = grp_u[i].pc;
          next_pc_i++;
        end
        fe = FE_LOOKUP;
        // one checkpoint and, later, one restore of the history
        if (n_renamed == 400) begin saved_ghr = ckpt_ghr; saved_seq = ckpt_seq; end
      end else if (fe == FE_LOOKUP) begin
        #1;
        for (int i = 0; i < grp_n; i++) if (pr_valid[i]) grp_u[i].pred = pr_pred[i];
        if (n_renamed == 800 && c_restore == 0) begin
          restore_valid = 1; restore_ghr = saved_ghr; restore_seq = saved_seq; c_restore++;
        end
        fe = FE_PRESENT;
      end
      if (fe == FE_PRESENT) begin
        for (int i = 0; i < W; i++) begin
          rn_valid[i] = i < grp_n;
          rn_uop[i] = grp_u[i];
        end
      end

      #1;
      // sample
      s_iss_valid = iss_valid;
      for (int j = 0; j < ISSUE_W; j++) s_iss[j] = iss[j];
      s_rn_acc = fe == FE_PRESENT && rn_ready;
      if (fe == FE_PRESENT && !rn_ready) begin
        if (scan_busy) c_scan_stall++;
        else if (!dut.u_ib.al_ready) c_ib_full++;
        else c_iq_full++;
      end
      for (int i = 0; i < W; i++) begin
        s_held[i] = s_rn_acc && rn_valid[i] && dut.u_filter.ib_wait[i];
        s_scan_ins[i] = dut.scan_ins_valid[i];
      end
      for (int i = 0; i < W; i++) begin
        if (s_held[i]) c_held++;
        if (s_scan_ins[i]) c_scan_ins++;
      end
      for (int j = 0; j < ISSUE_W; j++) begin
        if (s_iss_valid[j]) begin
          int k;
          k = rob_find(int'(s_iss[j].ib_id));
          check(k >= 0, "issued instruction is in flight");
          if (k >= 0) begin
            uop_t u;
            bit ok;
            u = in_fl[k].u;
            ok = (!u.s1_v || (avail[u.s1] != -1 && avail[u.s1] < cyc)) &&
                 (!u.s2_v || (avail[u.s2] != -1 && avail[u.s2] < cyc));
            if (in_fl[k].issued_at >= 0) begin
              check(replaying && !in_fl[k].last_ok,
                    $sformatf("ib %0d issued again without having executed wrongly", in_fl[k].ib));
              c_replay++;
            end else begin
              n_issued++;
            end
            check(ok || (in_fl[k].issued_at < 0 && !replaying),
                  $sformatf("ib %0d replayed before its sources were produced", in_fl[k].ib));
            in_fl[k].issued_at = cyc;
            in_fl[k].last_ok = ok;
            if (u.is_load) begin
              int pi;
              bit miss, l1miss;
              check(ok, "load address available");
              pi = in_fl[k].pc_i;
              miss = (pi == 2) ? 1'b1 : (pi == 7) ? (loads_seen[pi] % 2 == 0) : 1'b0;
              l1miss = (pi == 12) && (loads_seen[pi] % 4 == 1);
              loads_seen[pi]++;
              in_fl[k].l2miss = miss;
              if (miss) begin
                wk_q.push_back('{cyc + MISS_LAT, int'(u.d), in_fl[k].ib, 1'b1});
                if (u.pred.miss) in_fl[k].resolve_needed = 1;
                else rbe_q.push_back('{cyc + L2_KNOWN, EV_L2_MISS, in_fl[k].ib});
              end else if (l1miss) begin
                // woken speculatively as an L1 hit; the data comes from L2
                wk_q.push_back('{cyc + 3, int'(u.d), in_fl[k].ib, 1'b0});
                wk_q.push_back('{cyc + L2_KNOWN, int'(u.d), in_fl[k].ib, 1'b1});
                rbe_q.push_back('{cyc + L2_KNOWN, EV_L2_HIT, in_fl[k].ib});
                if (u.pred.miss) in_fl[k].resolve_needed = 1;
              end else begin
                wk_q.push_back('{cyc + 3, int'(u.d), in_fl[k].ib, 1'b1});
                if (u.pred.miss) in_fl[k].resolve_needed = 1;
              end
              if (u.pred.used) cr_q.push_back('{cyc + L2_KNOWN, u.pred, miss, in_fl[k].ib});
            end else begin
              wk_q.push_back('{cyc + 1, int'(u.d), in_fl[k].ib, ok});
            end
          end
        end
      end
      @(posedge clk);
      #1;
      // state updates after the clock edge
      if (s_rn_acc) begin
        for (int i = 0; i < grp_n; i++) begin
          ins_t e;
          e.pc_i = grp_pc[i]; e.u = grp_u[i]; e.old_preg = -1;
          e.ib = int'(rn_ib_id_q[i]); e.issued_at = -1; e.done_at = -1;
          e.l2miss = 0; e.resolve_needed = 0; e.last_ok = 0;
          if (grp_u[i].is_load && grp_u[i].pred.miss) c_pred_miss++;
          avail[grp_u[i].d] = -1;
          in_fl.push_back(e);
        end
        n_renamed += grp_n;
        fe = FE_BUILD;
      end
      for (int c = 0; c < ncm; c++) begin
        check(in_fl[0].issued_at >= 0 && in_fl[0].last_ok, "committed instruction executed with its operands");
        freel.push_back(int'(in_fl[0].u.d) == 0 ? 0 : int'(in_fl[0].u.d));
        void'(in_fl.pop_front());
        n_committed++;
      end
    end
    // drain and final checks
    @(negedge clk);
    pl_valid = '0; rn_valid = '0; wk_valid = '0; rs_valid = 0; rb_ev_valid = 0;
    corr_valid = 0; tr_valid = 0; restore_valid = 0; cm_count = '0;
    repeat (5) @(posedge clk);
    #1;
    check(ib_count == 0 && iq_int_occ == 0 && iq_fp_occ == 0 && !scan_busy, "all buffers empty at the end");
    check(n_issued == N_INSTR, $sformatf("issued %0d of %0d", n_issued, N_INSTR));
    $display("cycles=%0d committed=%0d IPC=%0.2f", cyc, n_committed, real'(n_committed) / cyc);
    $display("pred_miss=%0d held=%0d scan_ins=%0d goback=%0d scan_stall=%0d iq_full=%0d ib_full=%0d corr=%0d filter_train=%0d restore=%0d l2miss_taken_back=%0d l2hit=%0d replays=%0d late_events=%0d",
             c_pred_miss, c_held, c_scan_ins, c_goback, c_scan_stall, c_iq_full, c_ib_full, c_corr, c_train_filter, c_restore, c_ex, c_l2hit, c_replay, c_lost_ev);
    check(c_pred_miss > 0, "a load was predicted to miss");
    check(c_held > 0, "an instruction was held in the IB");
    check(c_scan_ins > 0, "the scanner inserted instructions");
    check(c_goback > 0, "the scanner went back to an older resolution");
    check(c_scan_stall > 0, "rename waited for the scanner");
    check(c_iq_full > 0, "an issue queue was full");
    check(FULL_SIZE || c_ib_full > 0, "the IB was full");
    check(c_corr > 0, "the history was corrected");
    check(c_train_filter > 0, "the filter table learned a missing load");
    check(c_restore > 0, "the history was restored");
    check(c_ex > 0, "an unpredicted L2 miss was taken back by the Recovery Buffer");
    check(c_l2hit > 0 && c_replay > 0, "an L2 hit made the Recovery Buffer replay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ids handed out by the IB, as seen in the cycle of acceptance
  ibid_t rn_ib_id_q [W];
  always @(posedge clk) for (int i = 0; i < W; i++) rn_ib_id_q[i] <= rn_ib_id[i];

  function automatic ibid_t ib_head_now();
    return dut.u_ib.head;
  endfunction
endmodule
