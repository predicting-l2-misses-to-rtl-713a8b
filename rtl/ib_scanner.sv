// ib_scanner: walks the Instruction Buffer and inserts ready instructions
// into the issue queues after an L2 miss (or another long wait) resolves.
//
// A resolution event carries the IB id of the instruction that was waited for
// (the load whose L2 miss was resolved). The scanner then reads W consecutive
// IB entries per cycle, starting at that id and moving towards the youngest
// entry. An entry is inserted when it is still waiting (not in an issue queue)
// and none of its sources depends on an unresolved L2 miss, as told by the
// L2-dependence vector. Within one group an entry sees the effect of the
// older entries inserted in the same cycle: their destinations stop being
// pending. An inserted entry has its waiting bit cleared and its destination
// marked independent, except a load still predicted to miss, whose
// destination stays pending until its own resolution.
//
// When another resolution arrives for an entry older than the current scan
// position the scan goes back to that entry; a younger one will be reached
// anyway. The scan ends when it passes the youngest entry. If an entry to be
// inserted finds its issue queue without room, the scan stops at that entry
// and retries it next cycle. If commit frees entries ahead of the scan
// position, the position follows the head.
//
// Interface/timing: the event is taken at the clock edge and scanning starts
// the cycle after; `busy` is high while scanning, which is when the issue
// queue input multiplexer listens to the scanner instead of the Filter.
// Reads of the IB (rd_*) and of the dependence vector (pend_*) are
// combinational; ins_* go to the issue queues and to the IB/vector in the
// same cycle.
//
// The scan width (issue width), the start at the resolved load and the
// go-back rule follow the document. Stalling on a full queue, the
// commit-overtake rule and the one-event-per-cycle input are this design's.
module ib_scanner
  import l2p_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 4,
  parameter int unsigned CW    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // resolution event
  input  logic                   ev_valid,
  input  ibid_t                  ev_id,
  // IB state and read port
  input  ibid_t                  ib_head,
  input  logic [$clog2(DEPTH+1)-1:0] ib_count,
  input  logic [$clog2(CW+1)-1:0] ib_cm_count,
  output ibid_t                  rd_id,
  input  uop_t                   rd_uop   [W],
  input  logic [W-1:0]           rd_valid,
  input  logic [W-1:0]           rd_wait,
  // L2-dependence vector read (two sources per lane) and write
  output preg_t                  pend_raddr [2*W],
  input  logic [2*W-1:0]         pend_rdata,
  output logic [W-1:0]           pend_we,
  output preg_t                  pend_waddr [W],
  output logic [W-1:0]           pend_wdata,
  // room in the issue queues this cycle
  input  logic [$clog2(W+1)-1:0] room_int,
  input  logic [$clog2(W+1)-1:0] room_fp,
  // insertion
  output logic [W-1:0]           ins_valid,
  output iq_in_t                 ins      [W],
  output logic                   busy
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] idx_t;
  typedef logic [$clog2(DEPTH+1)-1:0] cnt_t;

  logic  active_q;
  idx_t  pos_q;

  assign busy  = active_q;
  assign rd_id = ibid_t'(pos_q);

  function automatic cnt_t age(input idx_t a);
    return cnt_t'(idx_t'(a - idx_t'(ib_head)));
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      pend_raddr[2*i]   = rd_uop[i].s1;
      pend_raddr[2*i+1] = rd_uop[i].s2;
    end
  end

  // per-lane decision, in program order
  logic [$clog2(W+1)-1:0] adv;       // entries consumed this cycle
  logic                   reached_end;
  always_comb begin
    int unsigned n_int, n_fp;
    logic stop;
    logic s1p, s2p;
    n_int = 0; n_fp = 0; stop = 1'b0;
    s1p = 1'b0; s2p = 1'b0;
    adv = '0;
    reached_end = 1'b0;
    ins_valid = '0;
    pend_we = '0;
    for (int unsigned i = 0; i < W; i++) begin
      ins[i].uop   = rd_uop[i];
      ins[i].ib_id = ibid_t'(idx_t'(pos_q + idx_t'(i)));
      pend_waddr[i] = rd_uop[i].d;
      pend_wdata[i] = 1'b0;
    end
    if (active_q) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (!stop) begin
          if (!rd_valid[i]) begin
            reached_end = 1'b1;
            stop = 1'b1;
          end else begin
            s1p = rd_uop[i].s1_v && pend_rdata[2*i];
            s2p = rd_uop[i].s2_v && pend_rdata[2*i+1];
            // older entries of this group inserted now are no longer pending
            for (int unsigned k = 0; k < i; k++) begin
              if (pend_we[k] && !pend_wdata[k] && rd_uop[k].d_v) begin
                if (rd_uop[k].d == rd_uop[i].s1) s1p = 1'b0;
                if (rd_uop[k].d == rd_uop[i].s2) s2p = 1'b0;
              end
            end
            if (rd_wait[i] && !s1p && !s2p) begin
              if (( rd_uop[i].is_fp && n_fp  >= int'(room_fp)) ||
                  (!rd_uop[i].is_fp && n_int >= int'(room_int))) begin
                stop = 1'b1;          // retry this entry next cycle
              end else begin
                ins_valid[i] = 1'b1;
                if (rd_uop[i].is_fp) n_fp++; else n_int++;
                pend_we[i]    = rd_uop[i].d_v;
                pend_wdata[i] = rd_uop[i].is_load && rd_uop[i].pred.miss;
              end
            end
            if (!stop) adv = adv + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      pos_q    <= '0;
    end else begin
      idx_t np;
      logic nact;
      np   = idx_t'(pos_q + idx_t'(adv));
      nact = active_q && !reached_end;
      // an entry is consumed only if the next one is still in the buffer
      if (nact && age(np) >= ib_count) nact = 1'b0;
      // commit has freed entries up to and past the scan position
      if (nact && age(np) < cnt_t'(ib_cm_count)) np = idx_t'(idx_t'(ib_head) + idx_t'(ib_cm_count));
      if (ev_valid && age(idx_t'(ev_id)) < ib_count) begin
        if (!nact || age(idx_t'(ev_id)) < age(np)) np = idx_t'(ev_id);
        nact = 1'b1;
      end
      active_q <= nact;
      pos_q    <= np;
    end
  end

endmodule
