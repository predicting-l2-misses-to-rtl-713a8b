// recovery_buffer: the Recovery Buffer and its re-issue logic.
//
// Issued instructions are recorded in issue-order timing: a shift register of
// LEN stages, one stage per cycle since issue, each holding the IW slots of
// that cycle's issue group (empty slots included, so the relative timing is
// kept). LEN is the number of cycles after which a load's L2 hit/miss is
// known (2 stages to the functional units + 2-cycle L1 + 9-cycle L2 = 13);
// an instruction whose loads all hit L1 simply leaves at the end.
//
// The re-issue logic acts on the outcome of a load, given with its IB id:
//  * L1 hit / L1 miss: nothing; the entries stay until they leave.
//  * L2 hit: the instructions issued after the load that depend on it,
//    directly or through other such instructions (found by matching source
//    tags against destination tags in issue order), are replayed: from the
//    next cycle, one recorded issue group per cycle, in their original
//    relative timing, followed by one empty cycle. While replaying,
//    `replaying` is high and the issue queues do not issue; replayed instructions leave the buffer and re-enter
//    it through the issue path.
//  * L2 miss: the load and its dependants are discarded. Each is reported, one
//    per cycle, on ex_*: its destination becomes L2-dependent, and the
//    dependants (ex_wait=1) go back to waiting in the Instruction Buffer,
//    from where the scanner re-inserts them once the miss resolves.
//  * unknown STA address, unavailable STD data, no free MSHR: as an L2 miss,
//    but the load itself also goes back to the Instruction Buffer.
// The instructions issued in the cycle of the event are included.
// An event is accepted when ev_ready is high. One L2 hit may arrive while a
// replay is in progress: its dependants are taken out at once and replayed
// right after the current replay. The other events need the buffer idle (no
// replay in progress or waiting, no discards left to report).
//
// The buffer's role, the issue-order timing, the replay on L2 hit with issue
// blocked, the discard on L2 miss and the recovery cases follow the document.
// The fixed-length shift register, tag matching to find dependants, the
// one-per-cycle reporting and the two replay buffers are this design's.
module recovery_buffer
  import l2p_pkg::*;
#(
  parameter int unsigned IW  = 4,
  parameter int unsigned LEN = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  // issue group entering the buffer (from the issue queues or a replay)
  input  logic [IW-1:0] in_valid,
  input  iq_in_t        in       [IW],
  // load outcome
  input  logic          ev_valid,
  input  rb_ev_t        ev_kind,
  input  ibid_t         ev_id,
  output logic          ev_ready,
  // replay
  output logic          replaying,
  output logic [IW-1:0] rp_valid,
  output iq_in_t        rp       [IW],
  // instructions taken back to the Instruction Buffer
  output logic          ex_valid,
  output ibid_t         ex_id,
  output logic          ex_wait,
  output logic          ex_dest_v,
  output preg_t         ex_dest
);

  localparam int unsigned NE  = (LEN + 1) * IW;     // stages plus the incoming group
  localparam int unsigned EXQ = NE;

  // stage s (0 = newest) of the shift register
  logic [IW-1:0] v_q   [LEN];
  iq_in_t        e_q   [LEN][IW];

  // flattened view in issue order: index 0 = oldest slot of stage LEN-1,
  // the last IW indices = the incoming group
  logic   fv [NE];
  iq_in_t fe [NE];
  always_comb begin
    for (int unsigned s = 0; s < LEN; s++)
      for (int unsigned j = 0; j < IW; j++) begin
        fv[(LEN-1-s)*IW + j] = v_q[s][j];
        fe[(LEN-1-s)*IW + j] = e_q[s][j];
      end
    for (int unsigned j = 0; j < IW; j++) begin
      fv[LEN*IW + j] = in_valid[j];
      fe[LEN*IW + j] = in[j];
    end
  end

  // the load and everything that depends on it
  logic          found;
  int unsigned   ld_pos;
  logic [NE-1:0] dep;
  always_comb begin
    found = 1'b0;
    ld_pos = 0;
    for (int unsigned e = 0; e < NE; e++) begin
      if (!found && fv[e] && fe[e].uop.is_load && fe[e].ib_id == ev_id) begin
        found = 1'b1;
        ld_pos = e;
      end
    end
    dep = '0;
    for (int unsigned e = 0; e < NE; e++) begin
      logic m;
      m = 1'b0;
      // later issue cycle than the load
      if (found && fv[e] && (e / IW) > (ld_pos / IW)) begin
        m = (fe[e].uop.s1_v && fe[ld_pos].uop.d_v && fe[e].uop.s1 == fe[ld_pos].uop.d) ||
            (fe[e].uop.s2_v && fe[ld_pos].uop.d_v && fe[e].uop.s2 == fe[ld_pos].uop.d);
        for (int unsigned k = 0; k < e; k++) begin
          if (dep[k] && fe[k].uop.d_v &&
              ((fe[e].uop.s1_v && fe[e].uop.s1 == fe[k].uop.d) ||
               (fe[e].uop.s2_v && fe[e].uop.s2 == fe[k].uop.d))) m = 1'b1;
        end
        dep[e] = m;
      end
    end
  end

  logic take, do_replay, do_discard;
  assign take       = ev_valid && ev_ready && found;
  assign do_replay  = take && (ev_kind == EV_L2_HIT);
  assign do_discard = take && (ev_kind == EV_L2_MISS || ev_kind == EV_UNKNOWN_STA ||
                               ev_kind == EV_UNAVAIL_STD || ev_kind == EV_NO_MSHR);

  // slots that leave the buffer because of the event
  logic [NE-1:0] drop;
  always_comb begin
    for (int unsigned e = 0; e < NE; e++)
      drop[e] = ((do_replay || do_discard) && dep[e]) || (do_discard && e == ld_pos);
  end

  // two replay buffers: the one replaying (cur_q) and one L2 hit waiting
  // for it to finish (pend_q). Index = issue-order group number, 0 = oldest.
  // group LEN+1 is an empty tail: the issue queues stay blocked one more
  // cycle, so a consumer woken early by a wrong result cannot issue before
  // the replayed producer's result (one-cycle ALU latency) is back
  localparam int unsigned NG = LEN + 2;
  typedef logic [$clog2(NG+1)-1:0] gptr_t;
  logic [IW-1:0] rpv_q [2][NG];
  iq_in_t        rpe_q [2][NG][IW];
  gptr_t         rp_ptr_q [2], rp_end_q [2];
  logic          cur_q, pend_q;

  assign replaying = (rp_ptr_q[cur_q] != rp_end_q[cur_q]);
  always_comb begin
    for (int unsigned j = 0; j < IW; j++) begin
      rp_valid[j] = replaying && rpv_q[cur_q][rp_ptr_q[cur_q]][j];
      rp[j]       = rpe_q[cur_q][rp_ptr_q[cur_q]][j];
    end
  end

  logic rp_last, rp_tgt;
  assign rp_last = replaying && (rp_ptr_q[cur_q] + 1'b1 == rp_end_q[cur_q]);
  assign rp_tgt  = replaying ? !cur_q : cur_q;

  // discard report queue
  iq_in_t  xq_e    [EXQ];
  logic    xq_w    [EXQ];
  logic [$clog2(EXQ+1)-1:0] xq_n;

  // an L2 hit can wait behind one replay; the other cases need the buffer
  // idle. L1 outcomes need nothing.
  always_comb begin
    case (ev_kind)
      EV_L1_HIT, EV_L1_MISS: ev_ready = 1'b1;
      EV_L2_HIT:             ev_ready = !pend_q;
      default:               ev_ready = !replaying && !pend_q && (xq_n == 0);
    endcase
  end
  assign ex_valid  = (xq_n != 0);
  assign ex_id     = xq_e[0].ib_id;
  assign ex_wait   = xq_w[0];
  assign ex_dest_v = xq_e[0].uop.d_v;
  assign ex_dest   = xq_e[0].uop.d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < LEN; s++) v_q[s] <= '0;
      for (int unsigned b = 0; b < 2; b++) begin
        for (int unsigned g = 0; g < NG; g++) rpv_q[b][g] <= '0;
        rp_ptr_q[b] <= '0;
        rp_end_q[b] <= '0;
      end
      cur_q    <= 1'b0;
      pend_q   <= 1'b0;
      xq_n     <= '0;
    end else begin
      // shift, dropping what the event takes out
      for (int unsigned s = LEN-1; s > 0; s--) begin
        e_q[s] <= e_q[s-1];
        for (int unsigned j = 0; j < IW; j++)
          v_q[s][j] <= v_q[s-1][j] && !drop[(LEN-s)*IW + j];
      end
      e_q[0] <= in;
      for (int unsigned j = 0; j < IW; j++)
        v_q[0][j] <= in_valid[j] && !drop[LEN*IW + j];

      // replay pointers; the waiting replay starts right after the current
      if (replaying) rp_ptr_q[cur_q] <= rp_ptr_q[cur_q] + 1'b1;
      if (rp_last && (pend_q || do_replay)) begin
        cur_q  <= !cur_q;
        pend_q <= 1'b0;
      end else if (do_replay && replaying) begin
        pend_q <= 1'b1;
      end
      if (do_replay) begin
        for (int unsigned g = 0; g <= LEN; g++)
          for (int unsigned j = 0; j < IW; j++) begin
            rpv_q[rp_tgt][g][j] <= dep[g*IW + j];
            rpe_q[rp_tgt][g][j] <= fe[g*IW + j];
          end
        rpv_q[rp_tgt][NG-1] <= '0;
        rp_ptr_q[rp_tgt] <= gptr_t'(ld_pos / IW + 1);
        rp_end_q[rp_tgt] <= gptr_t'(NG);
      end

      // report queue: pop one, then push the discarded instructions
      if (do_discard) begin
        int unsigned n;
        xq_e[0] <= fe[ld_pos];
        xq_w[0] <= (ev_kind != EV_L2_MISS);
        n = 1;
        for (int unsigned e = 0; e < NE; e++) begin
          if (dep[e]) begin
            xq_e[n] <= fe[e];
            xq_w[n] <= 1'b1;
            n++;
          end
        end
        xq_n <= ($clog2(EXQ+1))'(n);
      end else if (xq_n != 0) begin
        for (int unsigned q = 0; q + 1 < EXQ; q++) begin
          xq_e[q] <= xq_e[q+1];
          xq_w[q] <= xq_w[q+1];
        end
        xq_n <= xq_n - 1'b1;
      end
    end
  end

endmodule
