// issue_queue: a conventional out-of-order issue queue (wakeup and select).
//
// Holds up to SIZE instructions waiting for their source operands. Each entry
// keeps one ready bit per source. A wakeup port broadcasts the tag of a
// physical register whose value is now available; entries (and instructions
// being inserted in the same cycle) with a matching source become ready.
// Each cycle up to min(IW, issue_limit) ready entries are selected, lowest
// entry index first, sent out on iss_* and freed at the clock edge: the queue
// releases an entry as soon as it issues, and recovery is left to the stages
// behind it.
//
// Insertion: up to W instructions per cycle on ins_*, with the ready state of
// their sources as read from the register scoreboard (ins_r1/ins_r2); they
// take the lowest free entries. `room` is min(free entries, W) and is what a
// producer may insert this cycle. Squash removes every entry whose IB id is
// at or after sq_id in program order (ages counted from the IB head).
// Selected instructions appear combinationally in the cycle they are chosen.
//
// The document gives the queue's role and its sizes (20, 30 or 40 entries per
// queue, 4-wide issue); the index-order select, the wakeup port count and the
// squash rule are choices of this implementation.
module issue_queue
  import l2p_pkg::*;
#(
  parameter int unsigned SIZE     = 20,
  parameter int unsigned W        = 4,
  parameter int unsigned IW       = 4,
  parameter int unsigned WK       = 4,
  parameter int unsigned IB_DEPTH = 2048
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // insertion
  input  logic [W-1:0]            ins_valid,
  input  iq_in_t                  ins      [W],
  input  logic [W-1:0]            ins_r1,
  input  logic [W-1:0]            ins_r2,
  output logic [$clog2(W+1)-1:0]  room,
  // wakeup broadcast
  input  logic [WK-1:0]           wk_valid,
  input  preg_t                   wk_tag   [WK],
  // issue
  input  logic [$clog2(IW+1)-1:0] issue_limit,
  output logic [IW-1:0]           iss_valid,
  output iq_in_t                  iss      [IW],
  output logic [$clog2(IW+1)-1:0] iss_count,
  // squash
  input  logic                    sq_valid,
  input  ibid_t                   sq_id,
  input  ibid_t                   ib_head,
  // occupancy
  output logic [$clog2(SIZE+1)-1:0] occupancy
);

  localparam int unsigned AW = $clog2(IB_DEPTH);
  typedef logic [AW-1:0] idx_t;

  logic [SIZE-1:0] v_q, r1_q, r2_q;
  iq_in_t          e_q [SIZE];

  function automatic logic woken(input preg_t t);
    logic m;
    m = 1'b0;
    for (int unsigned k = 0; k < WK; k++) if (wk_valid[k] && wk_tag[k] == t) m = 1'b1;
    return m;
  endfunction

  function automatic logic squashed(input ibid_t id);
    return sq_valid && (idx_t'(idx_t'(id) - idx_t'(ib_head)) >= idx_t'(idx_t'(sq_id) - idx_t'(ib_head)));
  endfunction

  // occupancy and room
  always_comb begin
    int unsigned f;
    f = 0;
    for (int unsigned e = 0; e < SIZE; e++) if (!v_q[e]) f++;
    occupancy = ($clog2(SIZE+1))'(SIZE - f);
    room = (f >= W) ? ($clog2(W+1))'(W) : ($clog2(W+1))'(f);
  end

  // select
  logic [SIZE-1:0] sel;
  always_comb begin
    int unsigned n;
    n = 0;
    sel = '0;
    iss_valid = '0;
    for (int unsigned j = 0; j < IW; j++) iss[j] = '0;
    for (int unsigned e = 0; e < SIZE; e++) begin
      if (v_q[e] && r1_q[e] && r2_q[e] && n < int'(issue_limit) && n < IW) begin
        sel[e] = 1'b1;
        iss[n] = e_q[e];
        iss_valid[n] = 1'b1;
        n++;
      end
    end
    iss_count = ($clog2(IW+1))'(n);
  end

  // insertion slots: lane i takes the i-th free entry among valid lanes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= '0;
      r1_q <= '0;
      r2_q <= '0;
    end else begin
      logic [SIZE-1:0] taken;
      taken = v_q;
      for (int unsigned e = 0; e < SIZE; e++) begin
        if (sel[e]) v_q[e] <= 1'b0;
        if (v_q[e]) begin
          if (woken(e_q[e].uop.s1)) r1_q[e] <= 1'b1;
          if (woken(e_q[e].uop.s2)) r2_q[e] <= 1'b1;
          if (squashed(e_q[e].ib_id)) v_q[e] <= 1'b0;
        end
      end
      for (int unsigned i = 0; i < W; i++) begin
        if (ins_valid[i] && !squashed(ins[i].ib_id)) begin
          logic done;
          done = 1'b0;
          for (int unsigned e = 0; e < SIZE; e++) begin
            if (!done && !taken[e]) begin
              taken[e] = 1'b1;
              done     = 1'b1;
              v_q[e]   <= 1'b1;
              e_q[e]   <= ins[i];
              r1_q[e]  <= !ins[i].uop.s1_v || ins_r1[i] || woken(ins[i].uop.s1);
              r2_q[e]  <= !ins[i].uop.s2_v || ins_r2[i] || woken(ins[i].uop.s2);
            end
          end
        end
      end
    end
  end

`ifndef SYNTHESIS
  // a producer never inserts more than the room it was given
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(ins_valid) <= int'(room));
`endif

endmodule
