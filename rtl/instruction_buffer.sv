// instruction_buffer: the Instruction Buffer (IB) of the late-inserting scheduler.
//
// A circular buffer that keeps every renamed, not yet committed instruction
// in program order, with as many entries as the reorder buffer. Each entry
// holds the renamed micro-op and a "waiting" bit: 1 while the instruction is
// not in an issue queue and must later be inserted there by the scanner
// (instructions held back by the Filter, or pulled out of the scheduler by a
// recovery action). Entries leave the buffer at commit (oldest first) or when
// a squash removes an entry and everything younger.
//
// Interface and timing:
//  * allocation: up to W instructions per cycle in lanes 0..n-1 (valid lanes
//    must be contiguous from lane 0); the ids they get, tail+i, are on al_id
//    in the same cycle; al_ready says W free entries exist.
//  * commit: cm_count oldest entries are freed at the clock edge.
//  * squash: sq_valid removes entry sq_id and all younger ones; allocation in
//    the same cycle is ignored.
//  * scan read: rd_id selects W consecutive entries, returned combinationally
//    with rd_valid (entry is in the buffer) and rd_wait.
//  * clr_*: clear the waiting bit (the scanner has inserted the entry);
//    set_*: set it (a recovery action took the instruction back).
// Head, tail and occupancy are outputs. DEPTH must be a power of two.
//
// The buffer size (the ROB size) and its role follow the document; the
// port widths, the waiting bit and the squash interface are this design's.
module instruction_buffer
  import l2p_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 4,
  parameter int unsigned CW    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // allocation from the Filter
  input  logic [W-1:0]           al_valid,
  input  uop_t                   al_uop  [W],
  input  logic [W-1:0]           al_wait,
  output ibid_t                  al_id   [W],
  output logic                   al_ready,
  // commit and squash
  input  logic [$clog2(CW+1)-1:0] cm_count,
  input  logic                   sq_valid,
  input  ibid_t                  sq_id,
  // scanner read port
  input  ibid_t                  rd_id,
  output uop_t                   rd_uop  [W],
  output logic [W-1:0]           rd_valid,
  output logic [W-1:0]           rd_wait,
  // waiting-bit updates
  input  logic [W-1:0]           clr_valid,
  input  ibid_t                  clr_id  [W],
  input  logic                   set_valid,
  input  ibid_t                  set_id,
  // state
  output ibid_t                  head,
  output ibid_t                  tail,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] idx_t;
  typedef logic [$clog2(DEPTH+1)-1:0] cnt_t;

  uop_t              mem_q  [DEPTH];
  logic [DEPTH-1:0]  wait_q;
  idx_t              head_q, tail_q;
  cnt_t              count_q;

  function automatic idx_t ix(input ibid_t id);
    return idx_t'(id);
  endfunction

  function automatic cnt_t age(input ibid_t id);
    return cnt_t'(idx_t'(ix(id) - head_q));
  endfunction

  assign head  = ibid_t'(head_q);
  assign tail  = ibid_t'(tail_q);
  assign count = count_q;
  assign al_ready = (int'(count_q) + int'(W) <= int'(DEPTH));

  always_comb begin
    for (int unsigned i = 0; i < W; i++) al_id[i] = ibid_t'(idx_t'(tail_q + idx_t'(i)));
  end

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      idx_t a;
      a = idx_t'(ix(rd_id) + idx_t'(i));
      rd_uop[i]   = mem_q[a];
      rd_wait[i]  = wait_q[a];
      rd_valid[i] = age(ibid_t'(a)) < count_q;
    end
  end

  logic [$clog2(W+1)-1:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int unsigned i = 0; i < W; i++) if (al_valid[i]) n_alloc = n_alloc + 1'b1;
  end

  logic do_alloc;
  assign do_alloc = (n_alloc != 0) && al_ready && !sq_valid;

  always_ff @(posedge clk) begin
    if (do_alloc) begin
      for (int unsigned i = 0; i < W; i++)
        if (al_valid[i]) mem_q[idx_t'(tail_q + idx_t'(i))] <= al_uop[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q  <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      cnt_t c;
      c = count_q;
      // squash first: the entries from sq_id on disappear
      if (sq_valid && age(sq_id) < count_q) begin
        tail_q <= ix(sq_id);
        c      = age(sq_id);
      end else if (do_alloc) begin
        tail_q <= idx_t'(tail_q + idx_t'(n_alloc));
        c      = c + cnt_t'(n_alloc);
      end
      head_q  <= idx_t'(head_q + idx_t'(cm_count));
      count_q <= c - cnt_t'(cm_count);
      for (int unsigned i = 0; i < W; i++)
        if (clr_valid[i]) wait_q[ix(clr_id[i])] <= 1'b0;
      if (set_valid) wait_q[ix(set_id)] <= 1'b1;
      if (do_alloc)
        for (int unsigned i = 0; i < W; i++)
          if (al_valid[i]) wait_q[idx_t'(tail_q + idx_t'(i))] <= al_wait[i];
    end
  end

`ifndef SYNTHESIS
  // commit can only free entries that exist
  a_commit_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(cm_count) <= int'(count_q));
`endif

endmodule
