// filter_stage: the Filter stage that sits between Rename and the issue queues.
//
// It sees one renamed group of up to W instructions per cycle. An instruction
// depends on an unresolved L2 miss when one of its sources is marked in the
// L2-dependence vector, or is written by an older instruction of the same
// group that is itself marked now. Such an instruction is held back: it goes
// only to the Instruction Buffer, with its waiting bit set. Every other
// instruction goes to its issue queue (integer or floating point) and to the
// IB. For every destination the stage writes the dependence vector: 1 for a
// held instruction and for a load predicted to miss in L2 (the load itself is
// inserted; only its consumers wait), 0 otherwise, which also clears stale
// marks of a reused physical register.
//
// The group moves as a whole: it is accepted only when the IB has room, both
// issue queues have room for their share, and the scanner is idle (while the
// scanner inserts from the IB, nothing is inserted from Rename). Everything
// is combinational; the IB, the queues and the vector update at the next
// clock edge. Valid lanes must be contiguous from lane 0.
//
// The hold/insert rule, the propagation through the rename group and the
// priority of the scanner follow the document; the all-or-nothing group
// acceptance is this design's.
module filter_stage
  import l2p_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]           in_valid,
  input  uop_t                   in_uop   [W],
  output logic                   in_ready,
  input  logic                   scan_busy,
  // L2-dependence vector
  output preg_t                  pend_raddr [2*W],
  input  logic [2*W-1:0]         pend_rdata,
  output logic [W-1:0]           pend_we,
  output preg_t                  pend_waddr [W],
  output logic [W-1:0]           pend_wdata,
  // Instruction Buffer allocation
  input  logic                   ib_ready,
  input  ibid_t                  ib_id    [W],
  output logic [W-1:0]           ib_valid,
  output logic [W-1:0]           ib_wait,
  // issue queue insertion
  input  logic [$clog2(W+1)-1:0] room_int,
  input  logic [$clog2(W+1)-1:0] room_fp,
  output logic [W-1:0]           ins_valid,
  output iq_in_t                 ins      [W]
);

  logic [W-1:0] held, pend_val;
  int unsigned  n_int, n_fp;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      pend_raddr[2*i]   = in_uop[i].s1;
      pend_raddr[2*i+1] = in_uop[i].s2;
    end
  end

  always_comb begin
    logic s1p, s2p;
    held = '0; pend_val = '0;
    n_int = 0; n_fp = 0;
    for (int unsigned i = 0; i < W; i++) begin
      s1p = in_uop[i].s1_v && pend_rdata[2*i];
      s2p = in_uop[i].s2_v && pend_rdata[2*i+1];
      // the youngest older writer in the group decides
      for (int unsigned k = 0; k < i; k++) begin
        if (in_valid[k] && in_uop[k].d_v) begin
          if (in_uop[i].s1_v && in_uop[k].d == in_uop[i].s1) s1p = pend_val[k];
          if (in_uop[i].s2_v && in_uop[k].d == in_uop[i].s2) s2p = pend_val[k];
        end
      end
      held[i]     = in_valid[i] && (s1p || s2p);
      pend_val[i] = held[i] || (in_uop[i].is_load && in_uop[i].pred.miss);
      if (in_valid[i] && !held[i]) begin
        if (in_uop[i].is_fp) n_fp++; else n_int++;
      end
    end
  end

  assign in_ready = !scan_busy && ib_ready &&
                    (n_int <= int'(room_int)) && (n_fp <= int'(room_fp));

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      logic go;
      go = in_ready && in_valid[i];
      ib_valid[i]   = go;
      ib_wait[i]    = held[i];
      ins_valid[i]  = go && !held[i];
      ins[i].uop    = in_uop[i];
      ins[i].ib_id  = ib_id[i];
      pend_we[i]    = go && in_uop[i].d_v;
      pend_waddr[i] = in_uop[i].d;
      pend_wdata[i] = pend_val[i];
    end
  end

endmodule
