// tb_issue_queue: random self-check of the issue queue.
//
// An 8-entry queue receives random insertions (never more than the room it
// reports), random wakeup broadcasts, random issue limits and occasional
// squashes. The testbench keeps its own list of queued instructions with
// their source-ready state. Each cycle it checks the reported room and
// occupancy, that the number issued is min(ready, limit, 4), that every issued
// instruction was queued and ready, and at the end that every instruction
// inserted was issued exactly once or squashed.
module tb_issue_queue;
  import l2p_pkg::*;
  localparam int unsigned SIZE = 8, W = 4, IW = 4, WK = 2;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] ins_valid, ins_r1, ins_r2;
  iq_in_t ins [W];
  logic [$clog2(W+1)-1:0] room;
  logic [WK-1:0] wk_valid;
  preg_t wk_tag [WK];
  logic [$clog2(IW+1)-1:0] issue_limit, iss_count;
  logic [IW-1:0] iss_valid;
  iq_in_t iss [IW];
  logic sq_valid;
  ibid_t sq_id, ib_head;
  logic [$clog2(SIZE+1)-1:0] occupancy;

  issue_queue #(.SIZE(SIZE), .W(W), .IW(IW), .WK(WK), .IB_DEPTH(2048)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL: %s", $time, what); end
  endtask

  typedef struct { int id; int s1, s2; bit r1, r2; } ent_t;
  ent_t q [$];
  int next_id = 0, inserted = 0, issued = 0, squashed = 0, n_limited = 0;
  bit done_id [16384];
  int sq_int;

  function automatic bit woken(int t);
    for (int k = 0; k < WK; k++) if (wk_valid[k] && int'(wk_tag[k]) == t) return 1;
    return 0;
  endfunction

  initial begin
    ins_valid = '0; ins_r1 = '0; ins_r2 = '0; wk_valid = '0; issue_limit = '0;
    sq_valid = 0; sq_id = '0; ib_head = '0;
    for (int i = 0; i < W; i++) ins[i] = '0;
    for (int k = 0; k < WK; k++) wk_tag[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int nready, want, n, rm;
      @(negedge clk);
      rm = (SIZE - q.size()) < W ? SIZE - q.size() : W;
      #1;
      check(int'(room) == rm && int'(occupancy) == q.size(), $sformatf("room %0d/%0d occ %0d/%0d", room, rm, occupancy, q.size()));
      n = (cyc > 5000) ? 0 : $urandom % (rm + 1);
      for (int i = 0; i < W; i++) begin
        ins_valid[i] = i < n;
        ins[i] = '0;
        ins[i].ib_id = ibid_t'((next_id + i) % 2048);
        ins[i].uop.s1_v = $urandom % 4 != 0; ins[i].uop.s1 = preg_t'($urandom % 16);
        ins[i].uop.s2_v = $urandom % 2;      ins[i].uop.s2 = preg_t'($urandom % 16);
        ins_r1[i] = $urandom % 2; ins_r2[i] = $urandom % 2;
      end
      for (int k = 0; k < WK; k++) begin
        wk_valid[k] = (cyc > 5000) || ($urandom % 2); wk_tag[k] = preg_t'($urandom % 16);
      end
      issue_limit = 3'($urandom % (IW + 1));
      sq_valid = (cyc < 5000) && ($urandom % 100 == 0);
      sq_int = next_id - ($urandom % 6);
      if (q.size() > 0 && sq_int < q[0].id) sq_int = q[0].id;
      if (q.size() == 0 && sq_int < next_id) sq_int = next_id;
      sq_id = ibid_t'(sq_int % 2048);
      ib_head = ibid_t'((q.size() > 0 ? q[0].id : next_id) % 2048);
      #1;
      nready = 0;
      foreach (q[j]) if (q[j].r1 && q[j].r2) nready++;
      want = nready < int'(issue_limit) ? nready : int'(issue_limit);
      if (nready > int'(issue_limit)) n_limited++;
      check(int'(iss_count) == want, $sformatf("issued %0d want %0d", iss_count, want));
      for (int j = 0; j < IW; j++) begin
        check(iss_valid[j] == (j < want), "issue lanes packed");
        if (iss_valid[j]) begin
          int f;
          f = -1;
          foreach (q[x]) if ((q[x].id % 2048) == int'(iss[j].ib_id)) f = x;
          check(f >= 0 && q[f].r1 && q[f].r2, $sformatf("issued %0d was queued and ready", iss[j].ib_id));
          if (f >= 0) begin done_id[q[f].id] = 1; q.delete(f); issued++; end
        end
      end
      @(posedge clk);
      // model: wakeup, squash, insert
      foreach (q[x]) begin
        if (woken(q[x].s1)) q[x].r1 = 1;
        if (woken(q[x].s2)) q[x].r2 = 1;
      end
      if (sq_valid) begin
        for (int x = q.size() - 1; x >= 0; x--)
          if (q[x].id >= sq_int) begin done_id[q[x].id] = 1; q.delete(x); squashed++; end
      end
      for (int i = 0; i < n; i++) begin
        ent_t e;
        e.id = next_id + i;
        e.s1 = ins[i].uop.s1; e.s2 = ins[i].uop.s2;
        e.r1 = !ins[i].uop.s1_v || ins_r1[i] || woken(e.s1);
        e.r2 = !ins[i].uop.s2_v || ins_r2[i] || woken(e.s2);
        if (sq_valid && e.id >= sq_int) begin done_id[e.id] = 1; squashed++; end
        else q.push_back(e);
        inserted++;
      end
      next_id += n;
    end
    for (int i = 0; i < next_id; i++) check(done_id[i], $sformatf("instruction %0d lost", i));
    check(n_limited > 0 && squashed > 0, "issue limit and squash exercised");
    $display("inserted=%0d issued=%0d squashed=%0d", inserted, issued, squashed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
