// tb_ib_scanner: directed self-check of the IB scanner.
//
// The testbench plays the Instruction Buffer and the L2-dependence vector
// with plain arrays, and applies the scanner's insertions to them at each
// clock edge as the real blocks would. Scenarios, with the cycle of every
// insertion checked against values worked out by hand:
//  1. a resolved load: its dependants (including a chain inside one group and
//     a floating-point one) are inserted, entries depending on another miss
//     are not, a dependant load still predicted to miss keeps its destination
//     pending; the scan covers 4 entries per cycle and ends at the youngest.
//  2. a full issue queue (room 1) makes the scan retry the same entry.
//  3. go-back: while scanning, a resolution for an older entry sends the scan
//     back there, and an entry already passed is then inserted.
module tb_ib_scanner;
  import l2p_pkg::*;
  localparam int unsigned DEPTH = 32, W = 4, CW = 8;

  logic clk = 0, rst_n = 0;
  logic ev_valid;
  ibid_t ev_id, ib_head, rd_id;
  logic [$clog2(DEPTH+1)-1:0] ib_count;
  logic [$clog2(CW+1)-1:0] ib_cm_count;
  uop_t rd_uop [W];
  logic [W-1:0] rd_valid, rd_wait;
  preg_t pend_raddr [2*W];
  logic [2*W-1:0] pend_rdata;
  logic [W-1:0] pend_we, pend_wdata, ins_valid;
  preg_t pend_waddr [W];
  logic [$clog2(W+1)-1:0] room_int, room_fp;
  iq_in_t ins [W];
  logic busy;

  ib_scanner #(.DEPTH(DEPTH), .W(W), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IB and dependence-vector models
  uop_t m_uop [DEPTH];
  bit   m_wait [DEPTH];
  bit   m_pend [64];
  int   m_count;
  int   ins_cyc [DEPTH];
  int   cyc;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      int a;
      a = (int'(rd_id) + i) % DEPTH;
      rd_uop[i]   = m_uop[a];
      rd_wait[i]  = m_wait[a];
      rd_valid[i] = a < m_count;          // head is 0 in this test
    end
    for (int i = 0; i < 2*W; i++) pend_rdata[i] = m_pend[pend_raddr[i] % 64];
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL: %s", $time, what); end
  endtask

  function automatic uop_t mk(int d, int s1, bit fp, bit ld, bit pmiss);
    uop_t u;
    u = '0;
    u.d_v = 1; u.d = preg_t'(d);
    u.s1_v = s1 >= 0; u.s1 = preg_t'(s1 < 0 ? 0 : s1);
    u.is_fp = fp; u.is_load = ld; u.pred.miss = pmiss;
    return u;
  endfunction

  task automatic put(int id, int d, int s1, bit w, bit fp = 0, bit ld = 0, bit pmiss = 0);
    m_uop[id] = mk(d, s1, fp, ld, pmiss);
    m_wait[id] = w;
    if (w || (ld && pmiss)) m_pend[d] = 1;
    ins_cyc[id] = -1;
  endtask

  // one clock: sample outputs, then apply the scanner's writes
  int busy_cycles;
  task automatic tick();
    logic [W-1:0] iv, pw, pd;
    preg_t pa [W];
    ibid_t ids [W];
    #1;
    if (busy) busy_cycles++;
    for (int i = 0; i < W; i++) begin
      iv[i] = ins_valid[i]; pw[i] = pend_we[i]; pd[i] = pend_wdata[i];
      pa[i] = pend_waddr[i]; ids[i] = ins[i].ib_id;
      if (ins_valid[i]) begin
        check(ins[i].ib_id == rd_id + ibid_t'(i), "ins id matches lane");
        check(ins_cyc[ins[i].ib_id] == -1, $sformatf("entry %0d inserted twice", ins[i].ib_id));
        ins_cyc[ins[i].ib_id] = cyc;
      end
    end
    @(posedge clk);
    #1;
    for (int i = 0; i < W; i++) begin
      if (iv[i]) m_wait[ids[i]] = 0;
      if (pw[i]) m_pend[pa[i] % 64] = pd[i];
    end
    cyc++;
    @(negedge clk);
    ev_valid = 0;
  endtask

  task automatic event_at(int id, int reg_clear);
    ev_valid = 1; ev_id = ibid_t'(id);
    if (reg_clear >= 0) m_pend[reg_clear] = 0;   // the resolved load's destination
  endtask

  initial begin
    ev_valid = 0; ev_id = '0; ib_head = '0; ib_cm_count = '0;
    room_int = 3'd4; room_fp = 3'd4;
    for (int i = 0; i < 64; i++) m_pend[i] = 0;
    for (int i = 0; i < DEPTH; i++) begin m_uop[i] = '0; m_wait[i] = 0; ins_cyc[i] = -1; end
    m_count = 0; cyc = 0;
    // IB contents (see header)
    put(0, 10, -1, 0, 0, 1, 1);     // load predicted to miss, in the queue
    put(1, 11, 10, 1);              // depends on the load
    put(2, 12, 11, 1);              // chain inside the same group
    put(3, 13, -1, 0);              // independent, already in the queue
    m_pend[20] = 1;                 // another unresolved miss
    put(4, 14, 20, 1);
    put(5, 15, 14, 1);
    put(6, 16, 12, 1);
    put(7, 17, 10, 1, 1);           // floating point dependant
    put(8, 18, 16, 1, 0, 1, 1);     // dependant load, itself predicted to miss
    put(9, 19, 18, 1);
    m_count = 10;
    ib_count = 10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1: resolve the load in entry 0
    check(!busy, "idle after reset");
    event_at(0, 10);
    busy_cycles = 0;
    tick();
    for (int k = 0; k < 10 && busy; k++) tick();
    check(busy_cycles == 3, $sformatf("10 entries scanned in %0d cycles, want 3", busy_cycles));
    check(ins_cyc[1] == 1 && ins_cyc[2] == 1, "chain inserted in the first scan cycle");
    check(ins_cyc[6] == 2 && ins_cyc[7] == 2, "second group inserted");
    check(ins_cyc[8] == 3, "dependant load inserted");
    check(ins_cyc[3] == -1 && ins_cyc[4] == -1 && ins_cyc[5] == -1 && ins_cyc[9] == -1,
          "entries in the queue or waiting on other misses left alone");
    check(!m_pend[11] && !m_pend[12] && !m_pend[16] && !m_pend[17], "inserted destinations cleared");
    check(m_pend[18] && m_pend[14] && m_pend[15], "pending destinations kept");

    // ---- 2: resolve the miss of register 20 with room for one integer instruction
    room_int = 3'd1;
    event_at(4, 20);
    cyc = 10;
    busy_cycles = 0;
    tick();
    for (int k = 0; k < 10 && busy; k++) tick();
    check(ins_cyc[4] == 11 && ins_cyc[5] == 12, $sformatf("room stall: entries 4,5 at %0d,%0d want 11,12", ins_cyc[4], ins_cyc[5]));
    check(busy_cycles == 3, $sformatf("stalled scan took %0d cycles, want 3", busy_cycles));
    room_int = 3'd4;

    // ---- 3: go-back
    m_pend[30] = 1;
    put(10, 20, 30, 1);             // waits on register 30
    for (int i = 11; i < 18; i++) put(i, 21 + i, 40, 1);
    m_pend[40] = 1;
    m_count = 18; ib_count = 18;
    event_at(8, 18);                // load of entry 8 resolves: entry 9 ready
    cyc = 20;
    tick();                         // cycle 21: scan 9..12
    tick();                         // cycle 22: scan 13..16, older resolution arrives
    event_at(3, 30);
    check(ins_cyc[9] == 21, "entry 9 inserted");
    check(ins_cyc[10] == -1, "entry 10 still waiting before go-back");
    tick();
    for (int k = 0; k < 10 && busy; k++) tick();
    check(ins_cyc[10] == 24, $sformatf("go-back: entry 10 inserted at %0d, want 24", ins_cyc[10]));
    check(!busy, "scan ended");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
