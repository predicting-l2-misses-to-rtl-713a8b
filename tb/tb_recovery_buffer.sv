// tb_recovery_buffer: directed self-check of the Recovery Buffer.
//
// The testbench issues small groups into the buffer and feeds every replayed
// group back in, as the issue stage does. Checked against hand-worked values:
//  1. L2 hit: the chain of dependants of a load (including one issued in the
//     cycle of the event) is replayed starting the next cycle, with the gaps
//     of the original issue timing; an independent instruction is not; issue
//     is blocked (replaying) for the replay length plus one empty cycle.
//  2. L2 miss: the load and its dependants are reported one per cycle, the
//     load first with waiting=0, dependants with waiting=1.
//  3. No MSHR: the load itself is reported with waiting=1.
//  4. An event for a load that has already left the buffer does nothing.
module tb_recovery_buffer;
  import l2p_pkg::*;
  localparam int unsigned IW = 4, LEN = 13;

  logic clk = 0, rst_n = 0;
  logic [IW-1:0] in_valid, rp_valid;
  iq_in_t in [IW], rp [IW];
  logic ev_valid, ev_ready, replaying, ex_valid, ex_wait, ex_dest_v;
  rb_ev_t ev_kind;
  ibid_t ev_id, ex_id;
  preg_t ex_dest;

  recovery_buffer #(.IW(IW), .LEN(LEN)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d FAIL: %s", cyc, what); end
  endtask

  function automatic iq_in_t mk(int id, int d, int s1, bit ld = 0);
    iq_in_t x;
    x = '0;
    x.ib_id = ibid_t'(id);
    x.uop.d_v = 1; x.uop.d = preg_t'(d);
    x.uop.s1_v = s1 >= 0; x.uop.s1 = preg_t'(s1 < 0 ? 0 : s1);
    x.uop.is_load = ld;
    return x;
  endfunction

  // what to issue in a given cycle
  iq_in_t plan [int][$];
  int rp_cyc [int];            // ib id -> cycle of its replay
  int rp_busy_cycles;
  typedef struct { int id; bit w; int d; } exr_t;
  exr_t exlog [$];

  task automatic run(int upto);
    while (cyc < upto) begin
      @(negedge clk);
      cyc++;
      ev_valid = 0;
      in_valid = '0;
      #1;
      if (replaying) begin
        rp_busy_cycles++;
        for (int j = 0; j < IW; j++) begin
          in_valid[j] = rp_valid[j]; in[j] = rp[j];
          if (rp_valid[j]) rp_cyc[int'(rp[j].ib_id)] = cyc;
        end
      end else if (plan.exists(cyc)) begin
        for (int j = 0; j < plan[cyc].size(); j++) begin in_valid[j] = 1; in[j] = plan[cyc][j]; end
      end
      if (ex_valid) exlog.push_back('{int'(ex_id), ex_wait, int'(ex_dest)});
      if (cyc == ev_at) begin
        ev_valid = 1; ev_kind = ev_k; ev_id = ibid_t'(ev_ld);
        check(ev_ready, "event accepted");
      end
      @(posedge clk);
    end
  endtask

  int ev_at = -1, ev_ld;
  rb_ev_t ev_k;

  initial begin
    in_valid = '0; ev_valid = 0; ev_kind = EV_L1_HIT; ev_id = '0;
    for (int j = 0; j < IW; j++) in[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- 1: L2 hit at cycle 5 for the load issued at cycle 1
    plan[1] = '{mk(5, 10, -1, 1)};
    plan[3] = '{mk(6, 11, 10), mk(7, 12, 3)};
    plan[4] = '{mk(8, 13, 11)};
    plan[6] = '{mk(9, 14, 13)};
    ev_at = 6; ev_ld = 5; ev_k = EV_L2_HIT;
    rp_busy_cycles = 0;
    run(20);
    check(rp_cyc.exists(6) && rp_cyc[6] == 8, "first dependant replayed two cycles after the load's next group");
    check(rp_cyc.exists(8) && rp_cyc[8] == 9, "chain keeps its issue gap");
    check(rp_cyc.exists(9) && rp_cyc[9] == 11, "dependant issued in the event cycle replayed last");
    check(!rp_cyc.exists(7), "independent instruction not replayed");
    check(!rp_cyc.exists(5), "the load itself not replayed");
    check(rp_busy_cycles == 6, $sformatf("replay lasted %0d cycles, want 6 (5 groups and an empty tail)", rp_busy_cycles));
    check(exlog.size() == 0, "nothing taken back on a hit");

    // ---- 2: L2 miss
    plan[30] = '{mk(20, 30, -1, 1), mk(24, 34, 2)};
    plan[31] = '{mk(21, 31, 30)};
    plan[33] = '{mk(22, 32, 31), mk(23, 33, 4)};
    ev_at = 40; ev_ld = 20; ev_k = EV_L2_MISS;
    run(50);
    check(exlog.size() == 3, $sformatf("%0d instructions taken back, want 3", exlog.size()));
    if (exlog.size() == 3) begin
      check(exlog[0].id == 20 && !exlog[0].w && exlog[0].d == 30, "load reported first, not waiting");
      check(exlog[1].id == 21 && exlog[1].w && exlog[2].id == 22 && exlog[2].w, "dependants in issue order, waiting");
    end
    check(rp_cyc.size() == 3, "no replay on a miss");

    // ---- 3: lack of MSHR: the load itself goes back to wait
    exlog.delete();
    plan[60] = '{mk(40, 40, -1, 1)};
    plan[62] = '{mk(41, 41, 40)};
    ev_at = 65; ev_ld = 40; ev_k = EV_NO_MSHR;
    run(75);
    check(exlog.size() == 2 && exlog[0].id == 40 && exlog[0].w && exlog[1].id == 41,
          "load and dependant taken back, both waiting");

    // ---- 4: too late: the load has left the buffer
    exlog.delete();
    plan[80] = '{mk(50, 50, -1, 1)};
    plan[81] = '{mk(51, 51, 50)};
    ev_at = 80 + LEN + 2; ev_ld = 50; ev_k = EV_L2_MISS;
    run(110);
    check(exlog.size() == 0 && rp_cyc.size() == 3, "event for a departed load ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
