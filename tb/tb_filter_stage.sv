// tb_filter_stage: random self-check of the Filter stage.
//
// Random renamed groups (sources and destinations drawn from 16 registers so
// that chains inside a group are frequent, some loads predicted to miss) are
// applied together with a random L2-dependence vector, queue room, IB room
// and scanner state. A reference written in the testbench decides which
// instructions are held, what is written to the vector and whether the group
// is accepted; every output is compared with it. Counts confirm that holds,
// in-group chains and both kinds of rejection occurred.
module tb_filter_stage;
  import l2p_pkg::*;
  localparam int unsigned W = 4;

  logic [W-1:0] in_valid, pend_we, pend_wdata, ib_valid, ib_wait, ins_valid;
  uop_t in_uop [W];
  logic in_ready, scan_busy, ib_ready;
  preg_t pend_raddr [2*W], pend_waddr [W];
  logic [2*W-1:0] pend_rdata;
  ibid_t ib_id [W];
  logic [$clog2(W+1)-1:0] room_int, room_fp;
  iq_in_t ins [W];

  filter_stage #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  bit pend [16];
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int i = 0; i < 2*W; i++) pend_rdata[i] = pend[pend_raddr[i] % 16];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL: %s", $time, what); end
  endtask

  int n_held = 0, n_chain = 0, n_rej_room = 0, n_rej_scan = 0, n_acc = 0;

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int n, ni, nf;
      bit e_held [W], e_pv [W];
      bit acc;
      bit cur [16];
      @(negedge clk);
      for (int r = 0; r < 16; r++) pend[r] = ($urandom % 4) == 0;
      n = $urandom % (W + 1);
      for (int i = 0; i < W; i++) begin
        in_valid[i] = i < n;
        in_uop[i] = '0;
        in_uop[i].pc = $urandom;
        in_uop[i].s1_v = $urandom % 4 != 0; in_uop[i].s1 = preg_t'($urandom % 16);
        in_uop[i].s2_v = $urandom % 2;      in_uop[i].s2 = preg_t'($urandom % 16);
        in_uop[i].d_v  = $urandom % 5 != 0; in_uop[i].d  = preg_t'($urandom % 16);
        in_uop[i].is_load = $urandom % 3 == 0;
        in_uop[i].pred.miss = $urandom % 2;
        in_uop[i].is_fp = $urandom % 3 == 0;
        ib_id[i] = ibid_t'($urandom);
      end
      scan_busy = $urandom % 8 == 0;
      ib_ready  = $urandom % 8 != 0;
      room_int  = 3'($urandom % 5);
      room_fp   = 3'($urandom % 5);
      // reference
      for (int r = 0; r < 16; r++) cur[r] = pend[r];
      ni = 0; nf = 0;
      for (int i = 0; i < W; i++) begin
        bit s1p, s2p;
        s1p = in_uop[i].s1_v && cur[in_uop[i].s1];
        s2p = in_uop[i].s2_v && cur[in_uop[i].s2];
        e_held[i] = in_valid[i] && (s1p || s2p);
        e_pv[i] = e_held[i] || (in_uop[i].is_load && in_uop[i].pred.miss);
        if (in_valid[i] && in_uop[i].d_v) begin
          if (e_pv[i] != cur[in_uop[i].d]) n_chain++;
          cur[in_uop[i].d] = e_pv[i];
        end
        if (in_valid[i] && !e_held[i]) begin if (in_uop[i].is_fp) nf++; else ni++; end
        if (e_held[i]) n_held++;
      end
      acc = !scan_busy && ib_ready && ni <= room_int && nf <= room_fp;
      if (n > 0 && !acc && scan_busy) n_rej_scan++;
      if (n > 0 && !acc && !scan_busy && ib_ready) n_rej_room++;
      if (n > 0 && acc) n_acc++;
      #1;
      check(in_ready == acc, "group acceptance");
      for (int i = 0; i < W; i++) begin
        bit go;
        go = acc && in_valid[i];
        check(ib_valid[i] == go, $sformatf("t%0d lane %0d ib_valid", t, i));
        if (go) begin
          check(ib_wait[i] == e_held[i], $sformatf("t%0d lane %0d held", t, i));
          check(ins_valid[i] == !e_held[i], $sformatf("t%0d lane %0d insert", t, i));
          check(ins[i].ib_id == ib_id[i] && ins[i].uop == in_uop[i], "insert payload");
          check(pend_we[i] == in_uop[i].d_v, "vector write enable");
          if (in_uop[i].d_v) check(pend_waddr[i] == in_uop[i].d && pend_wdata[i] == e_pv[i],
                                   $sformatf("t%0d lane %0d vector write", t, i));
        end else begin
          check(!ins_valid[i] && !pend_we[i], "nothing written for a rejected lane");
        end
      end
    end
    check(n_held > 0 && n_chain > 0 && n_rej_room > 0 && n_rej_scan > 0 && n_acc > 0,
          "all cases exercised");
    $display("held=%0d chain=%0d rej_room=%0d rej_scan=%0d acc=%0d", n_held, n_chain, n_rej_room, n_rej_scan, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
