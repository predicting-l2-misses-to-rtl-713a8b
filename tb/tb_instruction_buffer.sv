// tb_instruction_buffer: random self-check of the Instruction Buffer.
//
// A small buffer (16 entries) is driven with random allocations, commits,
// squashes and waiting-bit updates. A reference model (array, head, count)
// predicts the ids handed out, the occupancy, and the contents, waiting bits
// and validity returned by the scan read port, which are checked every cycle.
module tb_instruction_buffer;
  import l2p_pkg::*;
  localparam int unsigned DEPTH = 16, W = 4, CW = 8;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] al_valid, al_wait;
  uop_t al_uop [W];
  ibid_t al_id [W];
  logic al_ready;
  logic [$clog2(CW+1)-1:0] cm_count;
  logic sq_valid;
  ibid_t sq_id, rd_id;
  uop_t rd_uop [W];
  logic [W-1:0] rd_valid, rd_wait, clr_valid;
  ibid_t clr_id [W];
  logic set_valid;
  ibid_t set_id, head, tail;
  logic [$clog2(DEPTH+1)-1:0] count;

  instruction_buffer #(.DEPTH(DEPTH), .W(W), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uop_t m_mem [DEPTH];
  bit   m_wait [DEPTH];
  int   m_head = 0, m_count = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL: %s", $time, what); end
  endtask

  function automatic uop_t rnd_uop();
    uop_t u;
    u = '0;
    u.pc = $urandom; u.op = 16'($urandom); u.d = preg_t'($urandom); u.s1 = preg_t'($urandom);
    u.d_v = 1; u.is_load = $urandom % 2;
    return u;
  endfunction

  int n_squash = 0, n_full = 0;

  initial begin
    al_valid = '0; al_wait = '0; cm_count = '0; sq_valid = 0; sq_id = '0; rd_id = '0;
    clr_valid = '0; set_valid = 0; set_id = '0;
    for (int i = 0; i < W; i++) begin al_uop[i] = '0; clr_id[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int n, c, sq, free_ok;
      int sqa;
      @(negedge clk);
      n = $urandom % (W + 1);
      al_valid = '0;
      for (int i = 0; i < W; i++) begin
        al_valid[i] = i < n; al_uop[i] = rnd_uop(); al_wait[i] = $urandom % 2;
      end
      c = m_count == 0 ? 0 : $urandom % ((m_count < CW ? m_count : CW) + 1);
      if (($urandom % 3) == 0) c = 0;
      cm_count = c[$clog2(CW+1)-1:0];
      sq_valid = (m_count > 0) && (($urandom % 20) == 0);
      sqa = m_count > 0 ? $urandom % m_count : 0;
      sq_id = ibid_t'((m_head + sqa) % DEPTH);
      if (sq_valid && c > sqa) begin c = sqa; cm_count = c[$clog2(CW+1)-1:0]; end
      rd_id = ibid_t'($urandom % DEPTH);
      clr_valid = '0;
      for (int i = 0; i < W; i++) begin
        clr_valid[i] = (m_count > 0) && ($urandom % 2);
        clr_id[i] = ibid_t'((m_head + (m_count > 0 ? $urandom % m_count : 0)) % DEPTH);
      end
      set_valid = (m_count > 0) && ($urandom % 2);
      set_id = ibid_t'((m_head + (m_count > 0 ? $urandom % m_count : 0)) % DEPTH);
      #1;
      free_ok = (m_count + W <= DEPTH);
      check(al_ready == free_ok, "al_ready");
      check(int'(count) == m_count && int'(head) == m_head, $sformatf("count %0d/%0d head %0d/%0d", count, m_count, head, m_head));
      for (int i = 0; i < W; i++) check(int'(al_id[i]) == (m_head + m_count + i) % DEPTH, "al_id");
      for (int i = 0; i < W; i++) begin
        int a;
        bit v;
        a = (int'(rd_id) + i) % DEPTH;
        v = ((a - m_head + DEPTH) % DEPTH) < m_count;
        check(rd_valid[i] == v, $sformatf("rd_valid %0d", a));
        if (v) check(rd_uop[i] == m_mem[a] && rd_wait[i] == m_wait[a], $sformatf("rd entry %0d", a));
      end
      @(posedge clk);
      // model update, same order as the hardware
      if (!free_ok && n > 0) n_full++;
      if (sq_valid) begin
        m_count = sqa; n_squash++;
      end else if (n > 0 && free_ok) begin
        for (int i = 0; i < n; i++) begin
          m_mem[(m_head + m_count + i) % DEPTH] = al_uop[i];
        end
      end
      for (int i = 0; i < W; i++) if (clr_valid[i]) m_wait[clr_id[i]] = 0;
      if (set_valid) m_wait[set_id] = 1;
      if (!sq_valid && n > 0 && free_ok) begin
        for (int i = 0; i < n; i++) m_wait[(m_head + m_count + i) % DEPTH] = al_wait[i];
        m_count += n;
      end
      m_head = (m_head + c) % DEPTH;
      m_count -= c;
    end
    check(n_squash > 0 && n_full > 0, "squash and full buffer both exercised");
    $display("squashes=%0d full=%0d", n_squash, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
