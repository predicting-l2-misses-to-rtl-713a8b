// tb_l2_miss_predictor: self-check of the perceptron L2 hit/miss predictor.
//
// A reference model kept in the testbench (filter bits, weights, history,
// sequence number) is run next to the predictor on a random stream of
// lookups (four lanes, a few load PCs), commit-time training with random
// outcomes, history corrections and checkpoint restores. Every response is
// compared with the model's prediction, one cycle after the lookup, and the
// history checkpoint is compared every cycle. A directed part first checks
// that a never-missing load is predicted to hit without touching the
// history, that a miss sets the filter, and that a correction rewrites the
// right history bit.
module tb_l2_miss_predictor;
  import l2p_pkg::*;
  localparam int unsigned ENTRIES = 256, FBITS = 2048, LW = 4;
  localparam int THETA = 35;

  logic clk = 0, rst_n = 0;
  logic [LW-1:0] lk_valid;
  logic [PC_W-1:0] lk_pc [LW];
  logic [LW-1:0] rsp_valid;
  pred_t rsp_pred [LW];
  logic corr_valid, corr_miss;
  pred_t corr_pred;
  logic [GHR_LEN-1:0] ckpt_ghr, restore_ghr;
  logic [PSEQ_W-1:0] ckpt_seq, restore_seq;
  logic restore_valid;
  logic tr_valid, tr_miss;
  logic [PC_W-1:0] tr_pc;
  pred_t tr_pred;

  l2_miss_predictor #(.ENTRIES(ENTRIES), .FILTER_BITS(FBITS), .LW(LW), .THETA(THETA)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------- reference model
  int  m_w [ENTRIES][GHR_LEN+1];
  bit  m_f [FBITS];
  bit [GHR_LEN-1:0] m_ghr;
  bit [PSEQ_W-1:0]  m_seq;

  function automatic int m_y(int row, bit [GHR_LEN-1:0] h);
    int y = m_w[row][0];
    for (int i = 0; i < GHR_LEN; i++) y += h[i] ? m_w[row][i+1] : -m_w[row][i+1];
    return y;
  endfunction

  function automatic int clampw(int v);
    return v > 63 ? 63 : (v < -64 ? -64 : v);
  endfunction

  pred_t exp_pred [LW];
  bit    exp_valid [LW];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL: %s", $time, what); end
  endtask

  // apply one cycle: inputs are set, compute model outputs, clock, update model
  task automatic step();
    bit [GHR_LEN-1:0] h;
    bit [PSEQ_W-1:0] s;
    int row, frow, y;
    pred_t p [LW];
    #1;
    h = m_ghr; s = m_seq;
    for (int l = 0; l < LW; l++) begin
      p[l] = '0; p[l].ghr = h; p[l].seq = s;
      if (lk_valid[l] && m_f[(lk_pc[l] >> 2) % FBITS]) begin
        row = (lk_pc[l] >> 2) % ENTRIES;
        p[l].used = 1; p[l].miss = (m_y(row, h) >= 0);
        h = {h[GHR_LEN-2:0], p[l].miss};
        s++;
      end
    end
    if (corr_valid && corr_pred.used && corr_pred.miss != corr_miss) begin
      bit [PSEQ_W-1:0] dd;
      int d;
      dd = s - corr_pred.seq - 1;
      d = int'(dd);
      if (d < GHR_LEN) h[d] = corr_miss;
    end
    // training (uses weights before this cycle's update)
    if (tr_valid) begin
      frow = (tr_pc >> 2) % FBITS;
      row  = (tr_pc >> 2) % ENTRIES;
      y = m_y(row, tr_pred.ghr);
      if ((m_f[frow] || tr_miss) && (((y >= 0) != tr_miss) || (y <= THETA && y >= -THETA))) begin
        m_w[row][0] = clampw(m_w[row][0] + (tr_miss ? 1 : -1));
        for (int i = 0; i < GHR_LEN; i++)
          m_w[row][i+1] = clampw(m_w[row][i+1] + ((tr_miss == tr_pred.ghr[i]) ? 1 : -1));
      end
      if (tr_miss) m_f[frow] = 1;
    end
    if (restore_valid) begin
      h = restore_ghr; s = restore_seq;
    end
    @(posedge clk);
    m_ghr = h; m_seq = s;
    for (int l = 0; l < LW; l++) begin exp_pred[l] = p[l]; exp_valid[l] = lk_valid[l] && !restore_valid; end
    #1;
    for (int l = 0; l < LW; l++) begin
      check(rsp_valid[l] == exp_valid[l], $sformatf("rsp_valid lane %0d", l));
      if (exp_valid[l]) check(rsp_pred[l] == exp_pred[l],
        $sformatf("lane %0d pred %h want %h", l, rsp_pred[l], exp_pred[l]));
    end
    check(ckpt_ghr == m_ghr && ckpt_seq == m_seq, $sformatf("history %h/%0d want %h/%0d", ckpt_ghr, ckpt_seq, m_ghr, m_seq));
    @(negedge clk);
    lk_valid = '0; corr_valid = 0; tr_valid = 0; restore_valid = 0;
  endtask

  logic [PC_W-1:0] pcs [8];
  pred_t seen [$];

  initial begin
    lk_valid = '0; corr_valid = 0; corr_miss = 0; corr_pred = '0;
    restore_valid = 0; restore_ghr = '0; restore_seq = '0;
    tr_valid = 0; tr_miss = 0; tr_pc = '0; tr_pred = '0;
    for (int l = 0; l < LW; l++) lk_pc[l] = '0;
    for (int e = 0; e < ENTRIES; e++) for (int i = 0; i <= GHR_LEN; i++) m_w[e][i] = 0;
    for (int f = 0; f < FBITS; f++) m_f[f] = 0;
    m_ghr = '0; m_seq = '0;
    for (int i = 0; i < 8; i++) pcs[i] = 32'h1000 + 32'(i * 68);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // directed: unseen load predicted hit, no history change
    lk_valid = 4'b0001; lk_pc[0] = pcs[0];
    step();
    check(rsp_pred[0].used == 0 && rsp_pred[0].miss == 0, "cold load predicted hit without lookup");
    check(ckpt_seq == 0, "cold load leaves history");
    // a miss at commit sets the filter; next lookup uses the perceptron
    tr_valid = 1; tr_pc = pcs[0]; tr_miss = 1; tr_pred = '0;
    step();
    lk_valid = 4'b0011; lk_pc[0] = pcs[0]; lk_pc[1] = pcs[0];
    step();
    check(rsp_pred[0].used && rsp_pred[0].miss, "trained load predicted to miss");
    check(rsp_pred[1].seq == rsp_pred[0].seq + 1 && rsp_pred[1].ghr[0] == 1'b1,
          "second lane sees the first lane's prediction");
    // correction of the older of the two: it is history bit 1
    corr_valid = 1; corr_pred = rsp_pred[0]; corr_miss = 0;
    step();
    check(ckpt_ghr[1:0] == 2'b01, $sformatf("corrected history %b", ckpt_ghr[1:0]));

    // random part
    for (int cyc = 0; cyc < 4000; cyc++) begin
      for (int l = 0; l < LW; l++) begin
        lk_valid[l] = ($urandom % 2);
        lk_pc[l] = pcs[$urandom % 8];
      end
      if (($urandom % 3) == 0) begin
        tr_valid = 1; tr_pc = pcs[$urandom % 8];
        tr_miss  = ($urandom % 4) != 0 ? tr_pc[3] : $urandom % 2;
        tr_pred  = seen.size() > 0 ? seen[$urandom % seen.size()] : '0;
      end
      if (seen.size() > 0 && ($urandom % 3) == 0) begin
        corr_valid = 1; corr_pred = seen[seen.size() - 1 - ($urandom % (seen.size() < 6 ? seen.size() : 6))];
        corr_miss = $urandom % 2;
      end
      if (($urandom % 50) == 0) begin
        restore_valid = 1; restore_ghr = GHR_LEN'($urandom); restore_seq = PSEQ_W'($urandom);
      end
      step();
      for (int l = 0; l < LW; l++) if (rsp_valid[l] && rsp_pred[l].used) seen.push_back(rsp_pred[l]);
      while (seen.size() > 16) void'(seen.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
