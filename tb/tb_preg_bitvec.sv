// tb_preg_bitvec: random self-check of the per-register bit vector.
//
// Drives random writes, many of them to the same few bits so that port
// priority matters, and random reads; compares every read with a reference
// array updated in the testbench (ports applied in order, last one wins).
// Also checks the reset value.
module tb_preg_bitvec;
  import l2p_pkg::*;
  localparam int unsigned N = 40, NW = 3, NR = 4;

  logic clk = 0, rst_n = 0;
  logic [NW-1:0] we, wdata;
  preg_t waddr [NW];
  preg_t raddr [NR];
  logic [NR-1:0] rdata;
  int checks = 0, failures = 0;
  logic ref_bits [N];

  preg_bitvec #(.N(N), .NW(NW), .NR(NR), .RST_VAL(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wdata = '0;
    for (int i = 0; i < NW; i++) waddr[i] = '0;
    for (int i = 0; i < NR; i++) raddr[i] = preg_t'(i);
    for (int i = 0; i < N; i++) ref_bits[i] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset value
    for (int i = 0; i < N; i += NR) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) raddr[r] = preg_t'((i + r) % N);
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== 1'b1) begin failures++; $display("reset bit %0d = %b", (i+r)%N, rdata[r]); end
      end
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NW; i++) begin
        we[i]    = ($urandom % 3) != 0;
        waddr[i] = preg_t'((cyc % 2) ? $urandom % 4 : $urandom % N);
        wdata[i] = $urandom % 2;
      end
      for (int r = 0; r < NR; r++) raddr[r] = preg_t'($urandom % N);
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== ref_bits[raddr[r]]) begin
          failures++;
          $display("cycle %0d read %0d: got %b want %b", cyc, raddr[r], rdata[r], ref_bits[raddr[r]]);
        end
      end
      @(posedge clk);
      for (int i = 0; i < NW; i++) if (we[i]) ref_bits[waddr[i]] = wdata[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
