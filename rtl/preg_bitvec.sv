// preg_bitvec: one bit per physical register, with several write and read ports.
//
// The late-inserting scheduler uses it as the L2-dependence vector: bit p is 1
// while physical register p depends on an L2 miss that has not resolved yet
// (a load predicted to miss, or any instruction held back because one of its
// sources is such a register). The same module also serves as the register
// ready scoreboard of the issue stage (bit p is 1 once p has been produced).
//
// Interface: NW write ports (we/waddr/wdata) update bits at the clock edge;
// when two ports write the same bit in one cycle the higher-numbered port
// wins, so a caller orders its ports from oldest to youngest. NR read ports
// return the stored value combinationally; reads do not see writes of the
// same cycle (the caller bypasses within its own group). After reset every
// bit holds RST_VAL.
//
// The vector size (one bit per physical register) follows the processor
// description; the port counts, the write-priority rule and the reset value
// are choices of this implementation.
module preg_bitvec
  import l2p_pkg::*;
#(
  parameter int unsigned N       = 2112,
  parameter int unsigned NW      = 4,
  parameter int unsigned NR      = 8,
  parameter bit          RST_VAL = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] we,
  input  preg_t         waddr [NW],
  input  logic [NW-1:0] wdata,
  input  preg_t         raddr [NR],
  output logic [NR-1:0] rdata
);

  logic [N-1:0] bits_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q <= {N{RST_VAL}};
    end else begin
      for (int unsigned i = 0; i < NW; i++) begin
        if (we[i] && (int'(waddr[i]) < N)) bits_q[waddr[i]] <= wdata[i];
      end
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      rdata[r] = (int'(raddr[r]) < N) ? bits_q[raddr[r]] : RST_VAL;
    end
  end

endmodule
