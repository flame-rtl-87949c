// mc_ldmul_fu: fused load-multiply unit of a top-row tile (OP_LDMUL).
//
// Computes SPM[a] * b (low word) as one 3-cycle operation. In the issue cycle
// t the tile's load/store unit sends address a to the scratchpad and this unit
// keeps operand b; in cycle t+1 the loaded word arrives (ld_done_i, ld_data_i)
// and the product is registered; in cycle t+2 prod_o holds it with done_o
// high. The unit takes one operation at a time: busy_o is high in cycles t+1
// and t+2, and a new issue is allowed again in the cycle done_o is high.
// The fused load-multiply node, its 3-cycle latency and its being not
// pipelinable are the paper's example of a user-specified fused operation;
// the split into a load cycle and a multiply cycle is this design's choice.
module mc_ldmul_fu
  import flame_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  issue_i,
  input  word_t b_i,
  input  logic  ld_done_i,
  input  word_t ld_data_i,
  output logic  own_o,     // this cycle's loaded word belongs to this unit
  output word_t prod_o,
  output logic  done_o,
  output logic  busy_o
);
  logic  s1;
  word_t bq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= 1'b0;
      bq     <= '0;
      done_o <= 1'b0;
      prod_o <= '0;
    end else begin
      s1     <= issue_i;
      if (issue_i) bq <= b_i;
      done_o <= s1;
      if (s1) prod_o <= ld_data_i * bq;
    end
  end

  assign own_o  = s1;
  assign busy_o = s1 || done_o;

  // the load of the fused operation returns one cycle after its issue
  a_load: assert property (@(posedge clk) disable iff (!rst_n) s1 |-> ld_done_i);
  // not pipelined: no issue while the previous operation is still loading
  a_free: assert property (@(posedge clk) disable iff (!rst_n) issue_i |-> !s1);
endmodule
