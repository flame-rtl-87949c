// mc_mul_fu: multi-cycle multiplier / fused multiply-accumulate unit.
//
// Computes the low word of a * b, or of a * b + c when mac_i is high (the
// fused MAC node that the compiler forms from a multiply feeding an add).
// An operation issued in cycle t has its result valid, with done_o high, in
// cycle t+LAT-1. The product is formed in the issue cycle and carried through
// LAT-1 registers, which synthesis retiming can spread over the multiplier.
// PIPELINED = 1 lets a new product be issued every cycle (pipeline registers
// hold each one in flight); PIPELINED = 0 keeps a single holding register, so
// only one product may be in flight and busy_o is high while it is. The paper
// names multiplication as multi-cycle at 1 GHz and MAC as a typical fused
// multi-cycle operation but gives no latency: LAT = 2 is this design's
// choice, as is sharing one unit between multiply and MAC.
module mc_mul_fu
  import flame_pkg::*;
#(
  parameter int unsigned LAT       = 2,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  issue_i,
  input  word_t a_i,
  input  word_t b_i,
  input  word_t c_i,
  input  logic  mac_i,
  output word_t prod_o,
  output logic  done_o,
  output logic  busy_o
);
  word_t p0;
  assign p0 = a_i * b_i + (mac_i ? c_i : '0);

  if (LAT == 1) begin : g_comb
    assign prod_o = p0;
    assign done_o = issue_i;
    assign busy_o = 1'b0;
  end else if (PIPELINED) begin : g_pipe
    word_t            p [1:LAT-1];
    logic [LAT-1:1]   v;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v <= '0;
        for (int i = 1; i < LAT; i++) p[i] <= '0;
      end else begin
        v[1] <= issue_i;
        p[1] <= p0;
        for (int i = 2; i < LAT; i++) begin
          v[i] <= v[i-1];
          p[i] <= p[i-1];
        end
      end
    end
    assign prod_o = p[LAT-1];
    assign done_o = v[LAT-1];
    assign busy_o = 1'b0;
  end else begin : g_hold
    word_t                    p;
    logic [$clog2(LAT+1)-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        p   <= '0;
        cnt <= '0;
      end else if (cnt == '0) begin
        if (issue_i) begin
          p   <= p0;
          cnt <= 1;
        end
      end else begin
        cnt <= (32'(cnt) == LAT - 1) ? '0 : cnt + 1'b1;
      end
    end
    assign prod_o = p;
    assign done_o = (32'(cnt) == LAT - 1);
    assign busy_o = (cnt != '0);
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) busy_o && !done_o |-> !issue_i);
  end
endmodule
