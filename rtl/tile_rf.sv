// tile_rf: per-tile register file for values kept across cycles.
//
// NREGS words, all readable at once (the crossbar can pick any of them), one
// write port written at the clock edge when we_i is high. Reset clears every
// register. The paper shows register blocks inside the tile without sizes;
// the count and the single write port are this design's choices.
module tile_rf
  import flame_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we_i,
  input  logic [$clog2(NREGS)-1:0] waddr_i,
  input  word_t                    wdata_i,
  output word_t [NREGS-1:0]        regs_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    regs_o <= '0;
    else if (we_i) regs_o[waddr_i] <= wdata_i;
  end
endmodule
