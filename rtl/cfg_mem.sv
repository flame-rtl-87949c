// cfg_mem: per-tile configuration memory of control-signal words.
//
// DEPTH words of type cfg_t. The host writes a word with we_i at the clock
// edge; the tile reads the word at its signal counter combinationally
// (raddr_i to rdata_o in the same cycle). Reset fills the memory with
// no-operation words so an unloaded tile idles. The paper names the
// configuration memory; its depth (16) is this design's choice.
module cfg_mem
  import flame_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  cfg_t                     wdata_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output cfg_t                     rdata_o
);
  cfg_t mem [DEPTH];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= cfg_nop();
    end else if (we_i) begin
      mem[waddr_i] <= wdata_i;
    end
  end
  assign rdata_o = mem[raddr_i];
endmodule
