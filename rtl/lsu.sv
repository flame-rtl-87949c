// lsu: load/store unit of a top-row tile.
//
// Drives the tile's scratchpad port. The word address is operand a (low AW
// bits), store data operand b. A store (st_en_i) writes at the end of its
// cycle, so it is a single-cycle operation. A load issued with ld_issue_i in
// cycle t presents its address to the synchronous SPM; the word comes back in
// cycle t+1 with ld_done_o high. A load is therefore a 2-cycle operation that
// the tile runs exclusively or with OPT_START / OPT_END like a division, and
// loads can be issued back to back. The paper only says that the topmost
// tiles have load/store units to the SPM and that memory accesses are
// multi-cycle at 1 GHz; the rest is this design's choice.
module lsu
  import flame_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          st_en_i,
  input  logic          ld_issue_i,
  input  word_t         a_i,
  input  word_t         b_i,
  output logic          mem_we_o,
  output logic [AW-1:0] mem_addr_o,
  output word_t         mem_wdata_o,
  input  word_t         mem_rdata_i,
  output word_t         ld_data_o,
  output logic          ld_done_o
);
  assign mem_we_o    = st_en_i;
  assign mem_addr_o  = a_i[AW-1:0];
  assign mem_wdata_o = b_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ld_done_o <= 1'b0;
    else        ld_done_o <= ld_issue_i;
  end
  assign ld_data_o = ld_done_o ? mem_rdata_i : '0;

  // a store and a load cannot share the port in one cycle
  a_port: assert property (@(posedge clk) disable iff (!rst_n) !(st_en_i && ld_issue_i));
endmodule
