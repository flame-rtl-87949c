// spm: scratchpad memory shared by the top-row tiles and the host.
//
// WORDS data words. NPORTS tile ports (one per column of the array) and one
// host port, each with a synchronous read and a write at the clock edge: the
// word at the address presented in cycle t is on rdata in cycle t+1, as from
// an SRAM macro, which is why a load is a 2-cycle (multi-cycle) operation of
// the tile. A read in the cycle of a write to the same word returns the old
// word. When several ports write the same word in one cycle the host wins,
// then the highest-numbered tile port. The paper shows one SPM above the array
// and counts memory accesses among the multi-cycle operations at 1 GHz, but
// gives no size, latency or port organisation: 1024 words, one cycle of read
// latency and one port per column are this design's choices.
module spm
  import flame_pkg::*;
#(
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned NPORTS = 4,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                      clk,
  input  logic [NPORTS-1:0]         we_i,
  input  logic [NPORTS-1:0][AW-1:0] addr_i,
  input  word_t [NPORTS-1:0]        wdata_i,
  output word_t [NPORTS-1:0]        rdata_o,
  input  logic                      h_we_i,
  input  logic [AW-1:0]             h_addr_i,
  input  word_t                     h_wdata_i,
  output word_t                     h_rdata_o
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      rdata_o[p] <= mem[addr_i[p]];
      if (we_i[p]) mem[addr_i[p]] <= wdata_i[p];
    end
    h_rdata_o <= mem[h_addr_i];
    if (h_we_i) mem[h_addr_i] <= h_wdata_i;
  end
endmodule
