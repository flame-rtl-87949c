// flame_cgra: the FLAME coarse-grained reconfigurable array (top level).
//
// ROWS x COLS tiles in a mesh: each tile's north/south/west/east output feeds
// the facing input of its neighbour; inputs on the array edge read zero. The
// tiles of the top row carry load/store units, each on its own port of the
// scratchpad memory that sits above the array. A controller connects the
// array to a host CPU through a command/response interface (see flame_ctrl):
// the host loads control words and data, starts a run of a given number of
// cycles and reads results back.
//
// The multi-cycle execution strategies (exclusive, inclusive with
// OPT_START/OPT_END, distributed division slices) live in the tiles and are
// chosen purely by the control words. DIV_PIPE / MUL_PIPE select whether the
// multi-cycle FUs have pipeline registers; HAS_DIV = 0 leaves the multi-cycle
// divider out of every tile, for arrays that only run divisions distributed
// (the smaller tile of the paper's area comparison). Defaults: a 4 x 4 array and a
// 9-cycle division follow the paper; the other sizes are this design's
// choices. tile_pc_o and tile_ev_o expose each tile's signal counter and
// per-cycle mechanism flags (see tile) for observation.
module flame_cgra
  import flame_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned CFG_DEPTH = 16,
  parameter int unsigned SPM_WORDS = 1024,
  parameter int unsigned DIV_LAT   = 9,
  parameter bit          DIV_PIPE  = 1'b1,
  parameter bit          HAS_DIV   = 1'b1,
  parameter int unsigned MUL_LAT   = 2,
  parameter bit          MUL_PIPE  = 1'b1,
  parameter int unsigned DIST_NB   = 2,
  localparam int unsigned NT       = ROWS * COLS,
  localparam int unsigned CW       = $clog2(CFG_DEPTH),
  localparam int unsigned AW       = $clog2(SPM_WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid_i,
  output logic                 cmd_ready_o,
  input  cmd_t                 cmd_i,
  output logic                 rsp_valid_o,
  output rsp_t                 rsp_o,
  output logic [NT-1:0][CW-1:0] tile_pc_o,
  output logic [NT-1:0][3:0]   tile_ev_o
);
  logic [NT-1:0] cfg_we, len_we;
  logic [CW-1:0] cfg_waddr, len;
  cfg_t          cfg_wdata;
  logic          run, clear;
  logic          h_we;
  logic [AW-1:0] h_addr;
  word_t         h_wdata, h_rdata;

  flame_ctrl #(.NTILES(NT), .CFG_DEPTH(CFG_DEPTH), .AW(AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid_i, .cmd_ready_o, .cmd_i, .rsp_valid_o, .rsp_o,
    .cfg_we_o(cfg_we), .cfg_waddr_o(cfg_waddr), .cfg_wdata_o(cfg_wdata),
    .len_we_o(len_we), .len_o(len), .run_o(run), .clear_o(clear),
    .h_we_o(h_we), .h_addr_o(h_addr), .h_wdata_o(h_wdata), .h_rdata_i(h_rdata)
  );

  // tile outputs, indexed [row][col][direction]
  word_t [NDIRS-1:0] tout [ROWS][COLS];
  word_t [NDIRS-1:0] tin  [ROWS][COLS];

  logic  [COLS-1:0]         m_we;
  logic  [COLS-1:0][AW-1:0] m_addr;
  word_t [COLS-1:0]         m_wdata, m_rdata;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      assign tin[r][c][DIR_N] = (r > 0)        ? tout[(r > 0) ? r-1 : 0][c][DIR_S] : '0;
      assign tin[r][c][DIR_S] = (r < ROWS - 1) ? tout[(r < ROWS - 1) ? r+1 : r][c][DIR_N] : '0;
      assign tin[r][c][DIR_W] = (c > 0)        ? tout[r][(c > 0) ? c-1 : 0][DIR_E] : '0;
      assign tin[r][c][DIR_E] = (c < COLS - 1) ? tout[r][(c < COLS - 1) ? c+1 : c][DIR_W] : '0;

      word_t         mwd;
      logic          mwe;
      logic [AW-1:0] mad;

      tile #(
        .HAS_LSU(r == 0), .CFG_DEPTH(CFG_DEPTH), .DIV_LAT(DIV_LAT), .DIV_PIPE(DIV_PIPE),
        .HAS_DIV(HAS_DIV), .MUL_LAT(MUL_LAT), .MUL_PIPE(MUL_PIPE), .DIST_NB(DIST_NB), .AW(AW)
      ) u_tile (
        .clk, .rst_n, .run_i(run), .clear_i(clear),
        .cfg_we_i(cfg_we[r*COLS+c]), .cfg_waddr_i(cfg_waddr), .cfg_wdata_i(cfg_wdata),
        .len_we_i(len_we[r*COLS+c]), .len_i(len),
        .in_i(tin[r][c]), .out_o(tout[r][c]),
        .mem_we_o(mwe), .mem_addr_o(mad), .mem_wdata_o(mwd),
        .mem_rdata_i((r == 0) ? m_rdata[c] : '0),
        .pc_o(tile_pc_o[r*COLS+c]), .ev_o(tile_ev_o[r*COLS+c])
      );

      if (r == 0) begin : g_mem
        assign m_we[c]    = mwe;
        assign m_addr[c]  = mad;
        assign m_wdata[c] = mwd;
      end
    end
  end

  spm #(.WORDS(SPM_WORDS), .NPORTS(COLS)) u_spm (
    .clk, .we_i(m_we), .addr_i(m_addr), .wdata_i(m_wdata), .rdata_o(m_rdata),
    .h_we_i(h_we), .h_addr_i(h_addr), .h_wdata_i(h_wdata), .h_rdata_o(h_rdata)
  );
endmodule
