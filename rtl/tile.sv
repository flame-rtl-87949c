// tile: one FLAME CGRA tile.
//
// Each cycle the tile reads the control word at its signal counter from its
// configuration memory, takes up to three operands through the crossbar (from
// the four neighbour inputs, its registers or the word's constant), computes a
// result and routes the result, neighbour inputs or registers to its four
// registered neighbour outputs and to its register file. Outputs change at the
// clock edge, so a neighbour uses a value one cycle after it is produced. The
// signal counter wraps after the last loaded word (len), which gives the
// initiation interval of the mapped loop on this tile.
//
// Three ways of running a multi-cycle operation (division, remainder,
// multiplication, fused multiply-accumulate, and on top-row tiles a 2-cycle
// SPM load), all selected by the control words alone:
//  * exclusive (ISS_EXCL): the operation is issued and the tile holds the same
//    control word, doing nothing else, until the FU reports completion; in
//    that cycle the result is routed and the counter advances.
//  * inclusive (ISS_START / fin = END_*): OPT_START hands the operands to the
//    multi-cycle FU and the counter advances at once, as if the operation took
//    one cycle. Later words keep using the single-cycle FUs and the ports.
//    The word scheduled LAT-1 cycles after the start carries OPT_END (fin),
//    which makes the FU's result the tile result of that cycle. An OPT_START
//    and an OPT_END may sit in the same word. With a pipelined FU several
//    operations of the same kind may be in flight.
//  * distributed: the compiler replaces the division by a chain of OP_DIVS
//    single-cycle slices, possibly on different tiles; nothing special here.
// HAS_DIV = 0 builds the tile without the multi-cycle divider: it then runs
// divisions only distributed, on the single-cycle slice in its ALU (the
// paper's tile with a distributed FU); OP_DIV / OP_REM are not allowed there.
// Top-row tiles (HAS_LSU) also run OP_LOAD (multi-cycle, exclusive or
// inclusive), OP_STORE (single-cycle) and the fused 3-cycle load-multiply
// OP_LDMUL (see mc_ldmul_fu; ended with END_LDMUL) on their SPM port.
//
// run_i enables execution; clear_i (with run_i low) resets the signal counter
// and the exclusive wait. ev_o flags, per cycle, the mechanisms above for
// observation. The paper gives the three strategies, the signal counter, the
// OPT_START/OPT_END markers and the parts of the tile; the control-word
// encoding, operand sources, sizes and the 2-cycle SPM load are this
// design's choices.
module tile
  import flame_pkg::*;
#(
  parameter bit          HAS_LSU   = 1'b0,
  parameter int unsigned CFG_DEPTH = 16,
  parameter int unsigned DIV_LAT   = 9,
  parameter bit          DIV_PIPE  = 1'b1,
  parameter bit          HAS_DIV   = 1'b1,
  parameter int unsigned MUL_LAT   = 2,
  parameter bit          MUL_PIPE  = 1'b1,
  parameter int unsigned DIST_NB   = 2,
  parameter int unsigned AW        = 10,
  localparam int unsigned CW       = $clog2(CFG_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run_i,
  input  logic              clear_i,
  // configuration from the host
  input  logic              cfg_we_i,
  input  logic [CW-1:0]     cfg_waddr_i,
  input  cfg_t              cfg_wdata_i,
  input  logic              len_we_i,
  input  logic [CW-1:0]     len_i,
  // mesh
  input  word_t [NDIRS-1:0] in_i,
  output word_t [NDIRS-1:0] out_o,
  // scratchpad port (used when HAS_LSU)
  output logic              mem_we_o,
  output logic [AW-1:0]     mem_addr_o,
  output word_t             mem_wdata_o,
  input  word_t             mem_rdata_i,
  // status
  output logic [CW-1:0]     pc_o,
  output logic [3:0]        ev_o      // {distributed slice, pipelined overlap, inclusive overlap, exclusive stall}
);
  logic [CW-1:0] pc, len;
  cfg_t          cfg;
  logic          waiting;

  cfg_mem #(.DEPTH(CFG_DEPTH)) u_cfg (
    .clk, .rst_n,
    .we_i(cfg_we_i), .waddr_i(cfg_waddr_i), .wdata_i(cfg_wdata_i),
    .raddr_i(pc), .rdata_o(cfg)
  );

  // ---------------- operands
  word_t [NREGS-1:0] regs;
  word_t [2:0]       opnd;
  word_t             a, b, c;

  tile_xbar #(.NOUT(3)) u_xbar_in (
    .in_i, .res_i('0), .reg_i(regs), .imm_i(cfg.imm),
    .sel_i({cfg.src_c, cfg.src_b, cfg.src_a}), .out_o(opnd)
  );
  assign a = opnd[0];
  assign b = opnd[1];
  assign c = opnd[2];

  // ---------------- issue control
  logic is_div, is_mul, is_ld, is_ldm, is_mc, excl, start, go, excl_done, fire;
  assign is_div = (cfg.op == OP_DIV) || (cfg.op == OP_REM);
  assign is_mul = (cfg.op == OP_MUL) || (cfg.op == OP_MAC);
  assign is_ld  = (cfg.op == OP_LOAD);
  assign is_ldm = (cfg.op == OP_LDMUL);
  assign is_mc  = is_div || is_mul || is_ld || is_ldm;
  assign excl   = is_mc && (cfg.issue == ISS_EXCL);
  assign start  = is_mc && (cfg.issue == ISS_START);
  assign go     = run_i && (start || (excl && !waiting));

  word_t quo, rem, prod, ld_data, ldm_prod;
  logic  div_done, mul_done, div_busy, mul_busy, ld_done, ldm_done, ldm_busy, ldm_own;

  if (HAS_DIV) begin : g_div
    mc_div_fu #(.LAT(DIV_LAT), .PIPELINED(DIV_PIPE)) u_div (
      .clk, .rst_n, .issue_i(go && is_div), .a_i(a), .b_i(b),
      .quo_o(quo), .rem_o(rem), .done_o(div_done), .busy_o(div_busy)
    );
  end else begin : g_nodiv
    assign quo      = '0;
    assign rem      = '0;
    assign div_done = 1'b0;
    assign div_busy = 1'b0;
  end

  mc_mul_fu #(.LAT(MUL_LAT), .PIPELINED(MUL_PIPE)) u_mul (
    .clk, .rst_n, .issue_i(go && is_mul), .a_i(a), .b_i(b), .c_i(c),
    .mac_i(cfg.op == OP_MAC), .prod_o(prod), .done_o(mul_done), .busy_o(mul_busy)
  );

  assign excl_done = excl && (is_div ? div_done : is_mul ? mul_done : is_ldm ? ldm_done : ld_done);
  // this word takes effect (routes, register and memory writes) this cycle
  assign fire = run_i && (!excl || excl_done);

  // ---------------- single-cycle FUs
  word_t alu_res, res;

  alu #(.DIST_NB(DIST_NB)) u_alu (
    .op_i(cfg.op), .a_i(a), .b_i(b), .c_i(c), .res_o(alu_res)
  );

  if (HAS_LSU) begin : g_lsu
    lsu #(.AW(AW)) u_lsu (
      .clk, .rst_n, .st_en_i(fire && cfg.op == OP_STORE), .ld_issue_i(go && (is_ld || is_ldm)),
      .a_i(a), .b_i(b), .mem_we_o, .mem_addr_o, .mem_wdata_o, .mem_rdata_i,
      .ld_data_o(ld_data), .ld_done_o(ld_done)
    );
    mc_ldmul_fu u_ldmul (
      .clk, .rst_n, .issue_i(go && is_ldm), .b_i(b), .ld_done_i(ld_done), .ld_data_i(ld_data),
      .own_o(ldm_own), .prod_o(ldm_prod), .done_o(ldm_done), .busy_o(ldm_busy)
    );
  end else begin : g_nolsu
    assign mem_we_o    = 1'b0;
    assign mem_addr_o  = '0;
    assign mem_wdata_o = '0;
    assign ld_data     = '0;
    assign ld_done     = 1'b0;
    assign ldm_prod    = '0;
    assign ldm_done    = 1'b0;
    assign ldm_busy    = 1'b0;
    assign ldm_own     = 1'b0;
  end

  always_comb begin
    if (excl) begin
      unique case (cfg.op)
        OP_DIV:  res = quo;
        OP_REM:  res = rem;
        OP_LOAD:  res = ld_data;
        OP_LDMUL: res = ldm_prod;
        default:  res = prod;
      endcase
    end else begin
      unique case (cfg.fin)
        END_QUO: res = quo;
        END_REM: res = rem;
        END_MUL: res = prod;
        END_LD:  res = ld_data;
        END_LDMUL: res = ldm_prod;
        default: res = alu_res;
      endcase
    end
  end

  // ---------------- routing and registers
  word_t [4:0] xo;

  tile_xbar #(.NOUT(5)) u_xbar_out (
    .in_i, .res_i(res), .reg_i(regs), .imm_i(cfg.imm),
    .sel_i({cfg.rf_wsrc, cfg.route}), .out_o(xo)
  );

  tile_rf u_rf (
    .clk, .rst_n,
    .we_i(fire && cfg.rf_we), .waddr_i(cfg.rf_waddr), .wdata_i(xo[4]),
    .regs_o(regs)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_o <= '0;
    end else if (fire) begin
      for (int d = 0; d < NDIRS; d++)
        if (cfg.route[d] != SRC_NONE) out_o[d] <= xo[d];
    end
  end

  // ---------------- signal counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      len     <= '0;
      waiting <= 1'b0;
    end else begin
      if (len_we_i) len <= len_i;
      if (clear_i && !run_i) begin
        pc      <= '0;
        waiting <= 1'b0;
      end else if (run_i) begin
        if (excl) waiting <= !excl_done;
        if (fire) pc <= (pc == len) ? '0 : pc + 1'b1;
      end
    end
  end
  assign pc_o = pc;

  // ---------------- observation: operations in flight per FU
  logic [3:0] div_out, mul_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_out <= '0;
      mul_out <= '0;
    end else begin
      div_out <= div_out + 4'(go && is_div) - 4'(div_done);
      mul_out <= mul_out + 4'(go && is_mul) - 4'(mul_done);
    end
  end

  logic inflight_other;
  assign inflight_other = (div_out > 4'(div_done)) || (mul_out > 4'(mul_done)) || (ldm_busy && !ldm_done);
  assign ev_o[0] = run_i && excl && !excl_done;
  assign ev_o[1] = run_i && !is_mc && cfg.op != OP_NOP && cfg.fin == END_NONE && inflight_other;
  assign ev_o[2] = (go && is_div && div_out > 4'(div_done)) || (go && is_mul && mul_out > 4'(mul_done));
  assign ev_o[3] = run_i && cfg.op == OP_DIVS;

  // a finished multi-cycle result must be taken by this cycle's control word
  // (OPT_END or the exclusive word that issued it), otherwise it is lost
  a_div_taken: assert property (@(posedge clk) disable iff (!rst_n)
    run_i && div_done |-> (excl && is_div) || cfg.fin == END_QUO || cfg.fin == END_REM);
  a_mul_taken: assert property (@(posedge clk) disable iff (!rst_n)
    run_i && mul_done |-> (excl && is_mul) || cfg.fin == END_MUL);
  a_ld_taken: assert property (@(posedge clk) disable iff (!rst_n)
    run_i && ld_done && !ldm_own |-> (excl && is_ld) || cfg.fin == END_LD);
  a_ldm_taken: assert property (@(posedge clk) disable iff (!rst_n)
    run_i && ldm_done |-> (excl && is_ldm) || cfg.fin == END_LDMUL);
  // the fused load-multiply takes one operation at a time
  a_ldm_free: assert property (@(posedge clk) disable iff (!rst_n) go && is_ldm |-> !ldm_busy || ldm_done);
  // multi-cycle operations need an issue mode
  a_mc_issue: assert property (@(posedge clk) disable iff (!rst_n)
    run_i && is_mc |-> cfg.issue != ISS_SINGLE);
  // a non-pipelined FU takes no new operation while one is in flight
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) go && is_div |-> !div_busy);
  a_mul_free: assert property (@(posedge clk) disable iff (!rst_n) go && is_mul |-> !mul_busy || mul_done);
  // divisions and remainders only on tiles that have the multi-cycle divider
  a_div: assert property (@(posedge clk) disable iff (!rst_n) HAS_DIV || !(run_i && is_div));
  // loads and stores only on tiles that have an SPM port
  a_lsu: assert property (@(posedge clk) disable iff (!rst_n)
    HAS_LSU || !(run_i && (cfg.op == OP_LOAD || cfg.op == OP_STORE || cfg.op == OP_LDMUL)));
endmodule
