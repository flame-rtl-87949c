// flame_pkg: types and constants shared by the FLAME CGRA.
//
// A tile is driven every cycle by one control-signal word read from its
// configuration memory at the signal counter. The word names the operation,
// where its operands come from, how a multi-cycle operation is issued
// (exclusive: the tile waits for it; OPT_START: the tile issues and moves on),
// whether this cycle is the OPT_END of an earlier multi-cycle operation, and
// how the crossbar routes data to the four neighbour outputs and the register
// file. The three execution strategies (exclusive, distributed, inclusive)
// follow the paper's architecture; the bit-level encoding is this design's own.
package flame_pkg;

  parameter int unsigned DATA_W = 32;   // datapath word width (assumed)
  parameter int unsigned NREGS  = 4;    // registers per tile (assumed)
  parameter int unsigned NDIRS  = 4;    // mesh neighbours

  // neighbour port index
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_S = 2'd1, DIR_W = 2'd2, DIR_E = 2'd3} dir_e;

  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,
    OP_AND   = 5'd3,
    OP_OR    = 5'd4,
    OP_XOR   = 5'd5,
    OP_SHL   = 5'd6,
    OP_SHR   = 5'd7,   // logical
    OP_SRA   = 5'd8,
    OP_EQ    = 5'd9,
    OP_NE    = 5'd10,
    OP_LT    = 5'd11,  // signed
    OP_LTU   = 5'd12,
    OP_GE    = 5'd13,  // signed
    OP_SEL   = 5'd14,  // c != 0 ? a : b
    OP_PASS  = 5'd15,  // a
    OP_DIVS  = 5'd16,  // one single-cycle slice of a distributed division
    OP_LOAD  = 5'd17,  // top-row tiles only, multi-cycle: result = SPM[a]
    OP_STORE = 5'd18,  // top-row tiles only: SPM[a] = b
    OP_DIV   = 5'd19,  // multi-cycle: signed quotient a / b
    OP_REM   = 5'd20,  // multi-cycle: signed remainder a % b
    OP_MUL   = 5'd21,  // multi-cycle: product a * b (low word)
    OP_MAC   = 5'd22,  // multi-cycle, fused: a * b + c (low word)
    OP_LDMUL = 5'd23   // top-row tiles only, multi-cycle, fused: SPM[a] * b
  } op_e;

  // operand / route sources of the crossbar
  typedef enum logic [3:0] {
    SRC_NONE  = 4'd0,
    SRC_N     = 4'd1,
    SRC_S     = 4'd2,
    SRC_W     = 4'd3,
    SRC_E     = 4'd4,
    SRC_RES   = 4'd5,  // this cycle's tile result
    SRC_R0    = 4'd6,
    SRC_R1    = 4'd7,
    SRC_R2    = 4'd8,
    SRC_R3    = 4'd9,
    SRC_IMM   = 4'd10
  } src_e;

  // how a multi-cycle operation (OP_DIV, OP_REM, OP_MUL, OP_MAC, OP_LOAD, OP_LDMUL) is issued
  typedef enum logic [1:0] {
    ISS_SINGLE = 2'd0,  // single-cycle FU (or no operation)
    ISS_EXCL   = 2'd1,  // multi-cycle, tile holds this word until the FU finishes
    ISS_START  = 2'd2   // multi-cycle, OPT_START: hand operands to the FU, continue
  } issue_e;

  // OPT_END: which multi-cycle result becomes the tile result this cycle
  typedef enum logic [2:0] {
    END_NONE = 3'd0,
    END_QUO  = 3'd1,  // quotient of the divider
    END_REM  = 3'd2,  // remainder of the divider
    END_MUL  = 3'd3,  // product / multiply-accumulate
    END_LD   = 3'd4,  // loaded word
    END_LDMUL = 3'd5  // fused load-multiply
  } end_e;

  typedef struct packed {
    op_e                  op;
    src_e                 src_a;
    src_e                 src_b;
    src_e                 src_c;
    word_t                imm;
    issue_e               issue;
    end_e                 fin;
    src_e [NDIRS-1:0]     route;    // route[d] drives neighbour output d
    logic                 rf_we;
    logic [$clog2(NREGS)-1:0] rf_waddr;
    src_e                 rf_wsrc;
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

  // host (CPU) command interface
  typedef enum logic [2:0] {
    CMD_CFG_WRITE = 3'd0,  // tile, addr, payload = control word
    CMD_CFG_LEN   = 3'd1,  // tile, addr = number of control words - 1
    CMD_SPM_WRITE = 3'd2,  // addr, payload[DATA_W-1:0] = data
    CMD_SPM_READ  = 3'd3,  // addr
    CMD_RUN       = 3'd4   // payload[31:0] = number of cycles to run
  } cmd_e;

  typedef struct packed {
    cmd_e              cmd;
    logic [7:0]        tile;
    logic [15:0]       addr;
    logic [CFG_W-1:0]  payload;
  } cmd_t;

  typedef enum logic [1:0] {RSP_ACK = 2'd0, RSP_DATA = 2'd1, RSP_DONE = 2'd2} rsp_e;

  typedef struct packed {
    rsp_e   kind;
    word_t  data;
  } rsp_t;

  // a control word that does nothing
  function automatic cfg_t cfg_nop();
    cfg_t c;
    c = '0;
    c.op = OP_NOP;
    return c;
  endfunction

endpackage
