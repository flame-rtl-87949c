// flame_ctrl: accelerator interface between the host CPU and the array.
//
// The CGRA is loosely coupled: the host loads control words and data, starts
// the array and waits for it. Commands arrive as cmd_t with cmd_valid_i and
// are accepted when cmd_ready_o is high (always, except while the array
// runs). CMD_CFG_WRITE writes a control word into one tile's configuration
// memory, CMD_CFG_LEN sets the index of a tile's last control word,
// CMD_SPM_WRITE / CMD_SPM_READ access the scratchpad, CMD_RUN clears the
// tiles' signal counters for one cycle and then runs the array for the given
// number of cycles. Every command is answered one cycle after acceptance
// (two for CMD_SPM_READ, whose SPM read is synchronous, and after the last
// run cycle for CMD_RUN) by a one-cycle rsp_valid_o pulse
// (RSP_ACK, RSP_DATA with the read word, or RSP_DONE with the cycle count).
// The paper shows a command and a response channel between CPU and CGRA; the
// command set, encoding and timing are this design's choices.
module flame_ctrl
  import flame_pkg::*;
#(
  parameter int unsigned NTILES    = 16,
  parameter int unsigned CFG_DEPTH = 16,
  parameter int unsigned AW        = 10,
  localparam int unsigned CW       = $clog2(CFG_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid_i,
  output logic              cmd_ready_o,
  input  cmd_t              cmd_i,
  output logic              rsp_valid_o,
  output rsp_t              rsp_o,
  // to the tiles
  output logic [NTILES-1:0] cfg_we_o,
  output logic [CW-1:0]     cfg_waddr_o,
  output cfg_t              cfg_wdata_o,
  output logic [NTILES-1:0] len_we_o,
  output logic [CW-1:0]     len_o,
  output logic              run_o,
  output logic              clear_o,
  // host port of the scratchpad
  output logic              h_we_o,
  output logic [AW-1:0]     h_addr_o,
  output word_t             h_wdata_o,
  input  word_t             h_rdata_i
);
  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_READ} state_e;
  state_e      state;
  logic [31:0] left, total;
  logic        acc;

  assign cmd_ready_o = (state == S_IDLE);
  assign acc         = cmd_valid_i && cmd_ready_o;

  always_comb begin
    for (int t = 0; t < NTILES; t++) begin
      cfg_we_o[t] = acc && cmd_i.cmd == CMD_CFG_WRITE && 32'(cmd_i.tile) == t;
      len_we_o[t] = acc && cmd_i.cmd == CMD_CFG_LEN   && 32'(cmd_i.tile) == t;
    end
  end
  assign cfg_waddr_o = cmd_i.addr[CW-1:0];
  assign len_o       = cmd_i.addr[CW-1:0];
  assign cfg_wdata_o = cfg_t'(cmd_i.payload);
  assign h_we_o      = acc && cmd_i.cmd == CMD_SPM_WRITE;
  assign h_addr_o    = cmd_i.addr[AW-1:0];
  assign h_wdata_o   = cmd_i.payload[DATA_W-1:0];
  assign run_o       = (state == S_RUN);
  assign clear_o     = (state == S_CLEAR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      left        <= '0;
      total       <= '0;
      rsp_valid_o <= 1'b0;
      rsp_o       <= '0;
    end else begin
      rsp_valid_o <= 1'b0;
      unique case (state)
        S_IDLE: if (acc) begin
          if (cmd_i.cmd == CMD_RUN) begin
            state <= S_CLEAR;
            left  <= cmd_i.payload[31:0];
            total <= cmd_i.payload[31:0];
          end else if (cmd_i.cmd == CMD_SPM_READ) begin
            state <= S_READ;
          end else begin
            rsp_valid_o <= 1'b1;
            rsp_o.kind  <= RSP_ACK;
            rsp_o.data  <= '0;
          end
        end
        S_READ: begin
          rsp_valid_o <= 1'b1;
          rsp_o.kind  <= RSP_DATA;
          rsp_o.data  <= h_rdata_i;
          state       <= S_IDLE;
        end
        S_CLEAR: state <= (left == '0) ? S_IDLE : S_RUN;
        S_RUN: begin
          left <= left - 1'b1;
          if (left == 32'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if ((state == S_RUN && left == 32'd1) || (state == S_CLEAR && left == '0)) begin
        rsp_valid_o <= 1'b1;
        rsp_o.kind  <= RSP_DONE;
        rsp_o.data  <= word_t'(total);
      end
    end
  end
endmodule
