// mc_div_fu: multi-cycle signed divide / remainder functional unit.
//
// An operation is issued with issue_i and its operands in cycle t; quotient
// and remainder are valid, with done_o high, in cycle t+LAT-1 (so LAT cycles
// in all, counting the issue cycle). The division is unsigned restoring
// division on the operand magnitudes, NBPS = ceil(DATA_W/LAT) quotient bits
// per cycle, with the signs fixed at the output (quotient rounds toward zero,
// remainder takes the dividend's sign, division by zero gives quotient -1 and
// remainder = dividend).
//
// PIPELINED = 1 builds LAT stages separated by pipeline registers, so a new
// division may be issued every cycle and several are in flight at once (the
// paper's pipelined FU for inclusive execution). PIPELINED = 0 builds one
// stage that is reused for LAT cycles: only one division at a time, busy_o is
// high while one is in flight and issuing then is an error. The paper gives
// the latency (division takes at least 9 cycles at 1 GHz) and the two
// variants; the radix and the sign handling are this design's choices.
module mc_div_fu
  import flame_pkg::*;
#(
  parameter int unsigned LAT       = 9,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  issue_i,
  input  word_t a_i,
  input  word_t b_i,
  output word_t quo_o,
  output word_t rem_o,
  output logic  done_o,
  output logic  busy_o
);
  localparam int unsigned W    = DATA_W;
  localparam int unsigned NBPS = (W + LAT - 1) / LAT;

  typedef struct packed {
    logic  v;
    word_t r;
    word_t q;
    word_t d;
    logic  neg_q;
    logic  neg_r;
    logic  dz;
  } st_t;

  // steps performed in slice k
  function automatic logic [7:0] nsteps(input int unsigned k);
    int unsigned lo;
    lo = k * NBPS;
    if (lo >= W) return 8'd0;
    if (W - lo < NBPS) return 8'(W - lo);
    return 8'(NBPS);
  endfunction

  st_t s_in0, s_fin;

  // operand magnitudes and sign bookkeeping
  always_comb begin
    s_in0.v     = issue_i;
    s_in0.r     = '0;
    s_in0.q     = a_i[W-1] ? -a_i : a_i;
    s_in0.d     = b_i[W-1] ? -b_i : b_i;
    s_in0.neg_q = a_i[W-1] ^ b_i[W-1];
    s_in0.neg_r = a_i[W-1];
    s_in0.dz    = (b_i == '0);
  end

  if (PIPELINED) begin : g_pipe
    st_t s_in [LAT];
    st_t s_out[LAT];
    assign s_in[0] = s_in0;
    for (genvar k = 0; k < LAT; k++) begin : g_stage
      word_t r_n, q_n;
      if (nsteps(k) != 0) begin : g_bits
        div_bits #(.W(W), .NB(NBPS)) u_bits (
          .r_i(s_in[k].r), .q_i(s_in[k].q), .d_i(s_in[k].d),
          .n_i(nsteps(k)), .r_o(r_n), .q_o(q_n)
        );
      end else begin : g_pass
        assign r_n = s_in[k].r;
        assign q_n = s_in[k].q;
      end
      always_comb begin
        s_out[k]   = s_in[k];
        s_out[k].r = r_n;
        s_out[k].q = q_n;
      end
      if (k + 1 < LAT) begin : g_reg
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) s_in[k+1] <= '0;
          else        s_in[k+1] <= s_out[k];
        end
      end
    end
    assign s_fin  = s_out[LAT-1];
    assign busy_o = 1'b0;
  end else begin : g_iter
    // one slice reused; cnt counts the slices already applied
    st_t                    st;
    logic [$clog2(LAT+1)-1:0] cnt;
    st_t                    cur;
    word_t                  r_n, q_n;
    always_comb cur = (cnt == '0) ? s_in0 : st;
    div_bits #(.W(W), .NB(NBPS)) u_bits (
      .r_i(cur.r), .q_i(cur.q), .d_i(cur.d),
      .n_i(nsteps(32'(cnt))), .r_o(r_n), .q_o(q_n)
    );
    always_comb begin
      s_fin   = cur;
      s_fin.r = r_n;
      s_fin.q = q_n;
      s_fin.v = (cnt == '0) ? (issue_i && LAT == 1) : (32'(cnt) == LAT - 1);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st  <= '0;
        cnt <= '0;
      end else if (cnt == '0) begin
        if (issue_i && LAT > 1) begin
          st  <= s_fin;
          cnt <= 1;
        end
      end else begin
        st  <= s_fin;
        cnt <= (32'(cnt) == LAT - 1) ? '0 : cnt + 1'b1;
      end
    end
    assign busy_o = (cnt != '0);
    // a non-pipelined FU accepts no new operation while one is in flight
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) busy_o |-> !issue_i);
  end

  assign done_o = s_fin.v;
  assign quo_o  = s_fin.dz ? '1 : (s_fin.neg_q ? -s_fin.q : s_fin.q);
  assign rem_o  = s_fin.neg_r ? -s_fin.r : s_fin.r;
endmodule
