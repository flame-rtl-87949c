// flame_cgra_tb: end-to-end test of the 4 x 4 array at its default sizes.
//
// The kernel is the loop of the paper's running example, with a transposed
// store so that both results of the division are used:
//     for (x = 0; x < NI*NJ; x++) { i = x / NJ; j = x % NJ;
//                                   C[j*NI + i] = A[x] < 0 ? 0 : A[x]; }
// It is mapped by hand three times and each mapping is loaded and run through
// the host command port, with A written to and C read back from the SPM:
//  * exclusive: everything on tile (0,0); DIV, REM, the fused MAC
//    (j*NI + i) and the 2-cycle load hold the tile.
//  * inclusive: tiles (0,0) and (0,1), II = 10; DIV, REM, MAC and the load
//    are issued with OPT_START and collected with OPT_END while adds and the
//    compare/select/store go on; the REM overlaps the DIV in the pipelined
//    divider and ends in the next iteration.
//  * distributed: the division is eight OP_DIVS slices passed through seven
//    tiles around the array (II = 15).
// A fourth run scales A in place, A[x] = A[x] * K, with the fused 3-cycle
// load-multiply on tile (0,0) (OPT_START, x++ while it runs, OPT_END, store;
// II = 5); its results are counted from the tile and must number N.
// C is compared with the kernel computed here. The per-tile mechanism flags
// must show exclusive stalls, inclusive overlap, pipelined overlap and
// distributed slices, each at least once, and the run lengths must match the
// initiation intervals.
module flame_cgra_tb;
  import flame_pkg::*;
  localparam int NI = 4, NJ = 6, N = NI * NJ, BC = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  cmd_t cmd;
  rsp_t rsp;
  logic [15:0][3:0] tpc;
  logic [15:0][3:0] tev;
  int ev_cnt [4];
  int ldm_cnt = 0;
  int ld_cnt = 0, st_cnt = 0;
  word_t A [N];

  flame_cgra u_dut (.clk, .rst_n, .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd),
    .rsp_valid_o(rsp_valid), .rsp_o(rsp), .tile_pc_o(tpc), .tile_ev_o(tev));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    for (int t = 0; t < 16; t++) for (int e = 0; e < 4; e++) ev_cnt[e] += int'(tev[t][e]);
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one command, waits for its response
  task automatic send(input cmd_e c, input int tile, input int addr, input logic [CFG_W-1:0] pl,
                      output rsp_t r, output int cycles);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd.cmd = c; cmd.tile = 8'(tile); cmd.addr = 16'(addr); cmd.payload = pl;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!rsp_valid) begin @(negedge clk); cycles++; end
    r = rsp;
  endtask

  function automatic cfg_t w(op_e op, src_e a = SRC_NONE, src_e b = SRC_NONE, word_t imm = 0,
                             issue_e iss = ISS_SINGLE, end_e fin = END_NONE);
    cfg_t c = cfg_nop();
    c.op = op; c.src_a = a; c.src_b = b; c.imm = imm; c.issue = iss; c.fin = fin;
    return c;
  endfunction
  function automatic cfg_t wr(cfg_t c, int reg_i, src_e src = SRC_RES);
    c.rf_we = 1; c.rf_waddr = 2'(reg_i); c.rf_wsrc = src;
    return c;
  endfunction
  function automatic cfg_t rt(cfg_t c, dir_e d, src_e src = SRC_RES);
    c.route[d] = src;
    return c;
  endfunction

  cfg_t prog [16][$];
  int   plen;

  task automatic clear_prog(input int len);
    plen = len;
    for (int t = 0; t < 16; t++) begin
      prog[t] = {};
      for (int k = 0; k < len; k++) prog[t].push_back(cfg_nop());
    end
  endtask

  // reset, load A, clear C, load control words, run, read C back and check
  task automatic run_prog(input string name, input int cycles);
    rsp_t r;
    int   n;
    logic [CFG_W-1:0] pl;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < N; x++) begin
      pl = '0; pl[31:0] = A[x];
      send(CMD_SPM_WRITE, 0, x, pl, r, n);
      pl[31:0] = 32'hDEAD_BEEF;
      send(CMD_SPM_WRITE, 0, BC + x, pl, r, n);
    end
    for (int t = 0; t < 16; t++) begin
      for (int k = 0; k < plen; k++) send(CMD_CFG_WRITE, t, k, prog[t][k], r, n);
      send(CMD_CFG_LEN, t, plen - 1, '0, r, n);
    end
    for (int e = 0; e < 4; e++) ev_cnt[e] = 0;
    pl = '0; pl[31:0] = cycles;
    send(CMD_RUN, 0, 0, pl, r, n);
    chk(r.kind == RSP_DONE && r.data == word_t'(cycles), {name, ": done response"});
    chk(n == cycles + 2, $sformatf("%s: run took %0d cycles for %0d", name, n, cycles));
    for (int x = 0; x < N; x++) begin
      int i = x / NJ, j = x % NJ;
      word_t e = ($signed(A[x]) < 0) ? 0 : A[x];
      send(CMD_SPM_READ, 0, BC + j * NI + i, '0, r, n);
      chk(r.kind == RSP_DATA && r.data == e, $sformatf("%s: C[%0d] = %h, expected %h", name, j * NI + i, r.data, e));
    end
    $display("%s: exclusive stall %0d, inclusive overlap %0d, pipelined overlap %0d, distributed slices %0d",
             name, ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3]);
  endtask

  always @(posedge clk) ldm_cnt += int'(u_dut.g_row[0].g_col[0].u_tile.ldm_done);

  initial begin
    cmd_valid = 0; cmd = '0;
    for (int x = 0; x < N; x++) A[x] = (x % 3 == 0) ? -word_t'($urandom_range(1, 1000)) : $urandom_range(0, 100000);

    // ------------------------------------------------ exclusive, tile 0 only
    clear_prog(9);
    prog[0][0] = wr(w(OP_DIV, SRC_R0, SRC_IMM, NJ, ISS_EXCL), 1);        // i        9 cycles
    prog[0][1] = wr(w(OP_REM, SRC_R0, SRC_IMM, NJ, ISS_EXCL), 2);        // j        9 cycles
    prog[0][2] = wr(w(OP_MAC, SRC_R2, SRC_IMM, NI, ISS_EXCL), 2);        // j*NI + i 2 cycles
    prog[0][2].src_c = SRC_R1;
    prog[0][3] = wr(w(OP_ADD, SRC_R2, SRC_IMM, BC), 2);                  // + BC
    prog[0][4] = wr(w(OP_LOAD, SRC_R0, SRC_NONE, 0, ISS_EXCL), 1);       // A[x]     2 cycles
    prog[0][5] = wr(w(OP_LT, SRC_R1, SRC_IMM, 0), 3);
    prog[0][6] = wr(w(OP_SEL, SRC_IMM, SRC_R1, 0), 1); prog[0][6].src_c = SRC_R3;
    prog[0][7] = w(OP_STORE, SRC_R2, SRC_R1);
    prog[0][8] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                   // x++
    run_prog("exclusive", N * (9 + 9 + 2 + 1 + 2 + 4));
    chk(ev_cnt[0] == N * (8 + 8 + 1 + 1), $sformatf("exclusive stall cycles %0d", ev_cnt[0]));
    chk(ev_cnt[0] > 0, "exclusive stall seen");

    // ------------------------------------------------ inclusive, II = 10
    clear_prog(10);
    prog[0][0] = wr(w(OP_DIV, SRC_R0, SRC_IMM, NJ, ISS_START, END_REM), 2);  // i_k starts, j_{k-1} ends
    prog[0][1] = w(OP_MAC, SRC_R2, SRC_IMM, NI, ISS_START);                  // j_{k-1}*NI + i_{k-1}
    prog[0][1].src_c = SRC_R1;
    prog[0][2] = wr(w(OP_REM, SRC_R0, SRC_IMM, NJ, ISS_START, END_MUL), 3);  // j_k starts, MAC ends
    prog[0][3] = w(OP_LOAD, SRC_R0, SRC_NONE, 0, ISS_START);                 // A[x_k]
    prog[0][4] = rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LD), DIR_E); // ... east
    prog[0][5] = rt(w(OP_ADD, SRC_R3, SRC_IMM, BC), DIR_E);                  // address east
    prog[0][6] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                       // x++
    prog[0][8] = wr(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_QUO), 1); // i_k ends
    prog[1][3] = wr(w(OP_PASS, SRC_R1), 0);                                  // value of x_{k-1}
    prog[1][5] = wr(w(OP_PASS, SRC_W), 1);                                   // value of x_k
    prog[1][7] = wr(w(OP_LT, SRC_R0, SRC_IMM, 0), 2);
    prog[1][8] = wr(w(OP_SEL, SRC_IMM, SRC_R0, 0), 2); prog[1][8].src_c = SRC_R2;
    prog[1][9] = w(OP_STORE, SRC_W, SRC_R2);
    run_prog("inclusive", (N + 1) * 10);
    chk(ev_cnt[0] == 0, "inclusive never stalls");
    chk(ev_cnt[1] > 0, "inclusive overlap seen");
    chk(ev_cnt[2] > 0, "pipelined overlap seen");

    // ------------------------------------------------ distributed, II = 15
    // tiles are numbered row * 4 + column; the state goes
    // 0 -> 4 -> 8 -> 12 -> 13 -> 9 -> 5 -> 1, one slice per hop
    clear_prog(15);
    prog[0][0]  = rt(w(OP_PASS, SRC_R0), DIR_S);
    prog[0][1]  = w(OP_LOAD, SRC_R0, SRC_NONE, 0, ISS_START);
    prog[0][2]  = rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LD), DIR_E);
    prog[0][3]  = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);
    prog[4][1]  = rt(w(OP_DIVS, SRC_N, SRC_IMM, NJ), DIR_S);
    prog[8][2]  = rt(w(OP_DIVS, SRC_N, SRC_IMM, NJ), DIR_S);
    prog[12][3] = rt(w(OP_DIVS, SRC_N, SRC_IMM, NJ), DIR_E);
    prog[13][4] = rt(w(OP_DIVS, SRC_W, SRC_IMM, NJ), DIR_N);
    prog[9][5]  = rt(w(OP_DIVS, SRC_S, SRC_IMM, NJ), DIR_N);
    prog[5][6]  = rt(w(OP_DIVS, SRC_S, SRC_IMM, NJ), DIR_N);
    prog[1][4]  = wr(w(OP_LT, SRC_W, SRC_IMM, 0), 1);
    prog[1][5]  = wr(w(OP_SEL, SRC_IMM, SRC_W, 0), 3); prog[1][5].src_c = SRC_R1;
    prog[1][7]  = wr(w(OP_DIVS, SRC_S, SRC_IMM, NJ), 0);
    prog[1][8]  = wr(w(OP_DIVS, SRC_R0, SRC_IMM, NJ), 0);
    prog[1][9]  = wr(w(OP_AND, SRC_R0, SRC_IMM, 32'hFFFF), 1);              // i
    prog[1][10] = wr(w(OP_SHR, SRC_R0, SRC_IMM, 16), 2);                    // j
    prog[1][11] = wr(w(OP_SHL, SRC_R2, SRC_IMM, 2), 2);                     // j*NI (NI = 4)
    prog[1][12] = wr(w(OP_ADD, SRC_R2, SRC_R1), 2);
    prog[1][13] = wr(w(OP_ADD, SRC_R2, SRC_IMM, BC), 2);
    prog[1][14] = w(OP_STORE, SRC_R2, SRC_R3);
    run_prog("distributed", N * 15);
    chk(ev_cnt[0] == 0 && ev_cnt[1] == 0 && ev_cnt[2] == 0, "distributed uses no multi-cycle FU");
    chk(ev_cnt[3] == N * 8, $sformatf("distributed slices %0d", ev_cnt[3]));

    // ------------------------------------------------ fused load-multiply, II = 5
    begin
      rsp_t r;
      int   n;
      logic [CFG_W-1:0] pl;
      clear_prog(5);
      prog[0][0] = wr(w(OP_PASS, SRC_R0), 1);                                    // &A[x]
      prog[0][1] = w(OP_LDMUL, SRC_R1, SRC_IMM, -3, ISS_START);                  // A[x] * -3
      prog[0][2] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                         // while it runs
      prog[0][3] = wr(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LDMUL), 2);
      prog[0][4] = w(OP_STORE, SRC_R1, SRC_R2);
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int x = 0; x < N; x++) begin
        pl = '0; pl[31:0] = A[x];
        send(CMD_SPM_WRITE, 0, x, pl, r, n);
      end
      for (int t = 0; t < 16; t++) begin
        for (int k = 0; k < plen; k++) send(CMD_CFG_WRITE, t, k, prog[t][k], r, n);
        send(CMD_CFG_LEN, t, plen - 1, '0, r, n);
      end
      for (int e = 0; e < 4; e++) ev_cnt[e] = 0;
      ldm_cnt = 0;
      pl = '0; pl[31:0] = N * 5;
      send(CMD_RUN, 0, 0, pl, r, n);
      chk(n == N * 5 + 2, $sformatf("ld-mul: run took %0d cycles", n));
      for (int x = 0; x < N; x++) begin
        send(CMD_SPM_READ, 0, x, '0, r, n);
        chk(r.kind == RSP_DATA && r.data == A[x] * -3, $sformatf("ld-mul: A[%0d] = %h", x, r.data));
      end
      chk(ldm_cnt == N, $sformatf("fused load-multiply results %0d", ldm_cnt));
      chk(ev_cnt[1] == N, $sformatf("ld-mul inclusive overlap %0d", ev_cnt[1]));
      $display("ld-mul: %0d fused results, inclusive overlap %0d", ldm_cnt, ev_cnt[1]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
