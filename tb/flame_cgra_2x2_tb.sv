// flame_cgra_2x2_tb: the array in the size of the paper's running example:
// 2 x 2 tiles, 3-cycle division, and FUs without pipeline registers (one
// division and one multiplication in flight at a time).
//
// It runs the same loop as flame_cgra_tb,
//     for (x = 0; x < NI*NJ; x++) { i = x / NJ; j = x % NJ;
//                                   C[j*NI + i] = A[x] < 0 ? 0 : A[x]; }
// with A at word BA and C at word 0, mapped three ways:
//  * exclusive on tile 0: DIV 3, REM 3, MAC 2 and load 2 cycles hold the
//    tile, 15 cycles per iteration;
//  * inclusive on tiles 0, 1 and 2, II = 8: the load overlaps the division,
//    the REM starts only after the DIV has ended (the divider is not
//    pipelined), tile 0's x++ runs while the REM is in flight, and tile 1
//    stores each result in word 0 of the following iteration (N*8+1 cycles);
//  * distributed: the division as eight OP_DIVS slices on tiles 2, 3 and 1,
//    II = 16.
// C is read back and compared; the mechanism flags must show exclusive
// stalls, inclusive overlap and distributed slices, and never a pipelined
// overlap.
// A second loop, A[x] = A[x] * K in place, uses the fused 3-cycle
// load-multiply on tile 0: exclusive (6 cycles per iteration) and inclusive
// (II = 5, the x++ runs while the fused operation is in flight). The 2 x 2 size and the 3-cycle division follow the example;
// the three mappings and the memory layout are this design's own.
module flame_cgra_2x2_tb;
  import flame_pkg::*;
  localparam int NI = 4, NJ = 6, N = NI * NJ, BA = 64, NT = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  cmd_t cmd;
  rsp_t rsp;
  logic [NT-1:0][3:0] tpc;
  logic [NT-1:0][3:0] tev;
  int ev_cnt [4];
  int ld_cnt = 0, st_cnt = 0;
  word_t A [N];

  flame_cgra #(.ROWS(2), .COLS(2), .DIV_LAT(3), .DIV_PIPE(1'b0), .MUL_PIPE(1'b0)) u_dut (.clk, .rst_n, .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd),
    .rsp_valid_o(rsp_valid), .rsp_o(rsp), .tile_pc_o(tpc), .tile_ev_o(tev));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    for (int t = 0; t < NT; t++) for (int e = 0; e < 4; e++) ev_cnt[e] += int'(tev[t][e]);
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

  cfg_t prog [NT][$];
  int   plen;

  task automatic clear_prog(input int len);
    plen = len;
    for (int t = 0; t < NT; t++) begin
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
      send(CMD_SPM_WRITE, 0, BA + x, pl, r, n);
      pl[31:0] = 32'hDEAD_BEEF;
      send(CMD_SPM_WRITE, 0, x, pl, r, n);
    end
    for (int t = 0; t < NT; t++) begin
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
      send(CMD_SPM_READ, 0, j * NI + i, '0, r, n);
      chk(r.kind == RSP_DATA && r.data == e, $sformatf("%s: C[%0d] = %h, expected %h", name, j * NI + i, r.data, e));
    end
    $display("%s: exclusive stall %0d, inclusive overlap %0d, pipelined overlap %0d, distributed slices %0d",
             name, ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3]);
  endtask

  // in-place scaling A[x] *= K over the N words at BA, with the fused load-multiply
  task automatic run_scale(input string name, input int cycles, input word_t k);
    rsp_t r;
    int   n;
    logic [CFG_W-1:0] pl;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < N; x++) begin
      pl = '0; pl[31:0] = A[x];
      send(CMD_SPM_WRITE, 0, BA + x, pl, r, n);
    end
    for (int t = 0; t < NT; t++) begin
      for (int q = 0; q < plen; q++) send(CMD_CFG_WRITE, t, q, prog[t][q], r, n);
      send(CMD_CFG_LEN, t, plen - 1, '0, r, n);
    end
    for (int e = 0; e < 4; e++) ev_cnt[e] = 0;
    pl = '0; pl[31:0] = cycles;
    send(CMD_RUN, 0, 0, pl, r, n);
    chk(n == cycles + 2, $sformatf("%s: run took %0d cycles for %0d", name, n, cycles));
    for (int x = 0; x < N; x++) begin
      send(CMD_SPM_READ, 0, BA + x, '0, r, n);
      chk(r.kind == RSP_DATA && r.data == A[x] * k, $sformatf("%s: A[%0d] = %h, expected %h", name, x, r.data, A[x] * k));
    end
    $display("%s: exclusive stall %0d, inclusive overlap %0d", name, ev_cnt[0], ev_cnt[1]);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0;
    for (int x = 0; x < N; x++) A[x] = (x % 3 == 0) ? -word_t'($urandom_range(1, 1000)) : $urandom_range(0, 100000);

    // ------------------------------------------------ exclusive, tile 0 only
    clear_prog(9);
    prog[0][0] = wr(w(OP_DIV, SRC_R0, SRC_IMM, NJ, ISS_EXCL), 1);        // i        3 cycles
    prog[0][1] = wr(w(OP_REM, SRC_R0, SRC_IMM, NJ, ISS_EXCL), 2);        // j        3 cycles
    prog[0][2] = wr(w(OP_MAC, SRC_R2, SRC_IMM, NI, ISS_EXCL), 2);        // j*NI + i 2 cycles
    prog[0][2].src_c = SRC_R1;
    prog[0][3] = wr(w(OP_ADD, SRC_R0, SRC_IMM, BA), 3);                  // &A[x]
    prog[0][4] = wr(w(OP_LOAD, SRC_R3, SRC_NONE, 0, ISS_EXCL), 1);       // A[x]     2 cycles
    prog[0][5] = wr(w(OP_LT, SRC_R1, SRC_IMM, 0), 3);
    prog[0][6] = wr(w(OP_SEL, SRC_IMM, SRC_R1, 0), 1); prog[0][6].src_c = SRC_R3;
    prog[0][7] = w(OP_STORE, SRC_R2, SRC_R1);
    prog[0][8] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                   // x++
    run_prog("exclusive", N * 15);
    chk(ev_cnt[0] == N * (2 + 2 + 1 + 1), $sformatf("exclusive stall cycles %0d", ev_cnt[0]));

    // ------------------------------------------------ inclusive, II = 8
    // tile 0 = (0,0) with LSU, tile 1 = (0,1) with LSU, tile 2 = (1,0)
    clear_prog(8);
    prog[0][0] = w(OP_DIV, SRC_R0, SRC_IMM, NJ, ISS_START);                        // i starts
    prog[0][2] = wr(w(OP_LOAD, SRC_S, SRC_NONE, 0, ISS_START, END_QUO), 1);        // load starts, i ends
    prog[0][3] = rt(w(OP_REM, SRC_R0, SRC_IMM, NJ, ISS_START, END_LD), DIR_E);     // j starts, A[x] east
    prog[0][5] = wr(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_REM), 2);     // j ends
    prog[0][6] = w(OP_MAC, SRC_R2, SRC_IMM, NI, ISS_START); prog[0][6].src_c = SRC_R1;
    prog[0][7] = rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_MUL), DIR_E); // address east
    prog[0][4] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                             // x++
    prog[2][0] = rt(w(OP_ADD, SRC_R0, SRC_IMM, BA), DIR_N);                        // &A[x] north
    prog[2][1] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);
    prog[1][4] = wr(w(OP_PASS, SRC_W), 0);
    prog[1][5] = wr(w(OP_LT, SRC_R0, SRC_IMM, 0), 1);
    prog[1][6] = wr(w(OP_SEL, SRC_IMM, SRC_R0, 0), 0); prog[1][6].src_c = SRC_R1;
    prog[1][0] = w(OP_STORE, SRC_W, SRC_R0);
    run_prog("inclusive", N * 8 + 1);
    chk(ev_cnt[0] == 0, "inclusive never stalls");
    chk(ev_cnt[1] > 0, "inclusive overlap seen");

    // ------------------------------------------------ distributed, II = 16
    // state path: tile 0 -> 2 -> 3 -> 1, slices on 2, 3 and six on 1
    clear_prog(16);
    prog[0][0]  = rt(w(OP_PASS, SRC_R0), DIR_S);
    prog[0][1]  = wr(w(OP_ADD, SRC_R0, SRC_IMM, BA), 1);
    prog[0][2]  = w(OP_LOAD, SRC_R1, SRC_NONE, 0, ISS_START);
    prog[0][3]  = rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LD), DIR_E);
    prog[0][4]  = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);
    prog[2][1]  = rt(w(OP_DIVS, SRC_N, SRC_IMM, NJ), DIR_E);
    prog[3][2]  = rt(w(OP_DIVS, SRC_W, SRC_IMM, NJ), DIR_N);
    prog[1][3]  = wr(w(OP_DIVS, SRC_S, SRC_IMM, NJ), 0);
    for (int k = 4; k < 9; k++) prog[1][k] = wr(w(OP_DIVS, SRC_R0, SRC_IMM, NJ), 0);
    prog[1][9]  = wr(w(OP_AND, SRC_R0, SRC_IMM, 32'hFFFF), 1);              // i
    prog[1][10] = wr(w(OP_SHR, SRC_R0, SRC_IMM, 16), 2);                    // j
    prog[1][11] = wr(w(OP_SHL, SRC_R2, SRC_IMM, 2), 2);                     // j*NI (NI = 4)
    prog[1][12] = wr(w(OP_ADD, SRC_R2, SRC_R1), 2);
    prog[1][13] = wr(w(OP_LT, SRC_W, SRC_IMM, 0), 1);
    prog[1][14] = wr(w(OP_SEL, SRC_IMM, SRC_W, 0), 3); prog[1][14].src_c = SRC_R1;
    prog[1][15] = w(OP_STORE, SRC_R2, SRC_R3);
    run_prog("distributed", N * 16);
    chk(ev_cnt[3] == N * 8, $sformatf("distributed slices %0d", ev_cnt[3]));
    chk(ev_cnt[2] == 0, "no pipelined overlap with non-pipelined units");

    // ------------------------------------------------ fused load-multiply, exclusive
    clear_prog(4);
    prog[0][0] = wr(w(OP_ADD, SRC_R0, SRC_IMM, BA), 1);                   // &A[x]
    prog[0][1] = wr(w(OP_LDMUL, SRC_R1, SRC_IMM, 77, ISS_EXCL), 2);       // A[x] * K, 3 cycles
    prog[0][2] = w(OP_STORE, SRC_R1, SRC_R2);
    prog[0][3] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);
    run_scale("ld-mul exclusive", N * 6, 77);
    chk(ev_cnt[0] == N * 2, $sformatf("ld-mul exclusive stall cycles %0d", ev_cnt[0]));

    // ------------------------------------------------ fused load-multiply, inclusive, II = 5
    clear_prog(5);
    prog[0][0] = wr(w(OP_ADD, SRC_R0, SRC_IMM, BA), 1);
    prog[0][1] = w(OP_LDMUL, SRC_R1, SRC_IMM, -5, ISS_START);
    prog[0][2] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                   // overlaps the fused operation
    prog[0][3] = wr(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LDMUL), 2);
    prog[0][4] = w(OP_STORE, SRC_R1, SRC_R2);
    for (int x = 0; x < N; x++) A[x] = A[x] * 77;                        // the next run starts from the scaled words
    run_scale("ld-mul inclusive", N * 5, -5);
    chk(ev_cnt[0] == 0 && ev_cnt[1] == N, $sformatf("ld-mul inclusive overlap %0d", ev_cnt[1]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
