// flame_gemm_tb: matrix multiplication C = A * B (4 x 4 matrices) on the array
// at its default size (4 x 4 tiles, 9-cycle pipelined divider, 2-cycle
// pipelined multiplier), in the shape a compiler gives it after loop
// flattening and unrolling: one loop over the 16 outputs x with
// i = x / NJ and j = x % NJ, the k loop unrolled four times.
//
// Hand-made modulo schedule with II = 16; one iteration spans 26 cycles, so
// consecutive iterations overlap. Cycle c of an iteration runs word c mod 16:
//  * tile (0,0): x in R0; DIV and REM OPT_START in cycles 0 and 1 (both in the
//    pipelined divider at once), x++ in cycle 2 while they run, OPT_END in
//    cycles 8 and 9 (i and j sent east), then MAC i*NJ + j and + 128 gives
//    the address of C[i][j], sent east in cycle 12;
//  * tile (0,1): A-row addresses from i, four loads with OPT_START/OPT_END
//    back to back (START of one and END of the previous in one word), each
//    word sent south; passes j and the C address east;
//  * tile (0,2): B-column addresses from j, four loads sent south; in cycle
//    25 (word 9 of the next iteration) it stores the sum arriving from the
//    south at the C address;
//  * tile (1,1) forwards the A words east; tile (1,2) multiplies the pairs
//    (four MUL OPT_STARTs in a row in the pipelined multiplier) and adds the
//    products.
// SPM layout: A at 16, B at 64, C at 128 (word 0 takes the store of the
// first, empty pass). C is read back and compared with a product computed
// here; inclusive and pipelined overlaps must both occur. The loop form and
// the unrolling follow the paper's benchmark preparation; the mapping, sizes
// and layout are this design's own.
module flame_gemm_tb;
  import flame_pkg::*;
  localparam int NI = 4, NJ = 4, NK = 4, N = NI * NJ, AB = 16, BB = 64, CB = 128, NT = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  cmd_t cmd;
  rsp_t rsp;
  logic [NT-1:0][3:0] tpc;
  logic [NT-1:0][3:0] tev;
  int ev_cnt [4];
  int ld_cnt = 0, st_cnt = 0;
  word_t A [NI*NK], B [NK*NJ];

  flame_cgra u_dut (.clk, .rst_n, .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd),
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
    for (int x = 0; x < NI * NK; x++) begin
      pl = '0; pl[31:0] = A[x];
      send(CMD_SPM_WRITE, 0, AB + x, pl, r, n);
    end
    for (int x = 0; x < NK * NJ; x++) begin
      pl = '0; pl[31:0] = B[x];
      send(CMD_SPM_WRITE, 0, BB + x, pl, r, n);
    end
    for (int x = 0; x < N; x++) begin
      pl = '0; pl[31:0] = 32'hDEAD_BEEF;
      send(CMD_SPM_WRITE, 0, CB + x, pl, r, n);
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
    for (int i = 0; i < NI; i++) for (int j = 0; j < NJ; j++) begin
      word_t e = 0;
      for (int k = 0; k < NK; k++) e += A[i*NK + k] * B[k*NJ + j];
      send(CMD_SPM_READ, 0, CB + i * NJ + j, '0, r, n);
      chk(r.kind == RSP_DATA && r.data == e, $sformatf("%s: C[%0d][%0d] = %0d, expected %0d", name, i, j, $signed(r.data), $signed(e)));
    end
    $display("%s: exclusive stall %0d, inclusive overlap %0d, pipelined overlap %0d, distributed slices %0d",
             name, ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3]);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0;
    foreach (A[x]) A[x] = word_t'($urandom_range(0, 2000)) - 1000;
    foreach (B[x]) B[x] = word_t'($urandom_range(0, 2000)) - 1000;

    // ------------------------------------------------ inclusive, II = 16
    // tile index = row * 4 + column
    clear_prog(16);
    // tile (0,0): indices and the C address
    prog[0][0]  = w(OP_DIV, SRC_R0, SRC_IMM, NJ, ISS_START);                        // i
    prog[0][1]  = w(OP_REM, SRC_R0, SRC_IMM, NJ, ISS_START);                        // j
    prog[0][2]  = wr(w(OP_ADD, SRC_R0, SRC_IMM, 1), 0);                             // x++
    prog[0][8]  = wr(rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_QUO), DIR_E), 1);
    prog[0][9]  = wr(rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_REM), DIR_E), 2);
    prog[0][10] = w(OP_MAC, SRC_R1, SRC_IMM, NJ, ISS_START); prog[0][10].src_c = SRC_R2;
    prog[0][11] = wr(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_MUL), 3);
    prog[0][12] = rt(w(OP_ADD, SRC_R3, SRC_IMM, CB), DIR_E);                        // &C[i][j]
    // tile (0,1): A[i][0..3]
    prog[1][9]  = wr(w(OP_SHL, SRC_W, SRC_IMM, 2), 0);                              // i*NK
    prog[1][10] = rt(wr(w(OP_ADD, SRC_R0, SRC_IMM, AB + 1), 1), DIR_E, SRC_W);      // j east
    prog[1][11] = wr(w(OP_ADD, SRC_R0, SRC_IMM, AB + 2), 2);
    prog[1][12] = wr(w(OP_ADD, SRC_R0, SRC_IMM, AB + 3), 3);
    prog[1][13] = rt(wr(w(OP_ADD, SRC_R0, SRC_IMM, AB), 0), DIR_E, SRC_W);          // C address east
    prog[1][14] = w(OP_LOAD, SRC_R0, SRC_NONE, 0, ISS_START);
    prog[1][15] = rt(w(OP_LOAD, SRC_R1, SRC_NONE, 0, ISS_START, END_LD), DIR_S);
    prog[1][0]  = rt(w(OP_LOAD, SRC_R2, SRC_NONE, 0, ISS_START, END_LD), DIR_S);
    prog[1][1]  = rt(w(OP_LOAD, SRC_R3, SRC_NONE, 0, ISS_START, END_LD), DIR_S);
    prog[1][2]  = rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LD), DIR_S);
    // tile (0,2): B[0..3][j] and the store
    prog[2][11] = wr(w(OP_ADD, SRC_W, SRC_IMM, BB), 0);
    prog[2][12] = wr(w(OP_ADD, SRC_R0, SRC_IMM, NJ), 1);
    prog[2][13] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 2 * NJ), 2);
    prog[2][14] = wr(w(OP_ADD, SRC_R0, SRC_IMM, 3 * NJ), 3);
    prog[2][15] = w(OP_LOAD, SRC_R0, SRC_NONE, 0, ISS_START);
    prog[2][0]  = rt(w(OP_LOAD, SRC_R1, SRC_NONE, 0, ISS_START, END_LD), DIR_S);
    prog[2][1]  = rt(w(OP_LOAD, SRC_R2, SRC_NONE, 0, ISS_START, END_LD), DIR_S);
    prog[2][2]  = rt(w(OP_LOAD, SRC_R3, SRC_NONE, 0, ISS_START, END_LD), DIR_S);
    prog[2][3]  = rt(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_LD), DIR_S);
    prog[2][9]  = w(OP_STORE, SRC_W, SRC_S);                                        // previous iteration's C
    // tile (1,1): A words east, one cycle later
    for (int k = 0; k < 4; k++) prog[5][k] = rt(cfg_nop(), DIR_E, SRC_N);
    // tile (1,2): four products, then their sum north
    prog[6][1]  = w(OP_MUL, SRC_W, SRC_N, 0, ISS_START);
    for (int k = 2; k < 5; k++) prog[6][k] = wr(w(OP_MUL, SRC_W, SRC_N, 0, ISS_START, END_MUL), k - 2);
    prog[6][5]  = wr(w(OP_NOP, SRC_NONE, SRC_NONE, 0, ISS_SINGLE, END_MUL), 3);
    prog[6][6]  = wr(w(OP_ADD, SRC_R0, SRC_R1), 0);
    prog[6][7]  = wr(w(OP_ADD, SRC_R2, SRC_R3), 2);
    prog[6][8]  = rt(w(OP_ADD, SRC_R0, SRC_R2), DIR_N);
    run_prog("gemm", N * 16 + 10);
    chk(ev_cnt[0] == 0, "inclusive never stalls");
    chk(ev_cnt[1] > 0, $sformatf("inclusive overlap %0d", ev_cnt[1]));
    chk(ev_cnt[2] > 0, $sformatf("pipelined overlap %0d", ev_cnt[2]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
