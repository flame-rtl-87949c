// tile_tb: one tile (9-cycle pipelined divider, 2-cycle multiplier) runs
// three loop programs, with new operands on its north and west inputs in
// every iteration:
//  * exclusive: DIV held for 9 cycles, then an ADD (II = 10). The quotient
//    must leave on the south output at the end of the 9th cycle, the counter
//    must hold for 8 stall cycles per iteration.
//  * inclusive: DIV OPT_START, MAC OPT_START (north * west + 7), MAC OPT_END
//    (to east and R0),
//    DIV OPT_END (to south), ADD R0 + north (II = 5). Each division ends in
//    the next iteration, so divisions overlap in the pipelined divider and the
//    ADD runs while a division is in flight.
//  * distributed: a 16-bit division as eight OP_DIVS slices through R0. A
//    second tile built without the multi-cycle divider (HAS_DIV = 0) runs
//    this program alongside and must give the same outputs.
// Every result is compared with arithmetic done here.
module tile_tb;
  import flame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, clear = 0;
  logic cfg_we = 0, len_we = 0;
  logic [3:0] cfg_waddr = 0, len = 0, pc;
  cfg_t cfg_wdata;
  word_t [NDIRS-1:0] in, out;
  logic [3:0] ev;
  logic mwe; logic [9:0] maddr; word_t mwd;
  int ev_cnt [4];
  logic run_d = 0;
  word_t [NDIRS-1:0] out_d;
  logic [3:0] pc_d, ev_d;
  logic mwe_d; logic [9:0] maddr_d; word_t mwd_d;

  tile u_dut (.clk, .rst_n, .run_i(run), .clear_i(clear), .cfg_we_i(cfg_we), .cfg_waddr_i(cfg_waddr),
    .cfg_wdata_i(cfg_wdata), .len_we_i(len_we), .len_i(len), .in_i(in), .out_o(out),
    .mem_we_o(mwe), .mem_addr_o(maddr), .mem_wdata_o(mwd), .mem_rdata_i('0), .pc_o(pc), .ev_o(ev));

  tile #(.HAS_DIV(1'b0)) u_dut_nodiv (.clk, .rst_n, .run_i(run_d), .clear_i(clear), .cfg_we_i(cfg_we),
    .cfg_waddr_i(cfg_waddr), .cfg_wdata_i(cfg_wdata), .len_we_i(len_we), .len_i(len), .in_i(in),
    .out_o(out_d), .mem_we_o(mwe_d), .mem_addr_o(maddr_d), .mem_wdata_o(mwd_d), .mem_rdata_i('0),
    .pc_o(pc_d), .ev_o(ev_d));

  always #5 clk = ~clk;
  always @(posedge clk) if (run) for (int i = 0; i < 4; i++) ev_cnt[i] += int'(ev[i]);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic cfg_t w(op_e op, src_e a, src_e b, issue_e iss = ISS_SINGLE, end_e fin = END_NONE,
                             word_t imm = 0);
    cfg_t c = cfg_nop();
    c.op = op; c.src_a = a; c.src_b = b; c.issue = iss; c.fin = fin; c.imm = imm;
    return c;
  endfunction

  cfg_t prog [$];
  task automatic load();
    run = 0;
    foreach (prog[i]) begin
      @(negedge clk); cfg_we = 1; cfg_waddr = 4'(i); cfg_wdata = prog[i];
    end
    @(negedge clk); cfg_we = 0; len_we = 1; len = 4'(prog.size() - 1);
    @(negedge clk); len_we = 0; clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 4; i++) ev_cnt[i] = 0;
  endtask

  function automatic word_t sdiv(word_t x, word_t y);
    return (y == 0) ? '1 : word_t'($signed(x) / $signed(y));
  endfunction

  initial begin
    cfg_t c;
    word_t xn [$], xw [$];
    in = '0;
    #12 rst_n = 1;

    // ---------------- exclusive, II = 10
    prog = {};
    c = w(OP_DIV, SRC_N, SRC_W, ISS_EXCL); c.route[DIR_S] = SRC_RES; prog.push_back(c);
    c = w(OP_ADD, SRC_N, SRC_IMM, ISS_SINGLE, END_NONE, 5); c.route[DIR_E] = SRC_RES; prog.push_back(c);
    load();
    for (int p = 0; p < 20; p++) begin
      in[DIR_N] = $urandom; in[DIR_W] = $urandom_range(1, 1000);
      run = 1;
      for (int k = 0; k < 10; k++) begin
        if (k >= 1 && k <= 8) chk(pc == 0, "exclusive holds the counter");
        @(negedge clk);
        if (k == 8) chk(out[DIR_S] == sdiv(in[DIR_N], in[DIR_W]), $sformatf("exclusive quotient p=%0d", p));
      end
      chk(out[DIR_E] == in[DIR_N] + 5, "add after exclusive");
    end
    run = 0;
    chk(ev_cnt[0] == 20 * 8, $sformatf("exclusive stall cycles %0d", ev_cnt[0]));

    // ---------------- inclusive, II = 5
    prog = {};
    prog.push_back(w(OP_DIV, SRC_N, SRC_W, ISS_START));
    c = w(OP_MAC, SRC_N, SRC_W, ISS_START, END_NONE, 7); c.src_c = SRC_IMM; prog.push_back(c);
    c = w(OP_NOP, SRC_NONE, SRC_NONE, ISS_SINGLE, END_MUL); c.route[DIR_E] = SRC_RES;
    c.rf_we = 1; c.rf_waddr = 0; c.rf_wsrc = SRC_RES; prog.push_back(c);
    c = w(OP_NOP, SRC_NONE, SRC_NONE, ISS_SINGLE, END_QUO); c.route[DIR_S] = SRC_RES; prog.push_back(c);
    c = w(OP_ADD, SRC_R0, SRC_N); c.route[DIR_N] = SRC_RES; prog.push_back(c);
    load();
    for (int p = 0; p < 30; p++) begin
      in[DIR_N] = $urandom; in[DIR_W] = (p % 5 == 0) ? $urandom : $urandom_range(1, 300);
      xn.push_back(in[DIR_N]); xw.push_back(in[DIR_W]);
      run = 1;
      repeat (5) @(negedge clk);
      chk(out[DIR_E] == in[DIR_N] * in[DIR_W] + 7, "inclusive multiply-accumulate");
      chk(out[DIR_N] == in[DIR_N] * in[DIR_W] + 7 + in[DIR_N], "inclusive add of R0");
      if (p > 0) chk(out[DIR_S] == sdiv(xn[p-1], xw[p-1]), $sformatf("inclusive quotient p=%0d", p));
    end
    run = 0;
    chk(ev_cnt[0] == 0, "no stall in inclusive");
    chk(ev_cnt[1] >= 29, $sformatf("inclusive overlap %0d", ev_cnt[1]));
    chk(ev_cnt[2] >= 29, $sformatf("pipelined overlap %0d", ev_cnt[2]));

    // ---------------- distributed 16-bit division, II = 10
    prog = {};
    c = w(OP_PASS, SRC_N, SRC_NONE); c.rf_we = 1; c.rf_waddr = 0; c.rf_wsrc = SRC_RES; prog.push_back(c);
    for (int s = 0; s < 8; s++) begin
      c = w(OP_DIVS, SRC_R0, SRC_W); c.rf_we = 1; c.rf_waddr = 0; c.rf_wsrc = SRC_RES; prog.push_back(c);
    end
    c = w(OP_NOP, SRC_NONE, SRC_NONE); c.route[DIR_S] = SRC_R0; prog.push_back(c);
    load();
    for (int p = 0; p < 20; p++) begin
      logic [15:0] x, y;
      x = 16'($urandom); y = 16'($urandom_range(1, 2000));
      in[DIR_N] = {16'h0, x}; in[DIR_W] = {16'h0, y};
      run = 1; run_d = 1;
      repeat (10) @(negedge clk);
      chk(out[DIR_S] == {x % y, x / y}, $sformatf("distributed %0d/%0d", x, y));
      chk(out_d[DIR_S] == out[DIR_S] && pc_d == pc, "tile without divider matches");
    end
    run = 0; run_d = 0;
    chk(ev_cnt[3] == 20 * 8, "distributed slices");
    $display("exclusive/inclusive/distributed checks done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
