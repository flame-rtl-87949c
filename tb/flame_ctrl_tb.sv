// flame_ctrl_tb: drives every command through the controller. Checks the
// tile write strobes and fields, the SPM host port (against a small memory
// model), the one-cycle clear before a run, the length of the run and the
// responses with their timing (two cycles for an SPM read, one otherwise).
module flame_ctrl_tb;
  import flame_pkg::*;
  localparam int NT = 16, CD = 16, AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  cmd_t cmd;
  rsp_t rsp;
  logic [NT-1:0] cfg_we, len_we;
  logic [3:0] cfg_waddr, len;
  cfg_t cfg_wdata;
  logic run, clear, h_we;
  logic [AW-1:0] h_addr;
  word_t h_wdata, h_rdata;
  word_t mem [1 << AW];

  flame_ctrl #(.NTILES(NT), .CFG_DEPTH(CD), .AW(AW)) u_dut (.clk, .rst_n, .cmd_valid_i(cmd_valid),
    .cmd_ready_o(cmd_ready), .cmd_i(cmd), .rsp_valid_o(rsp_valid), .rsp_o(rsp), .cfg_we_o(cfg_we),
    .cfg_waddr_o(cfg_waddr), .cfg_wdata_o(cfg_wdata), .len_we_o(len_we), .len_o(len), .run_o(run),
    .clear_o(clear), .h_we_o(h_we), .h_addr_o(h_addr), .h_wdata_o(h_wdata), .h_rdata_i(h_rdata));
  always @(posedge clk) begin
    h_rdata <= mem[h_addr];
    if (h_we) mem[h_addr] <= h_wdata;
  end
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sends one command at negedge; strobes are sampled before the edge
  task automatic send(input cmd_e c, input int tile, input int addr, input logic [CFG_W-1:0] pl);
    @(negedge clk);
    cmd_valid = 1; cmd.cmd = c; cmd.tile = 8'(tile); cmd.addr = 16'(addr); cmd.payload = pl;
    #1;
    chk(cmd_ready, "ready when idle");
    chk(cfg_we == ((c == CMD_CFG_WRITE) ? NT'(1) << tile : '0), "cfg strobe");
    chk(len_we == ((c == CMD_CFG_LEN) ? NT'(1) << tile : '0), "len strobe");
    chk(h_we == (c == CMD_SPM_WRITE), "spm strobe");
    if (c == CMD_CFG_WRITE) chk(cfg_waddr == 4'(addr) && cfg_wdata == cfg_t'(pl), "cfg fields");
    if (c == CMD_CFG_LEN) chk(len == 4'(addr), "len field");
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    cmd_valid = 0; cmd = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int t = $urandom_range(0, NT - 1);
      logic [CFG_W-1:0] pl;
      for (int k = 0; k < CFG_W; k += 32) pl[k +: 32] = $urandom;
      fork
        send(CMD_CFG_WRITE, t, $urandom_range(0, 15), pl);
        begin @(negedge clk); @(posedge clk); #1 chk(rsp_valid && rsp.kind == RSP_ACK, "ack cfg"); end
      join
      fork
        send(CMD_CFG_LEN, t, $urandom_range(0, 15), pl);
        begin @(negedge clk); @(posedge clk); #1 chk(rsp_valid && rsp.kind == RSP_ACK, "ack len"); end
      join
    end
    for (int i = 0; i < 64; i++) begin
      logic [CFG_W-1:0] pl;
      pl = '0; pl[31:0] = i * 7 + 1;
      send(CMD_SPM_WRITE, 0, i, pl);
    end
    for (int i = 0; i < 64; i++) begin
      fork
        send(CMD_SPM_READ, 0, i, '0);
        begin @(negedge clk); @(posedge clk); #1 chk(!rsp_valid && !cmd_ready, "read in progress");
          @(posedge clk); #1 chk(rsp_valid && rsp.kind == RSP_DATA && rsp.data == word_t'(i * 7 + 1), $sformatf("spm read %0d: %0d %0d %0d", i, rsp_valid, rsp.kind, rsp.data)); end
      join
    end
    // runs of a few lengths: clear for one cycle, then exactly n run cycles, then DONE
    for (int n = 1; n < 30; n += 7) begin
      int nrun, nclr;
      logic [CFG_W-1:0] pl;
      pl = '0; pl[31:0] = n;
      nrun = 0; nclr = 0;
      @(negedge clk);
      cmd_valid = 1; cmd.cmd = CMD_RUN; cmd.payload = pl;
      @(negedge clk);
      cmd_valid = 0;
      while (!rsp_valid && nrun + nclr < 100) begin
        if (run) nrun++;
        if (clear) nclr++;
        chk(!cmd_ready, "busy while running");
        @(negedge clk);
      end
      chk(nrun == n && nclr == 1, $sformatf("run length %0d: %0d %0d", n, nrun, nclr));
      chk(rsp_valid && rsp.kind == RSP_DONE && rsp.data == word_t'(n), "done response");
      chk(cmd_ready && !run, "idle again with the response");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
