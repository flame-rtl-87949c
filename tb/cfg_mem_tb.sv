// cfg_mem_tb: after reset every entry must read as a no-operation word; then
// random control words are written and every entry is read back.
module cfg_mem_tb;
  import flame_pkg::*;
  localparam int D = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we;
  logic [$clog2(D)-1:0] wa, ra;
  cfg_t wd, rd;
  cfg_t shadow [D];

  cfg_mem #(.DEPTH(D)) u_dut (.clk, .rst_n, .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd));
  always #5 clk = ~clk;

  function automatic cfg_t rnd_cfg();
    logic [CFG_W-1:0] v;
    for (int i = 0; i < CFG_W; i += 32) v[i +: 32] = $urandom;
    return cfg_t'(v);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = '0; ra = 0;
    #12 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      ra = i; #1;
      checks++;
      if (rd != cfg_nop()) begin failures++; $display("FAIL reset entry %0d", i); end
      shadow[i] = cfg_nop();
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1; wa = $urandom; wd = rnd_cfg();
      @(posedge clk);
      shadow[wa] = wd;
      #1 we = 0;
      for (int j = 0; j < D; j++) begin
        ra = j; #1;
        checks++;
        if (rd != shadow[j]) begin failures++; $display("FAIL entry %0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
