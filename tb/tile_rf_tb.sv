// tile_rf_tb: random writes against a shadow copy; all registers are read
// back every cycle, and reset must clear them.
module tile_rf_tb;
  import flame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we;
  logic [$clog2(NREGS)-1:0] wa;
  word_t wd;
  word_t [NREGS-1:0] regs, shadow;

  tile_rf u_dut (.clk, .rst_n, .we_i(we), .waddr_i(wa), .wdata_i(wd), .regs_o(regs));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; shadow = '0;
    #12 rst_n = 1;
    checks++;
    if (regs != '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = $urandom; wd = $urandom;
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
      checks++;
      if (regs != shadow) begin failures++; $display("FAIL step %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
