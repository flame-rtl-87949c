// mc_ldmul_fu_tb: the fused load-multiply unit with a synchronous memory in
// front of it, as in a top-row tile: an issue in cycle t sends the address to
// the memory, whose registered read is the unit's loaded word in t+1. Random
// operations are issued one after another, either as soon as the unit allows
// (the cycle done_o is high) or after a random gap. Each result must appear
// exactly two cycles after its issue with done_o high and equal
// mem[addr] * b; busy_o must be high exactly in the two cycles after an
// issue. A short watchdog ends the run if done_o never comes.
module mc_ldmul_fu_tb;
  import flame_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic issue = 0, ld_done, own, done, busy;
  word_t b = 0, ld_data, prod;
  logic [5:0] addr = 0;
  word_t mem [64];
  word_t rd;

  mc_ldmul_fu u_dut (.clk, .rst_n, .issue_i(issue), .b_i(b), .ld_done_i(ld_done), .ld_data_i(ld_data),
    .own_o(own), .prod_o(prod), .done_o(done), .busy_o(busy));

  // the LSU load path: registered read, valid one cycle after the issue
  always_ff @(posedge clk) begin
    rd      <= mem[addr];
    ld_done <= rst_n && issue;
  end
  assign ld_data = ld_done ? rd : '0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");
    for (int n = 0; n < 300; n++) begin
      word_t e;
      automatic int gap = (n % 2 == 0) ? 0 : $urandom_range(0, 3);
      addr = 6'($urandom); b = (n % 5 == 0) ? word_t'($urandom_range(0, 9)) : $urandom;
      e = mem[addr] * b;
      issue = 1;
      @(negedge clk);
      issue = 0; b = $urandom; addr = 6'($urandom);
      chk(busy && own && !done, $sformatf("op %0d: loading in cycle t+1", n));
      @(negedge clk);
      chk(done && busy && !own, $sformatf("op %0d: done in cycle t+2", n));
      chk(prod == e, $sformatf("op %0d: %h, expected %h", n, prod, e));
      repeat (gap) begin
        @(negedge clk);
        chk(!done && !busy, $sformatf("op %0d: idle after the result", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
