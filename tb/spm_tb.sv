// spm_tb: random reads and writes on all four tile ports and the host port
// at once, against a shadow memory with the same write priority (host last,
// then the highest port). Read data must appear one cycle after the address
// and hold the word as it was before that cycle's writes.
module spm_tb;
  import flame_pkg::*;
  localparam int WORDS = 64, NP = 4, AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [NP-1:0] we;
  logic [NP-1:0][AW-1:0] addr;
  word_t [NP-1:0] wd, rd;
  logic h_we;
  logic [AW-1:0] h_addr;
  word_t h_wd, h_rd;
  word_t shadow [WORDS];
  word_t [NP-1:0] exp_rd;
  word_t exp_h;

  spm #(.WORDS(WORDS), .NPORTS(NP)) u_dut (.clk, .we_i(we), .addr_i(addr), .wdata_i(wd), .rdata_o(rd),
    .h_we_i(h_we), .h_addr_i(h_addr), .h_wdata_i(h_wd), .h_rdata_o(h_rd));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; h_we = 0; addr = '0; h_addr = 0; wd = '0; h_wd = 0;
    // initialise through the host port
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); h_we = 1; h_addr = i; h_wd = $urandom; shadow[i] = h_wd;
    end
    @(negedge clk); h_we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        we[p] = ($urandom_range(0, 3) == 0); addr[p] = $urandom_range(0, 15); wd[p] = $urandom;
      end
      h_we = ($urandom_range(0, 5) == 0); h_addr = $urandom_range(0, 15); h_wd = $urandom;
      for (int p = 0; p < NP; p++) exp_rd[p] = shadow[addr[p]];
      exp_h = shadow[h_addr];
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) shadow[addr[p]] = wd[p];
      if (h_we) shadow[h_addr] = h_wd;
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (rd[p] != exp_rd[p]) begin failures++; $display("FAIL read port %0d", p); end
      end
      checks++;
      if (h_rd != exp_h) begin failures++; $display("FAIL host read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
