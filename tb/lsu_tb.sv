// lsu_tb: the LSU in front of a synchronous-read memory model. Random loads
// and stores, some back to back, are checked against a shadow memory: a load
// issued in one cycle must return its word with ld_done in the next, and
// nothing may be written unless a store is enabled.
module lsu_tb;
  import flame_pkg::*;
  localparam int AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, st, ld, we, done;
  word_t a, b, wdat, rdat, ldat;
  logic [AW-1:0] addr;
  word_t mem [1 << AW], shadow [1 << AW];

  lsu #(.AW(AW)) u_dut (.clk, .rst_n, .st_en_i(st), .ld_issue_i(ld), .a_i(a), .b_i(b), .mem_we_o(we),
    .mem_addr_o(addr), .mem_wdata_o(wdat), .mem_rdata_i(rdat), .ld_data_o(ldat), .ld_done_o(done));
  always @(posedge clk) begin
    rdat <= mem[addr];
    if (we) mem[addr] <= wdat;
  end
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit    pend;
    word_t pexp;
    for (int i = 0; i < (1 << AW); i++) begin mem[i] = i * 3; shadow[i] = i * 3; end
    st = 0; ld = 0; a = 0; b = 0; pend = 0; pexp = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // result of last cycle's load
      checks++;
      if (done != pend || (pend && ldat != pexp)) begin failures++; $display("FAIL load %0d", i); end
      case ($urandom_range(0, 3))
        0: begin st = 1; ld = 0; end
        1, 2: begin st = 0; ld = 1; end
        default: begin st = 0; ld = 0; end
      endcase
      a = $urandom; b = $urandom;
      pend = ld; pexp = shadow[a[AW-1:0]];
      @(posedge clk);
      if (st) shadow[a[AW-1:0]] = b;
      #1;
      checks++;
      if (mem[a[AW-1:0]] != shadow[a[AW-1:0]]) begin failures++; $display("FAIL store"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
