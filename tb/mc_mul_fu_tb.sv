// mc_mul_fu_tb: pipelined and non-pipelined multipliers at the default
// latency. Every product must appear, with done, exactly LAT-1 cycles after
// its issue and equal the low word of a * b, or of a * b + c for a MAC; the pipelined unit takes an
// issue every cycle, the non-pipelined one one at a time and is busy between.
module mc_mul_fu_tb;
  import flame_pkg::*;
  localparam int LAT = 2;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  iss_p, iss_n;
  word_t a_p, b_p, a_n, b_n, p_p, p_n, c_p, c_n;
  logic  m_p, m_n;
  logic  d_p, d_n, busy_p, busy_n;

  mc_mul_fu #(.LAT(LAT), .PIPELINED(1'b1)) u_p (.clk, .rst_n, .issue_i(iss_p), .a_i(a_p), .b_i(b_p), .c_i(c_p), .mac_i(m_p),
    .prod_o(p_p), .done_o(d_p), .busy_o(busy_p));
  mc_mul_fu #(.LAT(LAT), .PIPELINED(1'b0)) u_n (.clk, .rst_n, .issue_i(iss_n), .a_i(a_n), .b_i(b_n), .c_i(c_n), .mac_i(m_n),
    .prod_o(p_n), .done_o(d_n), .busy_o(busy_n));

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  word_t exp_p[$];
  int    exp_t[$];

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && d_p) begin
    checks++;
    if (exp_t.size() == 0 || exp_t[0] != cyc || p_p != exp_p[0]) begin
      failures++;
      $display("FAIL pipe cyc=%0d p=%h", cyc, p_p);
    end
    if (exp_t.size() != 0) begin void'(exp_t.pop_front()); void'(exp_p.pop_front()); end
  end

  initial begin
    iss_p = 0; iss_n = 0; a_p = 0; b_p = 0; a_n = 0; b_n = 0; c_p = 0; c_n = 0; m_p = 0; m_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      iss_p = (i % 7 != 6);
      a_p = $urandom; b_p = $urandom; c_p = $urandom; m_p = $urandom_range(0, 1);
      if (iss_p) begin exp_p.push_back(a_p * b_p + (m_p ? c_p : 0)); exp_t.push_back(cyc + LAT - 1); end
    end
    @(negedge clk) iss_p = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_t.size() != 0 || busy_p) begin failures++; $display("FAIL pipelined results missing"); end
    for (int i = 0; i < 100; i++) begin
      int t0, n;
      word_t e;
      @(negedge clk);
      iss_n = 1; a_n = $urandom; b_n = $urandom; c_n = $urandom; m_n = $urandom_range(0, 1);
      e = a_n * b_n + (m_n ? c_n : 0); t0 = cyc;
      @(negedge clk);
      iss_n = 0; n = 1;
      while (!d_n && n < 20) begin
        checks++;
        if (!busy_n) begin failures++; $display("FAIL not busy"); end
        @(negedge clk); n++;
      end
      checks++;
      if (cyc - t0 != LAT - 1 || p_n != e) begin
        failures++;
        $display("FAIL iter latency %0d p=%h want %h", cyc - t0 + 1, p_n, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
