// mc_div_fu_tb: a pipelined and a non-pipelined divider at the default
// 9-cycle latency. The pipelined one gets a new division every cycle and each
// result must appear exactly 8 cycles after its issue; the non-pipelined one
// gets one division at a time and must finish in the same 8 cycles and stay
// busy meanwhile. Results are compared with signed integer division (C
// semantics; division by zero gives -1 and the dividend).
module mc_div_fu_tb;
  import flame_pkg::*;
  localparam int LAT = 9;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  iss_p, iss_n;
  word_t a_p, b_p, a_n, b_n, q_p, r_p, q_n, r_n;
  logic  d_p, d_n, busy_p, busy_n;

  mc_div_fu #(.LAT(LAT), .PIPELINED(1'b1)) u_p (.clk, .rst_n, .issue_i(iss_p), .a_i(a_p), .b_i(b_p),
    .quo_o(q_p), .rem_o(r_p), .done_o(d_p), .busy_o(busy_p));
  mc_div_fu #(.LAT(LAT), .PIPELINED(1'b0)) u_n (.clk, .rst_n, .issue_i(iss_n), .a_i(a_n), .b_i(b_n),
    .quo_o(q_n), .rem_o(r_n), .done_o(d_n), .busy_o(busy_n));

  always #5 clk = ~clk;

  function automatic void ref_div(input word_t x, input word_t y, output word_t q, output word_t r);
    if (y == 0) begin
      q = '1; r = x;
    end else if (x == 32'h8000_0000 && y == '1) begin
      q = x; r = 0;
    end else begin
      q = word_t'($signed(x) / $signed(y));
      r = word_t'($signed(x) % $signed(y));
    end
  endfunction

  function automatic word_t rnd();
    case ($urandom_range(0, 5))
      0: return 0;
      1: return 32'h8000_0000;
      2: return '1;
      3: return word_t'($urandom_range(0, 50)) - 25;
      default: return $urandom;
    endcase
  endfunction

  word_t exp_q[$], exp_r[$];
  int    exp_t[$];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pipelined: check each done against the queue
  always @(negedge clk) if (rst_n) begin
    if (d_p) begin
      checks++;
      if (exp_t.size() == 0 || exp_t[0] != cyc || q_p != exp_q[0] || r_p != exp_r[0]) begin
        failures++;
        $display("FAIL pipe cyc=%0d q=%h r=%h", cyc, q_p, r_p);
      end
      if (exp_t.size() != 0) begin
        void'(exp_t.pop_front()); void'(exp_q.pop_front()); void'(exp_r.pop_front());
      end
    end
    if (busy_p) begin
      checks++; failures++;
      $display("FAIL pipelined divider reports busy");
    end
  end

  initial begin
    iss_p = 0; iss_n = 0; a_p = 0; b_p = 0; a_n = 0; b_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pipelined: back-to-back issues, with a few gaps
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      iss_p = (i % 10 != 9);
      a_p = rnd(); b_p = rnd();
      if (iss_p) begin
        word_t q, r;
        ref_div(a_p, b_p, q, r);
        exp_q.push_back(q); exp_r.push_back(r); exp_t.push_back(cyc + LAT - 1);
      end
    end
    @(negedge clk) iss_p = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) begin
      failures++;
      $display("FAIL %0d pipelined results missing", exp_t.size());
    end
    // non-pipelined: one at a time
    for (int i = 0; i < 100; i++) begin
      word_t q, r;
      int t0, n;
      @(negedge clk);
      iss_n = 1; a_n = rnd(); b_n = rnd();
      ref_div(a_n, b_n, q, r);
      t0 = cyc;
      @(negedge clk);
      iss_n = 0;
      n = 1;
      while (!d_n && n < 40) begin
        checks++;
        if (!busy_n) begin failures++; $display("FAIL not busy while dividing"); end
        @(negedge clk);
        n++;
      end
      checks++;
      if (cyc - t0 != LAT - 1 || q_n != q || r_n != r) begin
        failures++;
        $display("FAIL iter %0d/%0d: latency %0d q=%h r=%h want %h %h", $signed(a_n), $signed(b_n),
                 cyc - t0 + 1, q_n, r_n, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
