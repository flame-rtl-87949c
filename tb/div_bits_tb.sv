// div_bits_tb: checks the restoring-division slice against integer division.
// A 16-step slice on (R=0, Q=dividend) must give the full quotient and
// remainder; two 8-step halves chained, and a slice limited by n_i, must give
// the same as the equivalent number of single steps.
module div_bits_tb;
  int checks = 0, failures = 0;
  logic [15:0] q0, d, r1, q1, r2a, q2a, r2, q2, r3, q3;
  logic [7:0]  n3;

  div_bits #(.W(16), .NB(16)) u_full (.r_i('0), .q_i(q0), .d_i(d), .n_i(8'd16), .r_o(r1), .q_o(q1));
  div_bits #(.W(16), .NB(8))  u_h0   (.r_i('0), .q_i(q0), .d_i(d), .n_i(8'd8),  .r_o(r2a), .q_o(q2a));
  div_bits #(.W(16), .NB(8))  u_h1   (.r_i(r2a), .q_i(q2a), .d_i(d), .n_i(8'd8), .r_o(r2), .q_o(q2));
  div_bits #(.W(16), .NB(16)) u_lim  (.r_i('0), .q_i(q0), .d_i(d), .n_i(n3), .r_o(r3), .q_o(q3));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q0=%0d d=%0d", what, q0, d);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rr, qq;
    for (int i = 0; i < 400; i++) begin
      q0 = 16'($urandom);
      d  = (i % 4 == 0) ? 16'($urandom_range(1, 20)) : 16'($urandom);
      if (d == 0) d = 1;
      n3 = 8'($urandom_range(0, 16));
      #1;
      chk(q1 == q0 / d && r1 == q0 % d, "full");
      chk(q2 == q1 && r2 == r1, "two halves");
      // n3 single steps from (0, q0): the top n3 bits divided, rest shifted up
      rr = 32'(q0) >> (16 - n3);
      qq = (n3 == 16) ? 32'(q0) : 32'(q0) >> (16 - n3);
      chk(r3 == 16'(rr % 32'(d)) && (n3 == 0 || 16'(q3 << 0) == 16'((q0 << n3) | 16'(qq / 32'(d)))), "limited");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
