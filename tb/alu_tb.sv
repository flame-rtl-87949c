// alu_tb: random operands through every single-cycle operation, compared with
// a reference written here, plus full 16-bit divisions built from a chain of
// OP_DIVS slices (the distributed strategy), whose quotient and remainder
// are compared with integer division.
module alu_tb;
  import flame_pkg::*;
  int checks = 0, failures = 0;
  op_e   op;
  word_t a, b, c, res;

  alu u_dut (.op_i(op), .a_i(a), .b_i(b), .c_i(c), .res_o(res));

  function automatic word_t ref_alu(op_e o, word_t x, word_t y, word_t z);
    case (o)
      OP_ADD:  return x + y;
      OP_SUB:  return x - y;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_SHL:  return x << (y % 32);
      OP_SHR:  return x >> (y % 32);
      OP_SRA:  return word_t'($signed(x) >>> (y % 32));
      OP_EQ:   return (x == y) ? 1 : 0;
      OP_NE:   return (x != y) ? 1 : 0;
      OP_LT:   return ($signed(x) < $signed(y)) ? 1 : 0;
      OP_LTU:  return (x < y) ? 1 : 0;
      OP_GE:   return ($signed(x) >= $signed(y)) ? 1 : 0;
      OP_SEL:  return (z != 0) ? x : y;
      OP_PASS: return x;
      default: return 0;
    endcase
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_e ops[15] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA,
                     OP_EQ, OP_NE, OP_LT, OP_LTU, OP_GE, OP_SEL, OP_PASS};
    for (int i = 0; i < 3000; i++) begin
      op = ops[i % 15];
      a  = $urandom;
      b  = (i % 7 == 0) ? a : $urandom;
      c  = (i % 3 == 0) ? 0 : $urandom;
      #1;
      checks++;
      if (res !== ref_alu(op, a, b, c)) begin
        failures++;
        $display("FAIL %s a=%h b=%h c=%h got %h", op.name(), a, b, c, res);
      end
    end
    // distributed division: 16 / DIST_NB = 8 slices
    for (int i = 0; i < 500; i++) begin
      logic [15:0] x, y;
      word_t st;
      x = 16'($urandom);
      y = (i % 3 == 0) ? 16'($urandom_range(1, 9)) : 16'($urandom);
      if (y == 0) y = 3;
      st = {16'h0, x};
      for (int s = 0; s < 8; s++) begin
        op = OP_DIVS; a = st; b = {16'h0, y}; c = 0;
        #1;
        st = res;
      end
      checks++;
      if (st[15:0] != x / y || st[31:16] != x % y) begin
        failures++;
        $display("FAIL DIVS chain %0d/%0d got q=%0d r=%0d", x, y, st[15:0], st[31:16]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
