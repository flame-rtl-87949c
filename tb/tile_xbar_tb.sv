// tile_xbar_tb: every sink is driven with every source select and compared
// with the value the select names.
module tile_xbar_tb;
  import flame_pkg::*;
  int checks = 0, failures = 0;
  word_t [NDIRS-1:0] in;
  word_t             res, imm;
  word_t [NREGS-1:0] regs;
  src_e  [7:0]       sel;
  word_t [7:0]       out;

  tile_xbar #(.NOUT(8)) u_dut (.in_i(in), .res_i(res), .reg_i(regs), .imm_i(imm), .sel_i(sel), .out_o(out));

  function automatic word_t pick(src_e s);
    case (s)
      SRC_N: return in[0];   SRC_S: return in[1];
      SRC_W: return in[2];   SRC_E: return in[3];
      SRC_RES: return res;   SRC_IMM: return imm;
      SRC_R0: return regs[0]; SRC_R1: return regs[1];
      SRC_R2: return regs[2]; SRC_R3: return regs[3];
      default: return '0;
    endcase
  endfunction

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int d = 0; d < NDIRS; d++) in[d] = $urandom;
      for (int r = 0; r < NREGS; r++) regs[r] = $urandom;
      res = $urandom; imm = $urandom;
      for (int o = 0; o < 8; o++) sel[o] = src_e'($urandom_range(0, 10));
      #1;
      for (int o = 0; o < 8; o++) begin
        checks++;
        if (out[o] !== pick(sel[o])) begin
          failures++;
          $display("FAIL sink %0d sel %s", o, sel[o].name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
