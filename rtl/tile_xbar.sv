// tile_xbar: the tile crossbar (the "M x N" switch of the tile).
//
// M sources: the four neighbour inputs, this cycle's tile result, the NREGS
// registers and the control word's constant. N sinks: the four neighbour
// outputs, the three FU operands and the register-file write data. Each sink
// takes the source named by its select, or zero for SRC_NONE. Purely
// combinational. The source list and sink count are this design's choices;
// the paper says only that crossbar sizes are parameterizable.
module tile_xbar
  import flame_pkg::*;
#(
  parameter int unsigned NOUT = 8
) (
  input  word_t [NDIRS-1:0] in_i,
  input  word_t             res_i,
  input  word_t [NREGS-1:0] reg_i,
  input  word_t             imm_i,
  input  src_e  [NOUT-1:0]  sel_i,
  output word_t [NOUT-1:0]  out_o
);
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      unique case (sel_i[o])
        SRC_N:   out_o[o] = in_i[DIR_N];
        SRC_S:   out_o[o] = in_i[DIR_S];
        SRC_W:   out_o[o] = in_i[DIR_W];
        SRC_E:   out_o[o] = in_i[DIR_E];
        SRC_RES: out_o[o] = res_i;
        SRC_R0:  out_o[o] = reg_i[0];
        SRC_R1:  out_o[o] = reg_i[1];
        SRC_R2:  out_o[o] = reg_i[2];
        SRC_R3:  out_o[o] = reg_i[3];
        SRC_IMM: out_o[o] = imm_i;
        default: out_o[o] = '0;
      endcase
    end
  end
endmodule
