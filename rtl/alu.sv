// alu: the single-cycle functional units of a FLAME tile.
//
// Computes result = f(a, b, c) in the same cycle for the arithmetic, logic,
// shift, compare, select and pass operations that the CGRA treats as
// single-cycle, and for OP_DIVS, one slice of a division that the compiler
// has split into a chain of single-cycle nodes (distributed strategy).
//
// OP_DIVS works on a packed state word: the upper half is the partial
// remainder, the lower half the dividend/quotient register; b holds the
// divisor in its lower half. A half-width dividend, zero-extended, is
// therefore already the initial state, and after DATA_W/2/DIST_NB slices the
// lower half is the quotient and the upper half the remainder (extracted with
// OP_AND / OP_SHR). Slices are unsigned and half-width: this packing, the
// slice radix DIST_NB and the operation set are this design's choices; the
// paper only says that each split node runs a part of the division on
// simplified hardware. Compare results are 1 or 0. Purely combinational.
module alu
  import flame_pkg::*;
#(
  parameter int unsigned DIST_NB = 2
) (
  input  op_e   op_i,
  input  word_t a_i,
  input  word_t b_i,
  input  word_t c_i,
  output word_t res_o
);
  localparam int unsigned HW = DATA_W / 2;

  logic [HW-1:0] ds_r, ds_q;

  div_bits #(.W(HW), .NB(DIST_NB)) u_slice (
    .r_i(a_i[DATA_W-1:HW]),
    .q_i(a_i[HW-1:0]),
    .d_i(b_i[HW-1:0]),
    .n_i(8'(DIST_NB)),
    .r_o(ds_r),
    .q_o(ds_q)
  );

  always_comb begin
    unique case (op_i)
      OP_ADD:  res_o = a_i + b_i;
      OP_SUB:  res_o = a_i - b_i;
      OP_AND:  res_o = a_i & b_i;
      OP_OR:   res_o = a_i | b_i;
      OP_XOR:  res_o = a_i ^ b_i;
      OP_SHL:  res_o = a_i << b_i[4:0];
      OP_SHR:  res_o = a_i >> b_i[4:0];
      OP_SRA:  res_o = word_t'($signed(a_i) >>> b_i[4:0]);
      OP_EQ:   res_o = word_t'(a_i == b_i);
      OP_NE:   res_o = word_t'(a_i != b_i);
      OP_LT:   res_o = word_t'($signed(a_i) < $signed(b_i));
      OP_LTU:  res_o = word_t'(a_i < b_i);
      OP_GE:   res_o = word_t'($signed(a_i) >= $signed(b_i));
      OP_SEL:  res_o = (c_i != '0) ? a_i : b_i;
      OP_PASS: res_o = a_i;
      OP_DIVS: res_o = {ds_r, ds_q};
      default: res_o = '0;
    endcase
  end
endmodule
