// div_bits: NB steps of unsigned restoring division, combinational.
//
// The division state is a partial remainder R and a register Q that holds the
// dividend bits not yet consumed (high end) and the quotient bits produced so
// far (low end). Each step shifts the top bit of Q into R, subtracts the
// divisor D when R >= D and shifts the resulting quotient bit into Q. After W
// steps from (R=0, Q=dividend) Q holds the quotient and R the remainder.
// Every step is the same circuit, which is what lets a division be split into
// identical single-cycle slices: the pipelined and iterative multi-cycle
// dividers and the distributed sub-operation all use this block. The radix
// (NB bits per slice) is this design's choice. n_i (at most NB) sets how
// many of the NB steps are applied, so a divider whose width is not a
// multiple of NB can finish with a shorter slice.
module div_bits #(
  parameter int unsigned W  = 32,
  parameter int unsigned NB = 4
) (
  input  logic [W-1:0] r_i,
  input  logic [W-1:0] q_i,
  input  logic [W-1:0] d_i,
  input  logic [7:0]   n_i,
  output logic [W-1:0] r_o,
  output logic [W-1:0] q_o
);
  always_comb begin
    logic [W:0]   t;
    logic [W-1:0] r, q;
    r = r_i;
    q = q_i;
    for (int unsigned k = 0; k < NB; k++) begin
      if (k >= 32'(n_i)) break;
      t = {r, q[W-1]};
      q = {q[W-2:0], 1'b0};
      if (t >= {1'b0, d_i}) begin
        t    = t - {1'b0, d_i};
        q[0] = 1'b1;
      end
      r = t[W-1:0];
    end
    r_o = r;
    q_o = q;
  end
endmodule
