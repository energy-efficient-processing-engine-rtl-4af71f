// pe_sub: input subtractor of the processing engine, Q = L(q_j) - R_ij.
//
// Both operands are 5-bit sign-magnitude messages (pe_pkg::msg_t). Each is
// turned into a 6-bit two's-complement value and the difference is formed
// exactly; with magnitudes up to 15 it lies in -30..+30, so it never
// overflows. Purely combinational; in the reference circuit it is one stage
// of power-clocked gates. The subtraction is the document's; the encodings
// are this design's choice.
module pe_sub
  import pe_pkg::*;
(
  input  msg_t lqj,   // variable-node LLR L(q_j)
  input  msg_t rij,   // previous check message R_ij
  output q_t   q      // L(q_j) - R_ij, two's complement
);

  q_t l_val, r_val;

  always_comb begin
    l_val = lqj.sign ? -q_t'({1'b0, lqj.mag}) : q_t'({1'b0, lqj.mag});
    r_val = rij.sign ? -q_t'({1'b0, rij.mag}) : q_t'({1'b0, rij.mag});
    q     = l_val - r_val;
  end

endmodule
