// pe_add_sat: the output adder, L(q_j)_new = Q_j + R_ij_new.
//
// Adds the stored difference Q_j (6-bit two's complement, -30..+30) and the
// new check message (5-bit sign-magnitude) exactly in seven bits, then
// saturates the sum to the 5-bit sign-magnitude output range -15..+15; zero
// is encoded with a clear sign. Combinational. The addition is the
// document's; the saturation is this design's choice, since the document
// gives 5-bit outputs but no overflow rule.
module pe_add_sat
  import pe_pkg::*;
(
  input  q_t   q,
  input  msg_t rij_new,
  output msg_t lqj_new
);

  logic signed [Q_W:0] r_val, sum;

  always_comb begin
    r_val   = rij_new.sign ? -($signed({3'b000, rij_new.mag})) : $signed({3'b000, rij_new.mag});
    sum     = (Q_W+1)'(q) + r_val;
    lqj_new = msg_sat(int'(sum));
  end

endmodule
