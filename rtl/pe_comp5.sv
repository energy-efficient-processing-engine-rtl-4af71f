// pe_comp5: N-bit unsigned magnitude comparator, ge = (a >= b).
//
// The document draws this as a single dual-rail pseudo-NMOS boost gate with
// an evaluation stack five transistors high (one level per bit). Here the
// same function is written as a bit-serial chain from the least significant
// bit up: at each bit, a wins if a_i=1 and b_i=0, loses if a_i=0 and b_i=1,
// and otherwise the result of the lower bits stands; equal numbers give 1.
// Combinational. Default width 5 as in the document.
module pe_comp5 #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         ge    // 1 when a >= b (unsigned)
);

  always_comb begin
    ge = 1'b1;
    for (int i = 0; i < N; i++)
      ge = (a[i] & ~b[i]) | (~(a[i] ^ b[i]) & ge);
  end

endmodule
