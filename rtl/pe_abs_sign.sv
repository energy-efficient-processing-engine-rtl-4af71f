// pe_abs_sign: the ABS and sign blocks of the processing engine.
//
// Splits the two's-complement difference Q into its 5-bit magnitude |Q|
// (fed to the comparator and minimum search) and its sign bit (fed to the
// sign accumulator). Combinational. Q is in -30..+30, so |Q| always fits in
// five bits; the value -32, which cannot occur, would wrap to 0. The ABS and
// sign blocks are the document's; merging them into one module is this
// design's choice, since the sign block only taps the sign bit.
module pe_abs_sign
  import pe_pkg::*;
(
  input  q_t    q,
  output qmag_t mag,    // |Q|
  output logic  sign    // 1 when Q < 0
);

  always_comb begin
    sign = q[Q_W-1];
    mag  = sign ? qmag_t'(-q) : qmag_t'(q);
  end

endmodule
