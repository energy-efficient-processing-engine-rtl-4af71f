// pe_offset: the offset block, which forms the new check message R_ij_new.
//
// Offset min-sum: the selected minimum magnitude is reduced by the offset
// factor OFFSET and clamped at zero, then limited to the 4-bit message
// magnitude (at most 15) and given the outgoing sign. A zero result always
// carries a clear sign bit. Combinational. The subtraction of an offset is
// the document's; the value of the offset, the clamp and the saturation are
// this design's choice.
module pe_offset
  import pe_pkg::*;
#(
  parameter int unsigned OFFSET = 1
) (
  input  qmag_t min_sel,   // minimum magnitude selected for this edge
  input  logic  sign,      // outgoing sign (product of the other signs)
  output msg_t  rij_new
);

  int unsigned red;

  always_comb begin
    red = (int'(min_sel) > int'(OFFSET)) ? (int'(min_sel) - int'(OFFSET)) : 0;
    if (red > MSG_MAX) red = MSG_MAX;
    rij_new.mag  = MAG_W'(red);
    rij_new.sign = sign && (red != 0);
  end

endmodule
