// pe_index: the index block, the position of the current edge in its row.
//
// A check-node row of ROW_DEG edges arrives one edge per accepted cycle
// (valid=1); cycles with valid=0 are idle and leave the count alone. idx is
// the position of the edge now presented, first/last flag positions 0 and
// ROW_DEG-1. The counter wraps after the last edge, so consecutive rows need
// no separator. The document names the block only; the fixed row degree and
// the counter are this design's choice.
module pe_index #(
  parameter int unsigned ROW_DEG = 6,
  localparam int unsigned IW     = (ROW_DEG > 1) ? $clog2(ROW_DEG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  output logic [IW-1:0] idx,
  output logic          first,
  output logic          last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      idx <= '0;
    else if (valid)
      idx <= last ? '0 : idx + 1'b1;
  end

  assign first = (idx == '0);
  assign last  = (idx == IW'(ROW_DEG - 1));

endmodule
