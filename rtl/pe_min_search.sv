// pe_min_search: the COMP, MUX, min and min_index blocks of the engine.
//
// Runs a minimum search over the magnitudes |Q| of one row. Two running
// registers hold the smallest (min1) and second-smallest (min2) magnitude
// seen so far and min_idx the position of the smallest. Each accepted edge is
// compared with both (two instances of pe_comp5, ge = a >= b):
//   |Q| <  min1          -> min2 <= min1, min1 <= |Q|, min_idx <= idx
//   min1 <= |Q| < min2   -> min2 <= |Q|
//   otherwise            -> no change
// On the first edge of a row the running values are taken as empty (all
// ones), so the row restarts without a separate clear. On the last edge the
// updated values are copied to the res_* registers, which hold until the
// next row completes; they are valid from the cycle after the last edge.
// Keeping the second minimum is this design's reading of why the diagram has
// a min_index block: the edge that supplied the minimum receives the second
// minimum, every other edge the minimum.
module pe_min_search
  import pe_pkg::*;
#(
  parameter int unsigned IW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic          first,
  input  logic          last,
  input  logic [IW-1:0] idx,
  input  qmag_t         mag,
  output qmag_t         res_min1,
  output qmag_t         res_min2,
  output logic [IW-1:0] res_idx
);

  qmag_t         min1, min2, cur1, cur2, nxt1, nxt2;
  logic [IW-1:0] midx, curi, nxti;
  logic          ge1, ge2;

  // Running values seen by this edge: empty at the start of a row.
  assign cur1 = first ? '1 : min1;
  assign cur2 = first ? '1 : min2;
  assign curi = first ? '0 : midx;

  pe_comp5 #(.N(QMAG_W)) u_comp1 (.a(mag), .b(cur1), .ge(ge1));
  pe_comp5 #(.N(QMAG_W)) u_comp2 (.a(mag), .b(cur2), .ge(ge2));

  // Selection (the MUX of the diagram).
  always_comb begin
    nxt1 = cur1;
    nxt2 = cur2;
    nxti = curi;
    if (!ge1) begin
      nxt1 = mag;
      nxt2 = cur1;
      nxti = idx;
    end else if (!ge2) begin
      nxt2 = mag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min1     <= '1;
      min2     <= '1;
      midx     <= '0;
      res_min1 <= '1;
      res_min2 <= '1;
      res_idx  <= '0;
    end else if (valid) begin
      min1 <= nxt1;
      min2 <= nxt2;
      midx <= nxti;
      if (last) begin
        res_min1 <= nxt1;
        res_min2 <= nxt2;
        res_idx  <= nxti;
      end
    end
  end

endmodule
