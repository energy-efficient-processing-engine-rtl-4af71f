// pe_core: the processing engine, an offset min-sum check-node unit for an
// LDPC decoder.
//
// For every edge j of a parity-check row the engine receives the variable
// LLR L(q_j) and the previous check message R_ij, one edge per cycle with
// in_valid=1 (idle cycles are allowed). It forms Q_j = L(q_j) - R_ij, keeps
// Q_j in the FIFO, and meanwhile tracks over the row the smallest and second
// smallest |Q_j|, the index of the smallest and the parity of the signs.
// After the row's last edge it replays the row: for each edge
//   m_j        = (j == index of minimum) ? second minimum : minimum
//   R_ij_new   = sign(parity ^ sign(Q_j)) * min(max(m_j - OFFSET, 0), 15)
//   L(q_j)_new = saturate(Q_j + R_ij_new)
// All messages are 5-bit sign-magnitude.
//
// Timing: the replay starts the cycle after the last edge is accepted and
// runs ROW_DEG consecutive cycles; outputs are registered, so out_valid for
// edge 0 rises two cycles after the last edge's in_valid and the first-in to
// first-out latency of a row presented back to back is ROW_DEG+1 cycles. The
// next row can be accepted while a row is being replayed, so rows may follow
// each other with no gap (one edge per cycle throughput). There is no
// backpressure: the output side must take one result per cycle.
//
// The block structure (subtractor, ABS, sign, index, comparator, MUX/min,
// min_index, offset, accumulator, FIFO, adder) follows the document's block
// diagram; the row degree, offset value, second-minimum selection, FIFO
// depth, saturation and the replay schedule are this design's choices.
module pe_core
  import pe_pkg::*;
#(
  parameter int unsigned ROW_DEG = 6,
  parameter int unsigned OFFSET  = 1,
  localparam int unsigned IW     = (ROW_DEG > 1) ? $clog2(ROW_DEG) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  msg_t rij,
  input  msg_t lqj,
  output logic out_valid,
  output msg_t rij_new,
  output msg_t lqj_new
);

  localparam int unsigned FIFO_DEPTH = 2 * ROW_DEG;

  // ---------------- collection of a row ----------------
  q_t            q;
  qmag_t         qmag;
  logic          qsign;
  logic [IW-1:0] idx;
  logic          first, last;

  pe_sub      u_sub  (.lqj(lqj), .rij(rij), .q(q));
  pe_abs_sign u_abs  (.q(q), .mag(qmag), .sign(qsign));
  pe_index #(.ROW_DEG(ROW_DEG)) u_index (
    .clk(clk), .rst_n(rst_n), .valid(in_valid), .idx(idx), .first(first), .last(last));

  qmag_t         res_min1, res_min2;
  logic [IW-1:0] res_idx;
  logic          parity;

  pe_min_search #(.IW(IW)) u_min (
    .clk(clk), .rst_n(rst_n), .valid(in_valid), .first(first), .last(last),
    .idx(idx), .mag(qmag), .res_min1(res_min1), .res_min2(res_min2), .res_idx(res_idx));

  pe_sign_acc u_acc (
    .clk(clk), .rst_n(rst_n), .valid(in_valid), .first(first), .last(last),
    .sign(qsign), .parity(parity));

  // ---------------- replay of a completed row ----------------
  logic          o_busy;
  logic [IW-1:0] o_idx;
  q_t            q_head;
  logic          f_full, f_empty;
  logic [$clog2(FIFO_DEPTH):0] f_count;

  pe_fifo #(.DEPTH(FIFO_DEPTH), .DW(Q_W)) u_fifo (
    .clk(clk), .rst_n(rst_n), .push(in_valid), .din(q), .pop(o_busy),
    .dout(q_head), .full(f_full), .empty(f_empty), .count(f_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_busy <= 1'b0;
      o_idx  <= '0;
    end else if (in_valid && last) begin
      o_busy <= 1'b1;
      o_idx  <= '0;
    end else if (o_busy) begin
      if (o_idx == IW'(ROW_DEG - 1)) o_busy <= 1'b0;
      o_idx <= o_idx + 1'b1;
    end
  end

  qmag_t min_sel;
  logic  out_sign;
  msg_t  r_new, l_new;

  assign min_sel  = (o_idx == res_idx) ? res_min2 : res_min1;
  assign out_sign = parity ^ q_head[Q_W-1];

  pe_offset #(.OFFSET(OFFSET)) u_offset (.min_sel(min_sel), .sign(out_sign), .rij_new(r_new));
  pe_add_sat u_add (.q(q_head), .rij_new(r_new), .lqj_new(l_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      rij_new   <= '0;
      lqj_new   <= '0;
    end else begin
      out_valid <= o_busy;
      if (o_busy) begin
        rij_new <= r_new;
        lqj_new <= l_new;
      end
    end
  end

  // A new row may only complete when the previous replay is in its last cycle.
  a_no_replay_overlap: assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid && last && o_busy) |-> (o_idx == IW'(ROW_DEG - 1)))
    else $error("pe_core: row completed while the previous row is still replayed");
  a_fifo_has_row: assert property (@(posedge clk) disable iff (!rst_n) o_busy |-> !f_empty)
    else $error("pe_core: replay with empty FIFO");
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !f_full)
    else $error("pe_core: FIFO full");
  // At most one row is ever waiting in the FIFO.
  a_fifo_level: assert property (@(posedge clk) disable iff (!rst_n) f_count <= ($bits(f_count))'(ROW_DEG))
    else $error("pe_core: FIFO holds more than one row");

endmodule
