// pe_system: the processing-engine test system, top of the design.
//
// Static-CMOS inputs enter through cmos_to_pnbl (one dual-rail buffer per
// bit for in_valid, R_ij and L(q_j)), the processing engine pe_core computes
// the offset min-sum update, and its results leave through pnbl_to_cmos (one
// sample-and-latch converter per bit for out_valid, R_ij_new, L(q_j)_new).
// The engine reads the true rail; an input bit counts as valid only as the
// dual-rail pair (1,0), so the all-low state after reset is no data, and an
// assertion checks that the data rails are complementary whenever an edge is
// taken. The engine's outputs are driven as complementary rail pairs into the
// output converters.
//
// The two-phase power clock of the reference chip comes from an on-chip LC
// oscillator; here it is the clk input (clk_n being its complement in the
// circuit). Timing: the interfaces add one cycle each, so out_valid for edge
// 0 of a row rises four cycles after that row's last in_valid, and the first
// input of a row back-to-back to its first output is ROW_DEG+3 cycles.
// Interfaces, engine and clock source follow the document's system diagram;
// the valid signals and the cycle-level timing are this design's choices.
module pe_system
  import pe_pkg::*;
#(
  parameter int unsigned ROW_DEG = 6,
  parameter int unsigned OFFSET  = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [4:0] rij,
  input  logic [4:0] lqj,
  output logic       out_valid,
  output logic [4:0] rij_new,
  output logic [4:0] lqj_new
);

  localparam int unsigned IFW = 1 + 2 * MSG_W;

  logic [IFW-1:0] in_t, in_f;

  cmos_to_pnbl #(.WIDTH(IFW)) u_in_if (
    .clk(clk), .rst_n(rst_n), .din({in_valid, rij, lqj}), .out_t(in_t), .out_f(in_f));

  logic core_valid;
  msg_t core_rij, core_lqj;

  assign core_valid = in_t[IFW-1] & ~in_f[IFW-1];
  assign core_rij   = msg_t'(in_t[2*MSG_W-1:MSG_W]);
  assign core_lqj   = msg_t'(in_t[MSG_W-1:0]);

  a_dual_rail: assert property (@(posedge clk) disable iff (!rst_n)
      core_valid |-> ((in_t[2*MSG_W-1:0] ^ in_f[2*MSG_W-1:0]) == '1))
    else $error("pe_system: input rails not complementary");

  logic pe_valid;
  msg_t pe_rij, pe_lqj;

  pe_core #(.ROW_DEG(ROW_DEG), .OFFSET(OFFSET)) u_pe (
    .clk(clk), .rst_n(rst_n), .in_valid(core_valid), .rij(core_rij), .lqj(core_lqj),
    .out_valid(pe_valid), .rij_new(pe_rij), .lqj_new(pe_lqj));

  logic [IFW-1:0] out_t, out_q, out_qn;

  assign out_t = {pe_valid, pe_rij, pe_lqj};

  pnbl_to_cmos #(.WIDTH(IFW)) u_out_if (
    .clk(clk), .rst_n(rst_n), .d_t(out_t), .d_f(~out_t), .q(out_q), .q_n(out_qn));

  assign {out_valid, rij_new, lqj_new} = out_q;

  // The complement outputs of the converters are not needed by the CMOS side;
  // check that they agree with the true outputs.
  a_out_compl: assert property (@(posedge clk) disable iff (!rst_n) out_qn == ~out_q)
    else $error("pe_system: output converter rails disagree");

endmodule
