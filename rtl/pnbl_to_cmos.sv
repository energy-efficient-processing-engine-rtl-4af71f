// pnbl_to_cmos: interface from the dual-rail pNBL domain back to static CMOS.
//
// In the reference circuit each bit is a small clocked sense stage (a 1-bit
// A/D converter) that samples the rail pair at its peak, followed by a
// cross-coupled set/reset latch and output buffers giving Q and its
// complement. This RTL gives the logic function per bit at each rising clock
// edge: rails (1,0) set q, rails (0,1) clear it, and rails that are equal
// (no data, or an invalid pair) leave the latch unchanged. After reset q is
// low and q_n high. One clock of delay. The analog sampling is not modelled.
// The converter and latch structure follow the document; sampling on the
// rising edge, holding on equal rails and the reset value are this design's.
module pnbl_to_cmos #(
  parameter int unsigned WIDTH = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_t,   // true rail
  input  logic [WIDTH-1:0] d_f,   // complement rail
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int i = 0; i < WIDTH; i++)
        if (d_t[i] != d_f[i]) q[i] <= d_t[i];
    end
  end

  assign q_n = ~q;

endmodule
