// cmos_to_pnbl: interface from static CMOS into the dual-rail pNBL domain.
//
// In the reference circuit this is a pNBL buffer per bit: it samples the DC
// input level and drives a complementary pair of power-clocked rails. This
// RTL gives its logic function: at each rising clock edge every input bit d
// is captured as the rail pair (out_t, out_f) = (d, ~d). After reset both
// rails of every bit are low, the pNBL "no data" state, until the first
// edge. One clock of delay (half a power-clock cycle in the circuit, which a
// single-edge RTL model cannot express). The analog levels are not modelled.
module cmos_to_pnbl #(
  parameter int unsigned WIDTH = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] out_t,   // true rail
  output logic [WIDTH-1:0] out_f    // complement rail
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_t <= '0;
      out_f <= '0;
    end else begin
      out_t <= din;
      out_f <= ~din;
    end
  end

endmodule
