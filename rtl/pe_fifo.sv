// pe_fifo: the FIFO that holds each Q of a row until its update is known.
//
// Synchronous first-in first-out buffer of DEPTH words of DW bits, written as
// a register array with read and write pointers and an occupancy counter.
// 'dout' shows the oldest word whenever 'empty' is low (show-ahead); 'pop'
// removes it at the clock edge. Push and pop may happen in the same cycle.
// Pushing into a full FIFO or popping an empty one is an error of the user
// and is flagged by assertions; the engine sizes the FIFO so neither occurs.
// The document names the block; depth and organisation are this design's.
module pe_fifo #(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned DW    = 6,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic          pop,
  output logic [DW-1:0] dout,
  output logic          full,
  output logic          empty,
  output logic [AW:0]   count
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("pe_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("pe_fifo: pop while empty");

endmodule
