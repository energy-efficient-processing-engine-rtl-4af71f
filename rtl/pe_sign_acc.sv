// pe_sign_acc: the sign accumulator of the processing engine.
//
// Accumulates the exclusive-or of the signs of all Q values of a row. On the
// first edge the accumulator restarts with that edge's sign; on the last edge
// the complete parity is copied to 'parity', which then holds until the next
// row completes. The outgoing sign for edge j is parity ^ sign_j (the product
// of the other edges' signs), formed downstream. Timing: 'parity' is valid
// from the cycle after the last edge is accepted. The document names a sign
// block and an accumulator; that the accumulated quantity is the sign parity
// (the min-sum sign product) is this design's reading.
module pe_sign_acc (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic first,
  input  logic last,
  input  logic sign,
  output logic parity   // sign parity of the last completed row
);

  logic acc, acc_next;

  assign acc_next = first ? sign : (acc ^ sign);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= 1'b0;
      parity <= 1'b0;
    end else if (valid) begin
      acc <= acc_next;
      if (last) parity <= acc_next;
    end
  end

endmodule
