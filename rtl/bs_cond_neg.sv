// bs_cond_neg: conditional negation of a borrow-save digit string.
//
// The negative of a borrow-save number is obtained by exchanging its positive
// and negative bit vectors, so negation needs no carry and costs one 2:1 mux per
// bit. The adder negates the packet operand's significand and its carry-round
// packet with this block when the operand signs differ.
// Purely combinational; W digits in, W digits out.
module bs_cond_neg #(
  parameter int unsigned W = 64
) (
  input  logic         neg,   // 1: output = -input
  input  logic [W-1:0] ip,
  input  logic [W-1:0] in,
  output logic [W-1:0] op,
  output logic [W-1:0] on
);
  always_comb begin
    if (neg) begin
      op = in;
      on = ip;
    end else begin
      op = ip;
      on = in;
    end
  end
endmodule
