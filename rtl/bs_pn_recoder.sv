// bs_pn_recoder: compound PN carry recoding P(N(a)) of a borrow-save string.
//
// The N-recoding passes a borrow out of every digit that is -1 and absorbs it
// one place higher: c+_i = a+_i xor a-_i, c-_(i+1) = not(a+_i) and a-_i.
// The P-recoding then passes a carry out of every digit that is +1:
// b+_(i+1) = c+_i and not(c-_i), b-_i = c+_i xor c-_i. Both keep the value
// exactly and narrow the range of every fraction value of the string, which
// is what lets the adder count leading zeros without a carry-propagate add and
// add the late carry-round packet into only a few digits.
// The result has W+1 digits: N can add a negative top digit, and P never
// carries out of a digit that is only negative, so no second digit appears.
// Purely combinational, one XOR and one AND per bit per recoding.
module bs_pn_recoder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] ap,
  input  logic [W-1:0] an,
  output logic [W:0]   bp,
  output logic [W:0]   bn
);
  logic [W:0] cp, cn;   // N(a), W+1 digits

  always_comb begin
    cp = {1'b0, ap ^ an};
    cn = {~ap & an, 1'b0};
    bp = {cp[W-1:0] & ~cn[W-1:0], 1'b0};
    bn = cp ^ cn;
  end
endmodule
