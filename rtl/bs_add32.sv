// bs_add32: 3-2 redundant adder, binary number plus borrow-save number.
//
// Each position adds the binary bit x_i, the positive bit y+_i and the
// inverted negative bit of y in a full adder: x + y+ + (1 - y-) = 2u + v, so
// x + y+ - y- = 2u - (1 - v). The carry u becomes the positive bit one place
// higher and not(v) the negative bit in place. There is no carry chain: one
// full adder delay for any width. W digits in, W+1 digits out.
module bs_add32 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] yp,
  input  logic [W-1:0] yn,
  output logic [W:0]   sp,
  output logic [W:0]   sn
);
  logic [W-1:0] u, v;

  always_comb begin
    v  = x ^ yp ^ ~yn;
    u  = (x & yp) | (x & ~yn) | (yp & ~yn);
    sp = {u, 1'b0};
    sn = {1'b0, ~v};
  end
endmodule
