// bs_lzc: leading-zero counter for a borrow-save string (the "LZA" box).
//
// After the PN recodings the positive and negative bits of a digit are equal
// exactly when the digit is zero, so the bitwise XOR of the two vectors marks
// the non-zero digits and the leading-zero count of that binary string is the
// number k of leading zero digits. nz (the "k <= 63" signal) is set when any of
// the W digits is non-zero; k is then the count, and 0 otherwise.
// Purely combinational.
module bs_lzc #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]         ap,
  input  logic [W-1:0]         an,
  output logic [$clog2(W)-1:0] k,
  output logic                 nz
);
  logic [W-1:0] z;

  always_comb begin
    z  = ap ^ an;
    nz = |z;
    k  = '0;
    for (int i = 0; i < W; i++) begin
      if (z[i]) k = $clog2(W)'(W - 1 - i);
    end
  end
endmodule
