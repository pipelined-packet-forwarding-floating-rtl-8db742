// pf_hi_align: high order alignment shifter of the large-exponent-difference path.
//
// Shifts the 66-digit borrow-save significand with the smaller exponent right
// by the clamped exponent difference m (2..68). The input holds digit
// positions -2 .. 63 (bit 65 is position -2, weight 2^2; bit 0 is position 63);
// the output holds positions -2 .. 65 (68 digits, bit 67 is position -2).
// Digits that move past position 65 are dropped here: the low order generator
// keeps them for the sticky digit. Purely combinational barrel shifter.
module pf_hi_align (
  input  logic [65:0] ip,
  input  logic [65:0] in,
  input  logic [6:0]  m,
  output logic [67:0] op,
  output logic [67:0] on
);
  always_comb begin
    op = {ip, 2'b00} >> m;
    on = {in, 2'b00} >> m;
  end
endmodule
