// pf_lo_gen: low order generator of the large-exponent-difference path.
//
// Produces, without shifting, the digits of the smaller-exponent significand
// that the alignment by m (2..68) moves past position 65. A digit at position
// q (bit 63-q of the 66-digit input, positions -2 .. 63) lands at q + m, so it
// is kept when q >= 66 - m, i.e. when its bit index is at most m - 3; the mask
// is a thermometer code 0..01..1 with m - 2 ones. Because the kept digits
// are scaled uniformly, their sign and whether they are zero, which is all the
// sticky digit needs, equal those of the truly shifted digits. The carry-round
// packet, when it belongs to this operand, can be added at fixed positions 62
// and 63 of this output. Purely combinational.
module pf_lo_gen (
  input  logic [65:0] ip,
  input  logic [65:0] in,
  input  logic [6:0]  m,
  output logic [65:0] op,
  output logic [65:0] on
);
  logic [65:0] mask;

  always_comb begin
    mask = '0;
    for (int j = 0; j < 66; j++) begin
      mask[j] = (j + 3) <= int'(m);
    end
    op = ip & mask;
    on = in & mask;
  end
endmodule
