// pf_seven_adjust: normalization when the 64 leading digits of the sum vanish.
//
// If the leading-zero counter finds no non-zero digit among the 64 leading
// digits of the 71-digit sum, the whole value lies in the last 7 digits
// (weights 2^-58 .. 2^-64 of the sum frame). Those 7 digits are few enough to
// be compressed to a signed integer W in [-127, 127] with a small adder. The
// block then writes |W| left-justified into the 71-digit frame in the same
// shape the normalization shifter produces: a leading digit sigma = sign(W) in
// the top position, and a value read with the top digit at weight 2^0 of
// [1/2, 1) for W > 0 (written 1.(-1)xxx) and of (-2, -1] for W < 0.
// shamt is the equivalent left-shift distance of the sum frame (63..70), so
// that the exponent bookkeeping matches the main normalization path.
// zero is set when the 7 digits sum to 0: the whole sum is then exactly zero.
// |W| has at most 7 significant bits, so only the top eight positions of the
// output can be non-zero; the lower positions are constant zero and exist
// only so that both normalization paths share one 71-digit frame.
// Only the function of this box is given by the algorithm; the compression to
// an integer is this design's choice. Purely combinational.
module pf_seven_adjust (
  input  logic [6:0]  hp,
  input  logic [6:0]  hn,
  output logic [70:0] op,
  output logic [70:0] on,
  output logic [6:0]  shamt,
  output logic        zero
);
  logic signed [7:0] w;
  logic [6:0]        mag;
  logic [5:0]        mnorm;   // bits below the leading one
  logic [2:0]        lead;

  always_comb begin
    w     = $signed({1'b0, hp}) - $signed({1'b0, hn});
    mag   = w[7] ? 7'(-w) : w[6:0];
    zero  = (w == 8'sd0);
    lead  = '0;
    for (int i = 0; i < 7; i++) begin
      if (mag[i]) lead = 3'(i);
    end
    mnorm = 6'(mag << (3'd6 - lead));   // leading one shifted out at bit 6
    op    = '0;
    on    = '0;
    shamt = '0;
    if (!zero) begin
      if (!w[7]) begin
        op[70]    = 1'b1;
        on[69]    = 1'b1;
        op[68:63] = mnorm[5:0];
        shamt     = 7'(7'd69 - 7'(lead));
      end else begin
        on[70]    = 1'b1;
        on[69:64] = mnorm[5:0];
        shamt     = 7'(7'd70 - 7'(lead));
      end
    end
  end
endmodule
