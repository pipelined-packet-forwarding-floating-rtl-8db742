// pf_small_path: adder datapath for a small exponent difference, -1 <= e1-e2 <= 4.
//
// Cycle 1 (inputs a, b): only the 3 low exponent bits are needed to predict
// the alignment d = e1 - e2. The standard significand f1 alone is shifted, by
// d + 1 places, into a 69-bit field of weights 2^4 .. 2^-64; there is no
// operand swap. In parallel the packet significand is negated when the signs
// differ (by exchanging its bit vectors) and PN-recoded to 65 digits. A 3-2
// adder adds the two where they overlap; the two lowest bits of f1 pass
// through, so the 70-digit sum ends in two plain binary digits. A second PN
// recoding, over the positions from 2^-62 up, gives the 71-digit sum g
// (weights 2^6 .. 2^-64, index i has weight 2^(i-64)). The XOR of the 64
// leading positive and negative bits of g goes to the leading-zero counter.
// g, the count k and the flag nz ("k <= 63") are registered.
//
// Cycle 2 (input c, the carry-round packet of the same packet operand, which
// arrives one cycle after its principal part): c is conditionally negated and
// added into the 4 lowest digits of g by a reduced 4-2 adder. The 4-digit sum
// of those digits and c is at most 15 in magnitude, so it never carries into
// the rest of g; this design forms it as a small integer and re-encodes it.
// The sum h is shifted left by k; if nz is clear the 7-digit adjust takes over
// instead. The leading digit sigma of the normalized string gives the sign:
// for sigma = +1 the value (leading digit read at 2^0) is in (1/4, 1) and a
// fixed shift of two places moves it into (1, 4); for sigma = -1 the string is
// negated and shifted by one. pf_pack then rewrites the leading digits into
// "1 b0". The outputs are combinational from the cycle-2 register and c.
//
// Result: value = (-1)^s * 2^e * (f + lo*2^-69) exactly, e = e2 + 6 - n - s
// with n the normalization distance and s the fixed shift (1 or 2). The sum is
// exact, so the sticky digit of the shared result type is constant zero.
// Exponent and sign logic are this design's own; the algorithm leaves them out.
// err flags a violated range invariant and never fires on legal inputs.
module pf_small_path
  import pf_pkg::*;
(
  input  logic    clk,
  input  logic    en,        // load the cycle-1 register
  input  std_op_t a,
  input  pf_op_t  b,
  input  pf_cr_t  c,         // carry-round packet, one cycle after a/b
  output pf_sum_t sum,
  output logic    err
);
  // ---------------- cycle 1 ----------------
  logic [2:0]  sh;
  logic [68:0] fa;
  logic [63:0] f2p, f2n;
  logic [64:0] r1p, r1n;
  logic [67:0] s3p, s3n;
  logic [68:0] r2p, r2n;
  logic [70:0] gp_d, gn_d;
  logic [5:0]  k_d;
  logic        nz_d, sub;

  assign sub = a.s ^ b.s;
  assign sh  = a.e[2:0] - b.e[2:0] + 3'd1;   // d + 1, 0..5
  assign fa  = {5'b0, a.f} << sh;

  bs_cond_neg   #(.W(64)) u_neg2 (.neg(sub), .ip(b.fp), .in(b.fn), .op(f2p), .on(f2n));
  bs_pn_recoder #(.W(64)) u_pn1  (.ap(f2p), .an(f2n), .bp(r1p), .bn(r1n));
  // sum frame index i <-> weight 2^(i-64); f2 digit 0 (2^-62) sits at index 2
  bs_add32      #(.W(67)) u_add  (.x(fa[68:2]), .yp({2'b0, r1p}), .yn({2'b0, r1n}),
                                  .sp(s3p), .sn(s3n));
  bs_pn_recoder #(.W(68)) u_pn2  (.ap(s3p), .an(s3n), .bp(r2p), .bn(r2n));
  assign gp_d = {r2p, fa[1:0]};
  assign gn_d = {r2n, 2'b00};
  bs_lzc        #(.W(64)) u_lzc  (.ap(gp_d[70:7]), .an(gn_d[70:7]), .k(k_d), .nz(nz_d));

  // ---------------- pipeline register ----------------
  logic [70:0]      gp, gn;
  logic [5:0]       k;
  logic             nz, sub_q, s1_q;
  logic [EXP_W-1:0] e2_q;

  always_ff @(posedge clk) begin
    if (en) begin
      gp    <= gp_d;
      gn    <= gn_d;
      k     <= k_d;
      nz    <= nz_d;
      sub_q <= sub;
      s1_q  <= a.s;
      e2_q  <= b.e;
    end
  end

  // ---------------- cycle 2 ----------------
  logic [1:0]        cp2, cn2;
  int                v4;
  logic [3:0]        v4mag;
  logic [70:0]       hp, hn, np_, nn_, sp7, sn7, mp, mn, xp, xn;
  logic [6:0]        sh7, nsh;
  logic              z7, sigma_neg;
  logic [71:0]       fp72, fn72;
  logic              b0p, b0n, perr;
  logic [68:0]       tp, tn;

  bs_cond_neg #(.W(2)) u_negc (.neg(sub_q), .ip(c.p), .in(c.n), .op(cp2), .on(cn2));

  always_comb begin
    // reduced 4-2 add: digits 3..0 of g (weights 8,4,2,1 x 2^-64) plus c
    v4 = 0;
    for (int i = 0; i < 4; i++) begin
      v4 = v4 + dig(gp[i], gn[i]) * (1 << i);
    end
    v4 = v4 + dig(cp2[1], cn2[1]) * 4
            + dig(cp2[0], cn2[0]) * 2;
    v4mag = (v4 < 0) ? 4'(-v4) : 4'(v4);
    hp = {gp[70:4], (v4 < 0) ? 4'b0 : v4mag};
    hn = {gn[70:4], (v4 < 0) ? v4mag : 4'b0};
    // normalization shift
    np_ = hp << k;
    nn_ = hn << k;
  end

  pf_seven_adjust u_seven (.hp(hp[6:0]), .hn(hn[6:0]), .op(sp7), .on(sn7), .shamt(sh7), .zero(z7));

  always_comb begin
    // mux on k <= 63
    mp  = nz ? np_ : sp7;
    mn  = nz ? nn_ : sn7;
    nsh = nz ? 7'(k) : sh7;
    // final adjust: sign from the leading digit, fixed shift by 1 or 2
    sigma_neg = mn[70];
    xp = sigma_neg ? mn : mp;
    xn = sigma_neg ? mp : mn;
    fp72 = sigma_neg ? {1'b0, xp} : {xp, 1'b0};   // frame 2^2 .. 2^-69
    fn72 = sigma_neg ? {1'b0, xn} : {xn, 1'b0};
  end

  pf_pack #(.HW(3), .TW(69)) u_pack (
    .hp(fp72[71:69]), .hn(fn72[71:69]), .tp(fp72[68:0]), .tn(fn72[68:0]),
    .b0p(b0p), .b0n(b0n), .op(tp), .on(tn), .err(perr));

  always_comb begin
    sum      = '0;
    sum.zero = !nz && z7;
    if (!sum.zero) begin
      sum.s  = s1_q ^ sigma_neg;
      sum.e  = EXP_W'(e2_q + EXP_W'(6) - EXP_W'(nsh) - (sigma_neg ? EXP_W'(1) : EXP_W'(2)));
      sum.fp = {1'b1, b0p, tp[68:7]};
      sum.fn = {1'b0, b0n, tn[68:7]};
      sum.lp = tp[6:0];
      sum.ln = tn[6:0];
    end
    err = !sum.zero && perr;
  end
endmodule
