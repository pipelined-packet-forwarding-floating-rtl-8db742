// pf_large_path: adder datapath for a large exponent difference,
// e1 - e2 >= 5 or e2 - e1 >= 2.
//
// Cycle 1: a full 15-bit exponent subtraction gives expsign (e2 > e1) and the
// magnitude, clamped because longer shifts give the same rounded sum: to 66
// when the standard operand is the shifted one (it is below 2), as published,
// and to 68 when the packet operand is shifted. The packet significand reaches
// 4, and with a clamp of 66 (or 67) a standard operand of exactly 1 minus a
// packet of value near 4 would round to 1 - 2^-64 where IEEE rounding gives 1.
// The packet significand is conditionally negated and PN-recoded to 65 digits
// (positions -2 .. 62, position q has weight 2^-q). f1 becomes a borrow-save
// number with an all-zero negative vector (positions 0 .. 63). The swap sends
// the operand with the larger exponent straight on and the other one to the
// high order alignment shifter (positions -2 .. 65) and to the low order
// generator (the digits shifted past position 65, kept unshifted).
//
// Cycle 2: a 4-2 adder (two cascaded 3-2 adders) adds the aligned high part
// to the larger operand, giving g at positions -4 .. 65. The carry-round
// packet, conditionally negated, goes to one of two fixed places chosen by
// expsign alone: if e2 > e1 the packet operand was not shifted and c is added
// at positions 62, 63 of g (a 4-digit reduced adder, |sum| <= 15, no carry
// out); otherwise it is added at positions 62, 63 of the low order part (a
// 3-digit reduced adder, |sum| <= 7). Both reduced adders compress their few
// digits to an integer and re-encode it; that is this design's choice.
// The adjust logic adds the leading digits of g down to position 3 into a
// small integer A (units of 1/8). As |g| is in (1/2, 4 1/2) and the ignored
// digits are worth less than 1/8, A gives the sign exactly and chooses a
// shift: left if |A| < 1.5, right if |A| >= 3.5, else none, which always
// lands the value in (1, 4). The final adjust negates if needed, shifts, and
// pf_pack rewrites the leading digits into "1 b0". The sticky digit is the
// sign of the leading non-zero digit of the low order part.
//
// Result: (-1)^s * 2^e * (f + lo*2^-69) equals the sum with the smaller
// operand scaled by 2^-min(|e1-e2|, 66 or 68), up to a remainder smaller than
// 2^(e-64) whose sign is the sticky digit. Exponent and sign logic are this
// design's own; the algorithm leaves them out. Outputs are combinational from
// the cycle-2 register and c. err flags a violated range invariant.
// Constant outputs: the high part ends at 2^-67 relative to the result, so
// the two lowest low-order digits are always zero, and the zero flag is never
// set (a large exponent difference cannot cancel); they keep the result type
// shared with the small path.
module pf_large_path
  import pf_pkg::*;
(
  input  logic    clk,
  input  logic    en,
  input  std_op_t a,
  input  pf_op_t  b,
  input  pf_cr_t  c,
  output pf_sum_t sum,
  output logic    err
);
  // ---------------- cycle 1 ----------------
  logic signed [EXP_W:0] dexp;
  logic [EXP_W:0]        dmag;
  logic                  expsign, sub;
  logic [6:0]            m;
  logic [63:0]           f2p, f2n;
  logic [64:0]           r1p, r1n;
  logic [65:0]           bigp, bign, smp, smn, lop_d, lon_d;
  logic [67:0]           alp_d, aln_d;
  logic [EXP_W-1:0]      eb;

  assign sub     = a.s ^ b.s;
  assign dexp    = $signed({1'b0, a.e}) - $signed({1'b0, b.e});
  assign expsign = dexp[EXP_W];
  assign dmag    = expsign ? (EXP_W+1)'(-dexp) : dexp;
  assign m       = expsign ? ((dmag >= (EXP_W+1)'(CLAMP))   ? 7'(CLAMP)   : dmag[6:0])
                           : ((dmag >= (EXP_W+1)'(CLAMP_P)) ? 7'(CLAMP_P) : dmag[6:0]);
  assign eb      = expsign ? b.e : a.e;

  bs_cond_neg   #(.W(64)) u_neg2 (.neg(sub), .ip(b.fp), .in(b.fn), .op(f2p), .on(f2n));
  bs_pn_recoder #(.W(64)) u_pn1  (.ap(f2p), .an(f2n), .bp(r1p), .bn(r1n));

  // swap; 66-digit frame, bit 63-q holds position q
  always_comb begin
    if (expsign) begin
      bigp = {r1p, 1'b0};  bign = {r1n, 1'b0};
      smp  = {2'b0, a.f};  smn  = '0;
    end else begin
      bigp = {2'b0, a.f};  bign = '0;
      smp  = {r1p, 1'b0};  smn  = {r1n, 1'b0};
    end
  end

  pf_hi_align u_hi (.ip(smp), .in(smn), .m(m), .op(alp_d), .on(aln_d));
  pf_lo_gen   u_lo (.ip(smp), .in(smn), .m(m), .op(lop_d), .on(lon_d));

  // ---------------- pipeline register ----------------
  logic [65:0]      bgp, bgn, lop, lon;
  logic [67:0]      alp, aln;
  logic             expsign_q, sub_q, s1_q;
  logic [EXP_W-1:0] eb_q;

  always_ff @(posedge clk) begin
    if (en) begin
      bgp       <= bigp;
      bgn       <= bign;
      alp       <= alp_d;
      aln       <= aln_d;
      lop       <= lop_d;
      lon       <= lon_d;
      expsign_q <= expsign;
      sub_q     <= sub;
      s1_q      <= a.s;
      eb_q      <= eb;
    end
  end

  // ---------------- cycle 2 ----------------
  // g frame: bit 65-q holds position q, q = -4 .. 65
  logic [69:0]        gp, gn, hp, hn, xp, xn;
  logic [65:0]        l2p, l2n;
  logic [1:0]         cp2, cn2;
  int                 vh, vl;
  logic [3:0]         vmag;
  int                 adj, adjmag;
  logic               neg, shl, shr, st_p, st_n, seen;
  logic [72:0]        wp, wn;
  logic               b0p, b0n, perr;
  logic [66:0]        tp, tn;

  bs_add42    #(.W(68)) u_add42 (.ap({bgp, 2'b00}), .an({bgn, 2'b00}), .bp(alp), .bn(aln),
                                 .sp(gp), .sn(gn));
  bs_cond_neg #(.W(2))  u_negc  (.neg(sub_q), .ip(c.p), .in(c.n), .op(cp2), .on(cn2));

  always_comb begin
    // reduced adder on the high part: positions 60..63 (bits 5..2) plus c
    vh = 0;
    for (int i = 0; i < 4; i++) begin
      vh = vh + dig(gp[2+i], gn[2+i]) * (1 << i);
    end
    vh = vh + dig(cp2[1], cn2[1]) * 2
            + dig(cp2[0], cn2[0]);
    // reduced adder on the low part: positions 61..63 (bits 2..0) plus c
    vl = 0;
    for (int i = 0; i < 3; i++) begin
      vl = vl + dig(lop[i], lon[i]) * (1 << i);
    end
    vl = vl + dig(cp2[1], cn2[1]) * 2
            + dig(cp2[0], cn2[0]);

    hp  = gp;  hn  = gn;
    l2p = lop; l2n = lon;
    if (expsign_q) begin
      vmag = (vh < 0) ? 4'(-vh) : 4'(vh);
      hp[5:2] = (vh < 0) ? 4'b0 : vmag;
      hn[5:2] = (vh < 0) ? vmag : 4'b0;
    end else begin
      vmag = (vl < 0) ? 4'(-vl) : 4'(vl);
      l2p[2:0] = (vl < 0) ? 3'b0 : vmag[2:0];
      l2n[2:0] = (vl < 0) ? vmag[2:0] : 3'b0;
    end

    // adjust logic: positions -4 .. 3 (bits 69..62), units of 2^-3
    adj = 0;
    for (int i = 62; i < 70; i++) begin
      adj = adj + dig(hp[i], hn[i]) * (1 << (i - 62));
    end
    neg    = adj < 0;
    adjmag = neg ? -adj : adj;
    shl    = adjmag < 12;
    shr    = adjmag >= 28;

    // sticky digit: sign of the leading non-zero digit of the low part
    st_p = 1'b0;
    st_n = 1'b0;
    seen = 1'b0;
    for (int i = 65; i >= 0; i--) begin
      if (!seen && (l2p[i] != l2n[i])) begin
        seen = 1'b1;
        st_p = l2p[i];
        st_n = l2n[i];
      end
    end

    // final adjust: negate and shift into a frame of weights 2^5 .. 2^-67
    xp = neg ? hn : hp;
    xn = neg ? hp : hn;
    wp = 73'(xp) << (shl ? 3 : (shr ? 1 : 2));
    wn = 73'(xn) << (shl ? 3 : (shr ? 1 : 2));
  end

  pf_pack #(.HW(6), .TW(67)) u_pack (
    .hp(wp[72:67]), .hn(wn[72:67]), .tp(wp[66:0]), .tn(wn[66:0]),
    .b0p(b0p), .b0n(b0n), .op(tp), .on(tn), .err(perr));

  always_comb begin
    sum      = '0;
    sum.s    = s1_q ^ neg;
    sum.e    = shl ? EXP_W'(eb_q - EXP_W'(1)) : (shr ? EXP_W'(eb_q + EXP_W'(1)) : eb_q);
    sum.fp   = {1'b1, b0p, tp[66:5]};
    sum.fn   = {1'b0, b0n, tn[66:5]};
    sum.lp   = {tp[4:0], 2'b00};
    sum.ln   = {tn[4:0], 2'b00};
    sum.stp  = neg ? st_n : st_p;
    sum.stn  = neg ? st_p : st_n;
    err      = perr || (adjmag < 4) || (expsign_q ? (vh > 15 || vh < -15)
                                                      : (vl > 7 || vl < -7));
  end
endmodule
