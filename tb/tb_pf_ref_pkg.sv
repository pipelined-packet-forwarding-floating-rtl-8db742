// tb_pf_ref_pkg: stimulus generation and an exact reference for the adder tests.
//
// The reference never looks at the design's digit strings: it forms the exact
// sum of the two operands as one wide two's-complement integer and compares it
// with the value the design's result denotes. For exponent differences outside
// -1..4 the smaller operand is scaled by 2^-min(|d|, 66) when it is the
// standard one and by 2^-min(|d|, 68) when it is the packet one: the clamps
// the large path applies (longer shifts round alike). A large-path result may leave a
// remainder below 2^(e-64) whose sign must match the sticky digit; a
// small-path result must be exact.
package tb_pf_ref_pkg;
  import pf_pkg::*;

  typedef logic signed [447:0] big_t;

  // Random borrow-save principal part and carry-round packet with value
  // f + c*2^-63 in [1, 4], as the packet format requires.
  function automatic void rand_packet(output logic [63:0] fp, output logic [63:0] fn,
                                      output pf_cr_t c);
    big_t v;
    int   cv;
    do begin
      fp = '0; fn = '0;
      fp[63] = 1'b1;
      for (int i = 0; i < 63; i++) begin
        case ($urandom_range(0, 3))
          0: fp[i] = 1'b1;
          1: fn[i] = 1'b1;
          2: begin fp[i] = 1'b1; fn[i] = 1'b1; end
          default: ;
        endcase
      end
      c.p = 2'($urandom); c.n = 2'($urandom);
      cv = 2 * (int'(c.p[1]) - int'(c.n[1])) + int'(c.p[0]) - int'(c.n[0]);
      v = packet_val(fp, fn, c);
    end while (cv < -2 || cv > 2 || v < (big_t'(1) <<< 63) || v > (big_t'(1) <<< 65));
  endfunction

  // A packet operand equal to the binary significand f (in [1, 2)) plus a small
  // perturbation, written in a randomly redundant way: used to force deep
  // cancellation against a standard operand with the same significand.
  function automatic void near_packet(input logic [63:0] f, input int unsigned noise,
                                      output logic [63:0] fp, output logic [63:0] fn,
                                      output pf_cr_t c);
    big_t v;
    int   cv;
    do begin
      // f = 1.a1..a63 = 2 - 1 + 0.a1..a62 + a63*2^-63
      fp = {1'b1, 1'b0, f[62:1]};
      fn = {1'b0, 1'b1, 62'b0};
      c.p = {1'b0, f[0]};
      c.n = 2'b00;
      // recode: digit pattern (0,+1) at (i+1,i) -> (+1,-1)
      for (int r = 0; r < 8; r++) begin
        int i = $urandom_range(0, 61);
        if (fp[i] && !fn[i] && !fp[i+1] && !fn[i+1]) begin
          fp[i+1] = 1'b1; fp[i] = 1'b0; fn[i] = 1'b1;
        end
      end
      // perturb a few low digits
      for (int r = 0; r < int'(noise); r++) begin
        int i = $urandom_range(0, 7);
        fp[i] = 1'($urandom); fn[i] = 1'($urandom);
      end
      if (noise != 0 && $urandom_range(0, 1) == 1) begin
        c.p = 2'($urandom); c.n = 2'($urandom);
      end
      cv = 2 * (int'(c.p[1]) - int'(c.n[1])) + int'(c.p[0]) - int'(c.n[0]);
      v = packet_val(fp, fn, c);
    end while (cv < -2 || cv > 2 || v < (big_t'(1) <<< 63) || v > (big_t'(1) <<< 65));
  endfunction

  // value of f + c*2^-63 in units of 2^-63
  function automatic big_t packet_val(logic [63:0] fp, logic [63:0] fn, pf_cr_t c);
    big_t v;
    v = ((big_t'(fp) - big_t'(fn)) <<< 1)
        + (big_t'(c.p[1]) <<< 1) - (big_t'(c.n[1]) <<< 1) + big_t'(c.p[0]) - big_t'(c.n[0]);
    return v;
  endfunction

  function automatic bit is_small(logic [14:0] e1, logic [14:0] e2);
    int d = int'(e1) - int'(e2);
    return d >= -1 && d <= 4;
  endfunction

  // Compares a result with the exact (clamped) sum. Returns 1 on a match.
  // lsb_to_e holds, on return, the remainder's sign for statistics.
  function automatic bit check_sum(std_op_t a, pf_op_t b, pf_cr_t c, pf_sum_t o,
                                   output string why);
    int   d, e1eff, e2eff, elo, sh;
    big_t ta, tb_, t, outv, r, lim, pint, mag;
    int   st;
    why = "";
    d = int'(a.e) - int'(b.e);
    e1eff = int'(a.e);
    e2eff = int'(b.e);
    if (d > 68)  e2eff = e1eff - 68;
    if (d < -66) e1eff = e2eff - 66;
    elo = (e1eff < e2eff) ? e1eff : e2eff;
    ta  = big_t'(a.f) <<< (e1eff - elo + 80);
    tb_ = packet_val(b.fp, b.fn, c) <<< (e2eff - elo + 80);
    t   = (a.s ? -ta : ta) + (b.s ? -tb_ : tb_);
    st  = int'(o.stp) - int'(o.stn);
    if (o.zero) begin
      if (t != 0) why = "zero flag on a non-zero sum";
      return why == "";
    end
    if (t == 0) begin
      why = "zero sum not flagged";
      return 0;
    end
    if (!(o.fp[63] && !o.fn[63])) why = "leading digit not in packet format";
    pint = ((big_t'(o.fp) - big_t'(o.fn)) <<< 7) + big_t'(o.lp) - big_t'(o.ln);
    if (pint < (big_t'(1) <<< 69) || pint > (big_t'(1) <<< 71)) why = "significand outside [1,4]";
    sh = int'(o.e) - elo + 74;
    if (sh < 0) begin
      why = "exponent below test range";
      return 0;
    end
    outv = pint <<< sh;
    if (o.s) outv = -outv;
    r = t - outv;
    if (o.s) r = -r;   // remainder of the magnitude, as the sticky digit is
    if (is_small(a.e, b.e)) begin
      if (r != 0)  why = "small path result not exact";
      if (st != 0) why = "small path sticky digit set";
    end else begin
      lim = big_t'(1) <<< (int'(o.e) - elo + 79);
      if ((r > 0 && st != 1) || (r < 0 && st != -1) || (r == 0 && st != 0))
        why = "sticky digit does not match the sign of the remainder";
      if (r >= lim || r <= -lim) why = "remainder too large";
      // lim is also the finest grid of rounding boundaries (half a unit in the
      // last place for a significand in [1,2)). The exact magnitude must not
      // cross a boundary that the packet value does not sit on.
      mag = o.s ? -outv : outv;
      if (mag % lim != 0 &&
          ((mag + r) / lim != mag / lim || (mag + r) % lim == 0))
        why = "remainder crosses a rounding boundary";
    end
    return why == "";
  endfunction

  // Random operand pair with an exponent difference drawn from the given class:
  // 0 small range, 1 e1 > e2 large, 2 e2 > e1 large, 3 beyond the clamp,
  // 4 deep cancellation (equal exponents, nearly equal significands).
  function automatic void rand_ops(input int cls, output std_op_t a, output pf_op_t b,
                                   output pf_cr_t c);
    int d;
    a.s = 1'($urandom);
    b.s = 1'($urandom);
    a.f = {1'b1, 63'(urandom64_f())};
    b.e = 15'($urandom_range(2000, 30000));
    case (cls)
      0: d = $urandom_range(0, 5) - 1;
      1: d = $urandom_range(5, 70);
      2: d = -int'($urandom_range(2, 70));
      3: d = ($urandom_range(0, 1) == 1) ? int'($urandom_range(67, 900)) : -int'($urandom_range(67, 900));
      default: d = 0;
    endcase
    a.e = 15'(int'(b.e) + d);
    if (cls == 4) begin
      b.s = ~a.s;
      near_packet(a.f, $urandom_range(0, 3), b.fp, b.fn, c);
      if ($urandom_range(0, 3) == 0) a.e = 15'(int'(b.e) + int'($urandom_range(0, 1)) * 2 - 1);
    end else begin
      rand_packet(b.fp, b.fn, c);
    end
  endfunction

  function automatic logic [63:0] urandom64_f();
    return {$urandom, $urandom};
  endfunction
endpackage
