// tb_pf_forward: dependent additions with packet forwarding.
//
// Two independent accumulation chains run through pf_adder interleaved: chain
// 0 issues on even cycles and chain 1 on odd cycles, so the adder takes a new
// operation every cycle. Each addition of a chain uses the previous result of
// that chain as its packet operand. The principal part is taken straight from
// the adder's output register two cycles after the producer was issued. The
// carry-round packet comes one cycle later from the rounder model
// (pf_round_model), just when the adder wants it. The other operand is a fresh
// standard operand: close in exponent, far away, or nearly cancelling.
//
// The reference is a plain sequential IEEE 754 computation: exact sum of
// the standard operand and the previous rounded result, rounded to 64 bits,
// round to nearest, ties to even. For every operation the test checks that
//   - the adder's result satisfies the adder's own contract (exact or with a
//     remainder below the sticky grid),
//   - the forwarded packet (principal part + carry-round packet) has exactly
//     the value of the reference's rounded sum,
//   - the rounder model's standard-format result equals the reference.
// A chain restarts with a fresh random packet after an exact zero or after
// a fixed number of steps. The forwarded operations, both datapaths under
// forwarding, non-zero carry-round packets and restarts after zero are
// counted; one that never happened is a failure. The first operations are
// directed cases around the large path's alignment clamp.
module tb_pf_forward;
  import pf_pkg::*;
  import tb_pf_ref_pkg::*;

  localparam int N_OPS     = 40000;
  localparam int CHAIN_MAX = 60;
  localparam int N_DIRECTED = 24;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  std_op_t a = '0;
  pf_op_t  b = '0;
  pf_cr_t  c = '0;
  logic    out_valid, err;
  pf_sum_t out;

  logic    r_cvalid, r_svalid, r_zero, r_bad;
  pf_cr_t  r_c;
  std_op_t r_std;

  int checks = 0, failures = 0;

  pf_adder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .c(c),
                .out_valid(out_valid), .out(out), .err(err));

  pf_round_model rnd (.clk(clk), .in_valid(out_valid), .sum(out), .c_valid(r_cvalid),
                      .c(r_c), .std_valid(r_svalid), .std_out(r_std), .std_zero(r_zero),
                      .bad(r_bad));

  always #5 clk = ~clk;

  typedef struct {
    std_op_t     a;
    pf_op_t      b;
    pf_cr_t      c;
    bit          fwd;
    bit          is_sm;
    bit          zero;     // expected result
    bit          s;
    int          e;
    logic [63:0] q;
    pf_sum_t     o;        // adder output, filled in when it appears
  } rec_t;

  rec_t q_out[$], q_c[$], q_std[$];

  typedef enum int {M_FWD, M_FWD_SMALL, M_FWD_LARGE, M_C_NONZERO, M_ZERO_RESTART,
                    M_NUM} mech_e;
  int    mech[M_NUM];
  string mname[M_NUM] = '{"forwarded operation", "forwarded, small path",
                          "forwarded, large path", "non-zero carry-round packet",
                          "chain restart after exact zero"};

  // Exact value m * 2^x rounded to 64 bits, nearest even. Result value is
  // (-1)^s * q * 2^(e-63), q with its leading one at bit 63.
  function automatic void ieee_round(input big_t m, input int x, output bit zero,
                                     output bit s, output int e, output logic [63:0] q);
    big_t mag, qq, rem, half;
    int   msb, sh;
    zero = (m == 0);
    s    = (m < 0);
    e    = 0;
    q    = '0;
    if (zero) return;
    mag = s ? -m : m;
    msb = 0;
    for (int i = 446; i >= 0; i--)
      if (mag[i]) begin msb = i; break; end
    sh = msb - 63;
    if (sh > 0) begin
      qq   = mag >>> sh;
      rem  = mag - (qq <<< sh);
      half = big_t'(1) <<< (sh - 1);
      if (rem > half || (rem == half && qq[0])) qq = qq + 1;
      if (qq == (big_t'(1) <<< 64)) begin
        qq = qq >>> 1;
        sh = sh + 1;
      end
    end else begin
      qq = mag <<< (-sh);
    end
    q = 64'(qq);
    e = x + sh + 63;
  endfunction

  // standard operand for a chain whose value is acc_m * 2^acc_x, exponent acc_e
  function automatic std_op_t gen_a(int acc_e, bit acc_s, logic [63:0] acc_q, bit have_q);
    std_op_t r;
    int      k, d;
    r.s = 1'($urandom);
    r.f = {1'b1, 63'(urandom64_f())};
    k   = $urandom_range(0, 19);
    if (k < 8)       d = $urandom_range(0, 5) - 1;
    else if (k < 12) d = $urandom_range(5, 80);
    else if (k < 16) d = -int'($urandom_range(2, 80));
    else             d = 0;
    r.e = 15'(acc_e + d);
    if (k >= 16 && have_q) begin
      // nearly (or exactly) cancel the previous result
      r.s = ~acc_s;
      r.f = acc_q;
      if (k != 19) r.f[3:0] = 4'($urandom);
    end
    return r;
  endfunction

  initial begin
    rec_t        r, last;
    bit          last_valid;
    bit          fwd_ok[2];
    int          chain_len[2];
    // reference state of each chain: value acc_m * 2^acc_x
    big_t        acc_m[2];
    int          acc_x[2];
    bit          acc_zero[2], acc_s[2];
    int          acc_e[2];
    logic [63:0] acc_q[2];
    big_t        am, sum, pv;
    int          ax, elo, p;
    string       why;

    fwd_ok     = '{0, 0};
    chain_len  = '{0, 0};
    acc_zero   = '{1, 1};
    last_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < N_OPS + 6; t++) begin
      @(posedge clk);
      #1;
      // ---- checks, oldest stage first ----
      if (r_svalid) begin
        r = q_std.pop_front();
        checks++;
        if (r.zero ? !r_zero : (r_zero || r_std.s != r.s || r_std.e != 15'(r.e) || r_std.f != r.q)) begin
          failures++;
          if (failures < 50)
            $display("FAIL: standard result s=%0d e=%0d f=%h, expected zero=%0d s=%0d e=%0d f=%h",
                     r_std.s, r_std.e, r_std.f, r.zero, r.s, r.e, r.q);
        end
      end
      if (r_cvalid) begin
        r = q_c.pop_front();
        checks++;
        if (r.zero) begin
          if (!r.o.zero) begin
            failures++;
            $display("FAIL: exact zero not flagged");
          end
        end else begin
          pv = packet_val(r.o.fp, r.o.fn, r_c);
          if (r.o.zero || r.o.s != r.s || r.e < int'(r.o.e) ||
              pv != (big_t'(r.q) <<< (r.e - int'(r.o.e)))) begin
            failures++;
            if (failures < 50)
              $display("FAIL: forwarded packet value differs from the rounded sum (fwd=%0d small=%0d)",
                       r.fwd, r.is_sm);
          end
        end
        if (r_c != '0) mech[M_C_NONZERO]++;
        q_std.push_back(r);
      end
      if (r_bad) begin
        failures++;
        $display("FAIL: rounder model input out of range");
      end
      if (out_valid) begin
        r = q_out.pop_front();
        r.o = out;
        checks++;
        if (!check_sum(r.a, r.b, r.c, out, why)) begin
          failures++;
          if (failures < 50) $display("FAIL: adder contract: %s", why);
        end
        if (err) begin
          failures++;
          $display("FAIL: internal range check fired");
        end
        q_c.push_back(r);
      end

      // ---- carry-round packet of the operation issued last cycle ----
      if (last_valid) begin
        c = last.fwd ? r_c : last.c;
        last.c = c;
        q_out.push_back(last);
        last_valid = 0;
      end

      // ---- issue a new operation of chain p ----
      in_valid = 1'b0;
      if (t < N_OPS) begin
        p = t % 2;
        if (t >= N_DIRECTED && fwd_ok[p] && out_valid && !acc_zero[p] &&
            chain_len[p] < CHAIN_MAX) begin
          r.fwd  = 1;
          r.b.s  = out.s;
          r.b.e  = out.e;
          r.b.fp = out.fp;
          r.b.fn = out.fn;
          r.c    = '0;
          chain_len[p]++;
          mech[M_FWD]++;
        end else begin
          if (fwd_ok[p] && acc_zero[p]) mech[M_ZERO_RESTART]++;
          r.fwd = 0;
          r.b.s = 1'($urandom);
          r.b.e = 15'($urandom_range(12000, 20000));
          rand_packet(r.b.fp, r.b.fn, r.c);
          acc_m[p]     = packet_val(r.b.fp, r.b.fn, r.c);
          if (r.b.s) acc_m[p] = -acc_m[p];
          acc_x[p]     = int'(r.b.e) - 63;
          acc_e[p]     = int'(r.b.e);
          acc_s[p]     = r.b.s;
          acc_zero[p]  = 0;
          chain_len[p] = 0;
        end
        r.a = gen_a(acc_e[p], acc_s[p], acc_q[p], r.fwd);
        if (t < N_DIRECTED) begin
          // Around the alignment clamps the exact sum sits on or just above a
          // rounding tie below 1. Even cycles: 1.0 minus a packet of value 4
          // shifted by 60 .. 71 places. Odd cycles: a packet of value 1 minus
          // the largest standard significand shifted by 60 .. 71 places.
          if (p == 0) begin
            r.b.s  = 1'b1;
            r.b.fp = {2'b11, {62{1'b1}}};
            r.b.fn = '0;
            r.c    = '{p: 2'b10, n: 2'b00};
            r.a    = '{s: 1'b0, e: 15'(16000 + 60 + t), f: 64'h8000_0000_0000_0000};
          end else begin
            r.b.s  = 1'b0;
            r.b.fp = {1'b1, 63'b0};
            r.b.fn = {2'b01, 62'b0};
            r.c    = '0;
            r.a    = '{s: 1'b1, e: 15'(16000 - 60 - t), f: '1};
          end
          r.b.e    = 15'd16000;
          acc_m[p] = packet_val(r.b.fp, r.b.fn, r.c);
          if (r.b.s) acc_m[p] = -acc_m[p];
          acc_x[p] = 16000 - 63;
        end
        r.is_sm = is_small(r.a.e, r.b.e);
        if (r.fwd && r.is_sm)  mech[M_FWD_SMALL]++;
        if (r.fwd && !r.is_sm) mech[M_FWD_LARGE]++;
        // reference: exact sum, then IEEE rounding
        am  = r.a.s ? -big_t'(r.a.f) : big_t'(r.a.f);
        ax  = int'(r.a.e) - 63;
        elo = (ax < acc_x[p]) ? ax : acc_x[p];
        sum = (am <<< (ax - elo)) + (acc_m[p] <<< (acc_x[p] - elo));
        ieee_round(sum, elo, r.zero, r.s, r.e, r.q);
        acc_zero[p] = r.zero;
        acc_m[p]    = r.s ? -big_t'(r.q) : big_t'(r.q);
        acc_x[p]    = r.e - 63;
        acc_e[p]    = r.e;
        acc_s[p]    = r.s;
        acc_q[p]    = r.q;
        fwd_ok[p]   = 1;
        a = r.a;
        b = r.b;
        in_valid = 1'b1;
        last = r;
        last_valid = 1;
      end
    end

    if (q_out.size() + q_c.size() + q_std.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never completed", q_out.size() + q_c.size() + q_std.size());
    end
    for (int i = 0; i < M_NUM; i++) begin
      checks++;
      $display("mechanism %-32s %0d", mname[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never exercised", mname[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
