// tb_pf_adder: end-to-end test of the two-cycle packet-forwarding adder.
//
// Streams random operations back to back through pf_adder at its default
// size: principal parts with the operands, carry-round packets one cycle
// later, results two cycles after the operands. Every result is compared with
// the exact sum from tb_pf_ref_pkg, its latency is checked, and the mechanisms
// of the design (both datapaths, both carry-round placements, the alignment
// clamp, the 7-digit normalization, exact zero, sign flip, the three large-path
// shifts, the packed-digit rewrite and a non-zero sticky digit) are counted;
// one that never happened counts as a failure.
module tb_pf_adder;
  import pf_pkg::*;
  import tb_pf_ref_pkg::*;

  localparam int N_OPS = 100000;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  std_op_t a = '0;
  pf_op_t  b = '0;
  pf_cr_t  c = '0;
  logic    out_valid, err;
  pf_sum_t out;

  int checks = 0, failures = 0;
  int cyc = 0;

  pf_adder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .c(c),
                .out_valid(out_valid), .out(out), .err(err));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    std_op_t a;
    pf_op_t  b;
    pf_cr_t  c;
    int      t_in;
  } op_rec_t;
  op_rec_t q[$];
  pf_cr_t  c_next = '0;

  // mechanism counters
  typedef enum int {M_SMALL, M_LARGE_E1, M_LARGE_E2, M_CLAMP, M_SEVEN, M_ZERO,
                    M_SIGMA_NEG, M_SHL, M_SHR, M_NOSH, M_REWRITE_S, M_REWRITE_L,
                    M_STICKY, M_NUM} mech_e;
  int mech[M_NUM];
  string mname[M_NUM] = '{"small path", "large path e1>e2", "large path e2>e1",
                          "alignment clamp", "7-digit normalization", "exact zero",
                          "small path negative sigma", "large path left shift",
                          "large path right shift", "large path no shift",
                          "small path D=4 rewrite", "large path D=4 rewrite",
                          "non-zero sticky digit"};

  // sample internal events at the end of cycle 2
  always @(posedge clk) begin
    if (dut.v1) begin
      if (dut.small_q) begin
        mech[M_SMALL]++;
        if (!dut.u_small.nz) mech[M_SEVEN]++;
        if (dut.u_small.sum.zero) mech[M_ZERO]++;
        if (dut.u_small.sigma_neg) mech[M_SIGMA_NEG]++;
        if (dut.u_small.u_pack.d == 4) mech[M_REWRITE_S]++;
      end else begin
        if (dut.u_large.expsign_q) mech[M_LARGE_E2]++; else mech[M_LARGE_E1]++;
        if (dut.u_large.shl) mech[M_SHL]++;
        else if (dut.u_large.shr) mech[M_SHR]++;
        else mech[M_NOSH]++;
        if (dut.u_large.u_pack.d == 4) mech[M_REWRITE_L]++;
        if (dut.sum_l.stp != dut.sum_l.stn) mech[M_STICKY]++;
      end
    end
  end

  // drive: operands at one edge, carry-round packet during the next cycle
  initial begin
    op_rec_t r;
    int cls;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < N_OPS; n++) begin
      cls = $urandom_range(0, 9);
      cls = (cls < 3) ? 0 : (cls < 5) ? 1 : (cls < 7) ? 2 : (cls < 8) ? 3 : 4;
      rand_ops(cls, r.a, r.b, r.c);
      if (cls == 3) mech[M_CLAMP]++;
      r.t_in = int'($time / 10);
      a <= r.a; b <= r.b; in_valid <= ($urandom_range(0, 7) != 0);
      c <= c_next;
      @(posedge clk);
      if (in_valid) begin
        q.push_back(r);
        c_next = r.c;
      end else begin
        c_next = '0;
      end
    end
    in_valid <= 1'b0;
    c <= c_next;
    @(posedge clk);
    c <= '0;
    repeat (5) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", q.size());
    end
    for (int i = 0; i < M_NUM; i++) begin
      checks++;
      $display("mechanism %-28s %0d", mname[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never exercised", mname[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check results
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      op_rec_t r;
      string why;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        r = q.pop_front();
        checks += 3;
        if (int'($time / 10) - 1 - r.t_in != 2) begin
          failures++;
          $display("FAIL: latency %0d cycles, expected 2", int'($time / 10) - 1 - r.t_in);
        end
        if (!check_sum(r.a, r.b, r.c, out, why)) begin
          failures++;
          if (failures < 400)
            $display("FAIL: %s  e1=%0d e2=%0d s1=%0d s2=%0d", why, r.a.e, r.b.e, r.a.s, r.b.s);
        end
        if (err) begin
          failures++;
          $display("FAIL: internal range check fired");
        end
      end
    end
  end

  initial begin
    repeat (N_OPS * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
