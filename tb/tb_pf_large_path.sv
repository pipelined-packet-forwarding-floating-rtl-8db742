// tb_pf_large_path: runs pf_large_path alone on random operands with
// e1-e2 in 5..70, e2-e1 in 2..70, and differences beyond the clamps (66 and 68),
// one operation per cycle: operands at a clock edge, carry-round packet during
// the following cycle, result checked at the end of that cycle against the
// exact sum from tb_pf_ref_pkg; err must stay low.
// Counted mechs: both carry-round placements, all three adjust shifts and a non-zero sticky digit must each occur.
module tb_pf_large_path;
  import pf_pkg::*;
  import tb_pf_ref_pkg::*;

  logic    clk = 1'b0;
  std_op_t a = '0;
  pf_op_t  b = '0;
  pf_cr_t  c = '0;
  pf_sum_t sum;
  logic    err;
  int checks = 0, failures = 0;
  int m0 = 0, m1 = 0, m2 = 0, m3 = 0;

  pf_large_path dut (.clk(clk), .en(1'b1), .a(a), .b(b), .c(c), .sum(sum), .err(err));

  always #5 clk = ~clk;

  initial begin
    std_op_t ra, pa;
    pf_op_t  rb, pb;
    pf_cr_t  rc, pc;
    string   why;
    rand_ops($urandom_range(1, 3), ra, rb, rc);
    a <= ra; b <= rb;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      pa = ra; pb = rb; pc = rc;
      rand_ops($urandom_range(1, 3), ra, rb, rc);
      a <= ra; b <= rb; c <= pc;
      #4;
      checks++;
      if (!check_sum(pa, pb, pc, sum, why) || err) begin
        failures++;
        if (failures < 20) $display("FAIL: %s err=%0d e1=%0d e2=%0d", why, err, pa.e, pb.e);
      end
      if (dut.expsign_q) m0++;
      if (!dut.expsign_q) m1++;
      if (dut.shl) m2++;
      if (dut.shr && sum.stp != sum.stn) m3++;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
    end
    if (m0 == 0 || m1 == 0 || m2 == 0 || m3 == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised: %0d %0d %0d %0d", m0, m1, m2, m3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (21000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
