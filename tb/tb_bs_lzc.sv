// tb_bs_lzc: builds borrow-save strings with a known number k of leading zero
// digits (each zero digit encoded as 00 or 11, the first non-zero digit as 10
// or 01, the rest random) and checks the count and the k <= 63 flag,
// including the all-zero string.
module tb_bs_lzc;
  logic [63:0] ap, an;
  logic [5:0]  k;
  logic        nz;
  int checks = 0, failures = 0;

  bs_lzc #(.W(64)) dut (.ap(ap), .an(an), .k(k), .nz(nz));

  initial begin
    int kk;
    for (int n = 0; n < 3000; n++) begin
      kk = $urandom_range(0, 64);
      ap = {$urandom, $urandom};
      an = {$urandom, $urandom};
      for (int i = 0; i < kk; i++) begin
        an[63-i] = ap[63-i];
      end
      if (kk < 64) begin
        an[63-kk] = ~ap[63-kk];
      end
      #1;
      checks++;
      if (kk == 64) begin
        if (nz) begin
          failures++;
          $display("FAIL: all-zero string flagged non-zero");
        end
      end else if (!nz || int'(k) != kk) begin
        failures++;
        $display("FAIL: k=%0d nz=%0d, expected %0d", k, nz, kk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
