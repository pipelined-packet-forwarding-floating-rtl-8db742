// tb_bs_pn_recoder: checks the PN recoding of random 64-digit borrow-save
// strings. The value must be unchanged, and every fraction value of the
// result, f_j = sum_{i<j} d_i 2^(i-j), must lie in [-3/4, 1/2], the
// partial compression the recoding promises for inputs with range (-1, 1).
module tb_bs_pn_recoder;
  logic [63:0] ap, an;
  logic [64:0] bp, bn;
  int checks = 0, failures = 0;

  bs_pn_recoder #(.W(64)) dut (.ap(ap), .an(an), .bp(bp), .bn(bn));

  initial begin
    logic signed [69:0] va, vb, fj;
    for (int n = 0; n < 3000; n++) begin
      ap = {$urandom, $urandom};
      an = {$urandom, $urandom};
      if (n % 3 == 0) an = ap ^ {$urandom, $urandom};
      #1;
      va = $signed({6'b0, ap}) - $signed({6'b0, an});
      vb = $signed({5'b0, bp}) - $signed({5'b0, bn});
      checks++;
      if (va != vb) begin
        failures++;
        $display("FAIL: value changed %0d -> %0d", va, vb);
      end
      checks++;
      fj = '0;
      for (int j = 1; j <= 65; j++) begin
        if (bp[j-1]) fj = fj + (70'sd1 <<< (j - 1));
        if (bn[j-1]) fj = fj - (70'sd1 <<< (j - 1));
        if (4 * fj < -3 * (70'sd1 <<< j) || 2 * fj > (70'sd1 <<< j)) begin
          failures++;
          $display("FAIL: fraction value at %0d out of [-3/4, 1/2]", j);
          break;
        end
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
