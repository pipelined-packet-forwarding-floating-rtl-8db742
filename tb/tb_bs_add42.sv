// tb_bs_add42: checks that the 4-2 adder's borrow-save output equals the sum
// of its two borrow-save inputs for random 64-digit strings.
module tb_bs_add42;
  logic [63:0] ap, an, bp, bn;
  logic [65:0] sp, sn;
  int checks = 0, failures = 0;

  bs_add42 #(.W(64)) dut (.ap(ap), .an(an), .bp(bp), .bn(bn), .sp(sp), .sn(sn));

  initial begin
    logic signed [69:0] want, got;
    for (int n = 0; n < 3000; n++) begin
      ap = {$urandom, $urandom};
      an = {$urandom, $urandom};
      bp = {$urandom, $urandom};
      bn = {$urandom, $urandom};
      #1;
      want = $signed({6'b0, ap}) - $signed({6'b0, an}) + $signed({6'b0, bp}) - $signed({6'b0, bn});
      got  = $signed({4'b0, sp}) - $signed({4'b0, sn});
      checks++;
      if (want != got) begin
        failures++;
        $display("FAIL: %0d != %0d", got, want);
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
