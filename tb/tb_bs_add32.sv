// tb_bs_add32: checks that the 3-2 adder's borrow-save output equals
// x + y+ - y- for random 64-bit inputs.
module tb_bs_add32;
  logic [63:0] x, yp, yn;
  logic [64:0] sp, sn;
  int checks = 0, failures = 0;

  bs_add32 #(.W(64)) dut (.x(x), .yp(yp), .yn(yn), .sp(sp), .sn(sn));

  initial begin
    logic signed [67:0] want, got;
    for (int n = 0; n < 3000; n++) begin
      x  = {$urandom, $urandom};
      yp = {$urandom, $urandom};
      yn = {$urandom, $urandom};
      #1;
      want = $signed({4'b0, x}) + $signed({4'b0, yp}) - $signed({4'b0, yn});
      got  = $signed({3'b0, sp}) - $signed({3'b0, sn});
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
