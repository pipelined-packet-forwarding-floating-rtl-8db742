// tb_bs_cond_neg: checks that bs_cond_neg returns the input value or its
// negative, per the neg control, for random 64-digit borrow-save strings.
module tb_bs_cond_neg;
  logic        neg;
  logic [63:0] ip, in, op, on;
  int checks = 0, failures = 0;

  bs_cond_neg #(.W(64)) dut (.neg(neg), .ip(ip), .in(in), .op(op), .on(on));

  initial begin
    logic signed [65:0] vin, vout;
    for (int n = 0; n < 2000; n++) begin
      ip = {$urandom, $urandom};
      in = {$urandom, $urandom};
      neg = 1'($urandom);
      #1;
      vin  = $signed({2'b0, ip}) - $signed({2'b0, in});
      vout = $signed({2'b0, op}) - $signed({2'b0, on});
      checks++;
      if (vout != (neg ? -vin : vin)) begin
        failures++;
        $display("FAIL: neg=%0d in=%0d out=%0d", neg, vin, vout);
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
