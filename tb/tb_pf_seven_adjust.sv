// tb_pf_seven_adjust: drives all 3^7 digit combinations of the 7 low digits
// (with random encodings of zero digits) and checks that the normalized
// string equals W * 2^shamt for W, the integer the 7 digits denote, that its
// leading digit is sign(W), that its value read with the leading digit at
// 2^0 lies in [1/2, 1) for W > 0 and in (-2, -1] for W < 0, and that
// W = 0 is flagged as zero.
module tb_pf_seven_adjust;
  logic [6:0]  hp, hn, shamt;
  logic [70:0] op, on;
  logic        zero;
  int checks = 0, failures = 0;

  pf_seven_adjust dut (.hp(hp), .hn(hn), .op(op), .on(on), .shamt(shamt), .zero(zero));

  initial begin
    int w, code;
    logic signed [143:0] v, want, half, one, two;
    for (int n = 0; n < 2187; n++) begin
      code = n;
      w = 0;
      for (int i = 0; i < 7; i++) begin
        case (code % 3)
          0: begin hp[i] = 1'b1; hn[i] = 1'b0; w += (1 << i); end
          1: begin hp[i] = 1'b0; hn[i] = 1'b1; w -= (1 << i); end
          default: begin hp[i] = 1'($urandom); hn[i] = hp[i]; end
        endcase
        code = code / 3;
      end
      #1;
      checks++;
      if (w == 0) begin
        if (!zero) begin
          failures++;
          $display("FAIL: zero not flagged");
        end
        continue;
      end
      v = '0;
      for (int i = 0; i < 71; i++) begin
        if (op[i]) v = v + (144'sd1 <<< i);
        if (on[i]) v = v - (144'sd1 <<< i);
      end
      want = 144'(w) <<< shamt;
      one  = 144'sd1 <<< 70;
      half = one >>> 1;
      two  = one <<< 1;
      if (zero || v != want) begin
        failures++;
        $display("FAIL: w=%0d shamt=%0d value mismatch", w, shamt);
      end
      checks++;
      if ((w > 0) ? !(op[70] && !on[70] && v >= half && v < one)
                  : !(on[70] && !op[70] && v > -two && v <= -one)) begin
        failures++;
        $display("FAIL: w=%0d leading digit or range wrong", w);
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
