// tb_pf_pack: random positive borrow-save values in (1, 4) with three integer
// digits are repacked. The result must keep the value, take the form
// "1 b0 . tail" with a legal digit b0, and not flag an error; the cases
// D = 1..4 of the integer part, including the tail rewrite for D = 4, are
// counted and must all occur. An integer part outside 1..4 must raise err.
module tb_pf_pack;
  logic [2:0]  hp, hn;
  logic [68:0] tp, tn, op, on;
  logic        b0p, b0n, err;
  int checks = 0, failures = 0;
  int seen_d[5];

  pf_pack #(.HW(3), .TW(69)) dut (.hp(hp), .hn(hn), .tp(tp), .tn(tn),
                                  .b0p(b0p), .b0n(b0n), .op(op), .on(on), .err(err));

  function automatic logic signed [79:0] val(logic [2:0] p3, logic [2:0] n3,
                                             logic [68:0] p, logic [68:0] n);
    logic signed [79:0] v = '0;
    for (int i = 0; i < 3; i++) begin
      if (p3[i]) v = v + (80'sd1 <<< (69 + i));
      if (n3[i]) v = v - (80'sd1 <<< (69 + i));
    end
    for (int i = 0; i < 69; i++) begin
      if (p[i]) v = v + (80'sd1 <<< i);
      if (n[i]) v = v - (80'sd1 <<< i);
    end
    return v;
  endfunction

  initial begin
    logic signed [79:0] vin, vout, lo, hi;
    int d;
    int bad;
    bad = 0;
    lo = 80'sd1 <<< 69;
    hi = 80'sd4 <<< 69;
    for (int n = 0; n < 6000; n++) begin
      hp = 3'($urandom); hn = 3'($urandom);
      tp = 69'({$urandom, $urandom, $urandom});
      tn = 69'({$urandom, $urandom, $urandom});
      // bias towards leading-insignificant patterns
      if (n % 4 == 0) begin
        tp[68:60] = 9'b0;
        tn[68:60] = 9'($urandom) & 9'b000111111;
      end
      vin = val(hp, hn, tp, tn);
      #1;
      d = 0;
      for (int i = 0; i < 3; i++) d += (int'(hp[i]) - int'(hn[i])) << i;
      if (vin <= lo || vin >= hi) begin
        // only an integer part outside 1..4 is visible without a carry chain
        if (bad < 500 && (d < 1 || d > 4)) begin
          bad++;
          checks++;
          if (!err) begin
            failures++;
            $display("FAIL: out-of-range input not flagged");
          end
        end
        continue;
      end
      if (d >= 1 && d <= 4) seen_d[d]++;
      vout = val(3'b010, 3'b000, op, on) + (b0p ? (80'sd1 <<< 69) : 80'sd0)
             - (b0n ? (80'sd1 <<< 69) : 80'sd0);
      checks++;
      if (err || vout != vin || (b0p && b0n)) begin
        failures++;
        $display("FAIL: d=%0d err=%0d value kept=%0d", d, err, vout == vin);
      end
    end
    for (int i = 1; i <= 4; i++) begin
      checks++;
      if (seen_d[i] == 0) begin
        failures++;
        $display("FAIL: case D=%0d never exercised", i);
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
