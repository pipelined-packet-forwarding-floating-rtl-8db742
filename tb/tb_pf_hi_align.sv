// tb_pf_hi_align: for every shift 2..68 and random 66-digit inputs, checks
// digit by digit that the digit at position q appears at position q + m when
// that is at most 65, and that all other output positions are zero.
module tb_pf_hi_align;
  logic [65:0] ip, in;
  logic [6:0]  m;
  logic [67:0] op, on;
  int checks = 0, failures = 0;

  pf_hi_align dut (.ip(ip), .in(in), .m(m), .op(op), .on(on));

  initial begin
    logic [67:0] wp, wn;
    for (int n = 0; n < 3000; n++) begin
      m  = 7'($urandom_range(2, 68));
      ip = 66'({$urandom, $urandom, $urandom});
      in = 66'({$urandom, $urandom, $urandom});
      #1;
      wp = '0; wn = '0;
      for (int q = -2; q <= 63; q++) begin
        if (q + int'(m) <= 65) begin
          wp[65 - (q + int'(m))] = ip[63 - q];
          wn[65 - (q + int'(m))] = in[63 - q];
        end
      end
      checks++;
      if (wp != op || wn != on) begin
        failures++;
        $display("FAIL: m=%0d", m);
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
