// tb_pf_lo_gen: for every shift 2..68 and random 66-digit inputs, checks that
// the output keeps exactly the digits whose shifted position q + m exceeds 65,
// in place, and zeroes the rest.
module tb_pf_lo_gen;
  logic [65:0] ip, in, op, on;
  logic [6:0]  m;
  int checks = 0, failures = 0;

  pf_lo_gen dut (.ip(ip), .in(in), .m(m), .op(op), .on(on));

  initial begin
    logic [65:0] wp, wn;
    for (int n = 0; n < 3000; n++) begin
      m  = 7'($urandom_range(2, 68));
      ip = 66'({$urandom, $urandom, $urandom});
      in = 66'({$urandom, $urandom, $urandom});
      #1;
      wp = '0; wn = '0;
      for (int q = -2; q <= 63; q++) begin
        if (q + int'(m) > 65) begin
          wp[63 - q] = ip[63 - q];
          wn[63 - q] = in[63 - q];
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
