// bs_add42: 4-2 redundant adder, sum of two borrow-save numbers.
//
// Built as two cascaded 3-2 adders (bs_add32). The first adds a+ + b+ - a-.
// The second must subtract b- from that borrow-save sum t; it computes
// -(t- + b- - t+) with the same 3-2 cell and exchanges the output vectors.
// Two full adder delays for any width, no carry chain. W digits in, W+2 out.
module bs_add42 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] ap,
  input  logic [W-1:0] an,
  input  logic [W-1:0] bp,
  input  logic [W-1:0] bn,
  output logic [W+1:0] sp,
  output logic [W+1:0] sn
);
  logic [W:0]   tp, tn;
  logic [W+1:0] rp, rn;

  bs_add32 #(.W(W))   u_first  (.x(ap), .yp(bp), .yn(an), .sp(tp), .sn(tn));
  bs_add32 #(.W(W+1)) u_second (.x(tn), .yp({1'b0, bn}), .yn(tp), .sp(rp), .sn(rn));

  assign sp = rn;
  assign sn = rp;
endmodule
