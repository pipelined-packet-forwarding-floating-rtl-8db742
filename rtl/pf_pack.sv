// pf_pack: final adjustment of the leading digits into packet forwarding format.
//
// Input is a positive borrow-save value V in (1, 4): HW integer digits (weights
// 2^(HW-1) .. 2^0) and TW fraction digits (weights 2^-1 .. 2^-TW). The packet
// format wants the digit of weight 2^1 to be a plain 1, no digits above it,
// and b0 (weight 2^0) in {-1, 0, 1}. Let D be the integer value of the HW
// integer digits and t the value of the fraction digits, t in (-1, 1).
// Since V = D + t is in (1, 4), D is one of 1..4. For D = 1, 2, 3 the
// result is "1 b0" with b0 = D - 2 and the fraction is untouched. For D = 4
// the fraction must be negative, so its first non-zero digit is -1; adding 1
// to it turns every digit down to and including that one into +1, and b0 = 1.
// That rewrite is a prefix OR over the digits, with no carry chain.
// err flags an input outside the range (D not in 1..4, or D = 4 with a
// non-negative fraction); the adder's datapaths never produce one.
// Purely combinational.
module pf_pack
  import pf_pkg::*;
#(
  parameter int unsigned HW = 3,
  parameter int unsigned TW = 69
) (
  input  logic [HW-1:0] hp,
  input  logic [HW-1:0] hn,
  input  logic [TW-1:0] tp,
  input  logic [TW-1:0] tn,
  output logic          b0p,
  output logic          b0n,
  output logic [TW-1:0] op,
  output logic [TW-1:0] on,
  output logic          err
);
  int                   d;
  logic                 seen, first_neg;

  always_comb begin
    d = 0;
    for (int i = 0; i < HW; i++) begin
      d = d + dig(hp[i], hn[i]) * (1 << i);
    end
    op        = tp;
    on        = tn;
    b0p       = 1'b0;
    b0n       = 1'b0;
    err       = 1'b0;
    seen      = 1'b0;
    first_neg = 1'b0;
    case (d)
      1: b0n = 1'b1;
      2: ;
      3: b0p = 1'b1;
      4: begin
        b0p = 1'b1;
        for (int i = TW - 1; i >= 0; i--) begin
          if (!seen) begin
            if (tp[i] != tn[i]) begin
              seen      = 1'b1;
              first_neg = tn[i];
            end
            op[i] = 1'b1;
            on[i] = 1'b0;
          end
        end
        err = !first_neg;
      end
      default: err = 1'b1;
    endcase
  end
endmodule
