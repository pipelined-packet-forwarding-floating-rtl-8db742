// pf_adder: the two addition cycles of a packet-forwarding floating point adder.
//
// The adder takes one operand in standard double extended format (a) and one
// in packet forwarding format: its principal part packet (b) enters with a,
// its carry-round packet (c) one cycle later, because a producing pipeline
// delivers the carry-round packet a cycle after the principal part. Two
// datapaths work on every operation in parallel: pf_small_path for
// -1 <= e1 - e2 <= 4 (where cancellation and a long normalization can occur)
// and pf_large_path for the rest (long alignment, normalization of at most
// one place). Thanks to the asymmetric threshold the large path never shifts
// the late carry-round packet by a variable amount. The exponent difference,
// computed in cycle 1, selects the result at the end of cycle 2, and the
// result is registered: out is valid two clock cycles after in_valid, so a
// dependent addition can start two cycles after its producer. No carry-propagate
// addition of the significand happens in either cycle; the result's principal
// part is a borrow-save string in packet format, ready to be forwarded, and
// lo and the sticky digit carry what a rounder needs below it.
//
// Rounding into the carry-round packet and the standard-format result (cycles
// 3 and 4) is a separate unit and not part of this module.
// Interface: in_valid qualifies a and b; c is sampled the next cycle for the
// same operation. Fully pipelined, one operation per cycle. rst_n is an
// active-low synchronous reset of the valid bits; the datapath registers are
// not reset. err is a registered range-invariant check that stays 0.
module pf_adder
  import pf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  std_op_t a,
  input  pf_op_t  b,
  input  pf_cr_t  c,
  output logic    out_valid,
  output pf_sum_t out,
  output logic    err
);
  logic signed [EXP_W:0] dexp;
  logic                  small_d, small_q, v1;
  pf_sum_t               sum_s, sum_l, sel;
  logic                  err_s, err_l;

  // path select from the full exponent difference (cycle 1)
  assign dexp    = $signed({1'b0, a.e}) - $signed({1'b0, b.e});
  assign small_d = (dexp >= -(EXP_W+1)'(1)) && (dexp <= (EXP_W+1)'(4));

  pf_small_path u_small (.clk(clk), .en(in_valid), .a(a), .b(b), .c(c), .sum(sum_s), .err(err_s));
  pf_large_path u_large (.clk(clk), .en(in_valid), .a(a), .b(b), .c(c), .sum(sum_l), .err(err_l));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
    end
    if (in_valid) small_q <= small_d;
  end

  assign sel = small_q ? sum_s : sum_l;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err       <= 1'b0;
    end else begin
      out_valid <= v1;
      err       <= v1 && (small_q ? err_s : err_l);
    end
    if (v1) out <= sel;
  end

  // a result is never valid without its operation having entered two cycles before
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid, 2));
endmodule
