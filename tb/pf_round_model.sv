// pf_round_model: behavioural model of the rounding stages (cycles 3 and 4)
// that follow the adder. It is a test model, not synthesizable RTL: the
// rounder's design is not part of this adder and only its function is modelled.
//
// Function: the adder's result denotes a magnitude f + lo*2^-69 (principal
// part and seven low digits, relative to 2^e) and a sticky digit giving the
// sign of any remainder below that. The model rounds this magnitude to 64
// significant bits, round to nearest, ties to even. The rounding grid is
// 2^-63 when the exact magnitude is below 2, else 2^-62. The sticky digit
// breaks ties and decides exact boundary cases. The principal part has
// already been forwarded unchanged, so the correction is returned as the
// carry-round packet c = (rounded - f) / 2^-63, which is always in {-2..2}.
// c is written as two borrow-save digits with a zero negative bit where the
// value allows.
//
// Timing: in_valid/sum are sampled at a clock edge (the adder's output edge);
// c_valid/c follow one edge later (end of cycle 3), std_valid/std_out one
// edge after that (end of cycle 4). An exact zero gives std_zero and c = 0.
// bad is set when the result is outside the model's assumptions.
module pf_round_model
  import pf_pkg::*;
(
  input  logic    clk,
  input  logic    in_valid,
  input  pf_sum_t sum,
  output logic    c_valid,
  output pf_cr_t  c,
  output logic    std_valid,
  output std_op_t std_out,
  output logic    std_zero,
  output logic    bad
);
  typedef logic signed [95:0] wide_t;

  function automatic wide_t sval(logic [63:0] p, logic [63:0] n);
    return wide_t'({32'b0, p}) - wide_t'({32'b0, n});
  endfunction

  function automatic pf_cr_t enc_c(int v);
    pf_cr_t r;
    r = '0;
    case (v)
      2:  r.p = 2'b10;
      1:  r.p = 2'b01;
      -1: r.n = 2'b01;
      -2: r.n = 2'b10;
      default: ;
    endcase
    return r;
  endfunction

  pf_cr_t  c_d;
  std_op_t std_d;
  logic    zero_d, bad_d;

  always_comb begin
    wide_t pint, fint, q, rem, rint, grid, half;
    int    st, shift, cv;
    logic  up;
    bad_d  = 1'b0;
    zero_d = sum.zero;
    c_d    = '0;
    std_d  = '0;
    // magnitude in units of 2^-69
    pint = (sval(sum.fp, sum.fn) <<< 7) + wide_t'(signed'({1'b0, sum.lp})) -
           wide_t'(signed'({1'b0, sum.ln}));
    fint = sval(sum.fp, sum.fn) <<< 7;
    st   = int'(sum.stp) - int'(sum.stn);
    // grid 2^-63 below 2, 2^-62 from 2 up (the remainder may pull a value of
    // exactly 2 below it)
    if (pint < (wide_t'(1) <<< 70) || (pint == (wide_t'(1) <<< 70) && st < 0)) shift = 6;
    else shift = 7;
    grid = wide_t'(1) <<< shift;
    half = grid >>> 1;
    q    = pint >>> shift;
    rem  = pint - (q <<< shift);
    if (rem > half)       up = 1'b1;
    else if (rem < half)  up = 1'b0;
    else if (st > 0)      up = 1'b1;
    else if (st < 0)      up = 1'b0;
    else                  up = q[0];
    rint = (q + (up ? 1 : 0)) <<< shift;
    cv   = int'((rint - fint) >>> 6);
    if (((rint - fint) & 63) != 0 || cv < -2 || cv > 2) bad_d = !sum.zero;
    if (!sum.zero) c_d = enc_c(cv);
    // standard format: 64 bits with the leading one at bit 63
    std_d.s = sum.s;
    if (rint >= (wide_t'(1) <<< 71)) begin
      std_d.e = sum.e + 15'd2;
      std_d.f = 64'(rint >>> 8);
    end else if (rint >= (wide_t'(1) <<< 70)) begin
      std_d.e = sum.e + 15'd1;
      std_d.f = 64'(rint >>> 7);
    end else begin
      std_d.e = sum.e;
      std_d.f = 64'(rint >>> 6);
    end
    if (!sum.zero && (pint < (wide_t'(1) <<< 69) || pint > (wide_t'(1) <<< 71))) bad_d = 1'b1;
    if (sum.zero) std_d = '0;
  end

  logic    v3 = 1'b0;
  std_op_t std_q;
  logic    zero_q, bad_q;

  always_ff @(posedge clk) begin
    v3        <= in_valid;
    c         <= in_valid ? c_d : '0;
    std_q     <= std_d;
    zero_q    <= zero_d;
    bad_q     <= in_valid && bad_d;
    std_valid <= v3;
    std_out   <= std_q;
    std_zero  <= zero_q;
    bad       <= bad_q;
  end

  assign c_valid = v3;
endmodule
