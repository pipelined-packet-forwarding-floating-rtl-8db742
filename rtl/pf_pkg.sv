// pf_pkg: types and constants shared by the packet-forwarding floating point adder.
//
// Two operand formats meet in this adder. The standard operand is a double
// extended value (-1)^s * 2^e * f with a 15-bit exponent and a 64-bit significand
// f = 1.a1..a63 whose integer bit is explicit (bit 63 has weight 2^0).
// The packet-forwarding operand is (-1)^s * 2^e * (f + c*2^-63): f is the
// principal part packet, 64 borrow-save digits of weights 2^1 .. 2^-62 (bit 63 is
// the leading "1" digit, bit 62 is b0, bit 0 is b62), and c is the carry-round
// packet, two borrow-save digits c62 (weight 2^-62) and c63 (weight 2^-63).
// A borrow-save digit is a pair of bits (p, n) with value p - n.
// Both operands use the same exponent bias; exponent arithmetic here is plain
// 15-bit binary and over/underflow of the exponent is not handled.
package pf_pkg;

  localparam int unsigned EXP_W  = 15;  // exponent field
  localparam int unsigned SIG_W  = 64;  // significand precision p
  localparam int unsigned LO_W   = 7;   // low-order digits below the principal part
  localparam int unsigned CLAMP  = 66;  // alignment clamp when the standard operand is shifted
  localparam int unsigned CLAMP_P = 68; // clamp when the packet operand (up to 4) is shifted

  // Standard double extended operand.
  typedef struct packed {
    logic             s;
    logic [EXP_W-1:0] e;
    logic [SIG_W-1:0] f;
  } std_op_t;

  // Principal part packet operand (sign, exponent and 64-digit significand).
  typedef struct packed {
    logic             s;
    logic [EXP_W-1:0] e;
    logic [SIG_W-1:0] fp;
    logic [SIG_W-1:0] fn;
  } pf_op_t;

  // Carry-round packet: bit 1 is c62, bit 0 is c63.
  typedef struct packed {
    logic [1:0] p;
    logic [1:0] n;
  } pf_cr_t;

  // Result of the two addition cycles, in packet format before rounding.
  // Value = (-1)^s * 2^e * (f + lo*2^-69) + remainder, where the remainder is
  // smaller than 2^(e-64) in magnitude and has the sign of the sticky digit.
  // zero marks an exact zero sum, for which the other fields are zero.
  typedef struct packed {
    logic             zero;
    logic             s;
    logic [EXP_W-1:0] e;
    logic [SIG_W-1:0] fp;
    logic [SIG_W-1:0] fn;
    logic [LO_W-1:0]  lp;
    logic [LO_W-1:0]  ln;
    logic             stp;   // sticky digit, positive bit
    logic             stn;   // sticky digit, negative bit
  } pf_sum_t;

  // value of one borrow-save digit, -1, 0 or +1
  function automatic int dig(input logic p, input logic n);
    return int'(p) - int'(n);
  endfunction

endpackage
