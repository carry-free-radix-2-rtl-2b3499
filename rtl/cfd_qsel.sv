// cfd_qsel: quotient-digit selection from the leading remainder digits.
//
// The rewritten remainder R (|R| < 1) has no nonzero digit above weight 1.
// The next quotient digit, which is also the next operation, is its most
// significant digit: the weight-1 digit r0 when it is nonzero, otherwise the
// weight-1/2 digit r-1. A 1 selects subtraction of the divisor, a -1 addition,
// a 0 a plain shift. No divisor bits are looked at.
//
// Why it is safe: after the rewrite r0 = 1 implies R > 1/2 and r0 = 0,
// r-1 = 1 implies R > 1/4, so in both cases 2R lies in (1/2, 2) and 2R - D
// stays inside (-1, 1) for any divisor in [1, 1.5]. With r0 = r-1 = 0,
// |R| < 1/2 and 2R stays inside (-1, 1) unchanged.
//
// Purely combinational. The three cases (MSB 1, -1, 0) follow the described
// selection; reading the weight-1/2 digit when the weight-1 digit is 0 is how
// this design places the "MSB" on the remainder word.
module cfd_qsel
  import cfd_pkg::*;
#(
  parameter int unsigned RW   = 36,
  parameter int unsigned ONE  = 33   // index of the digit of weight 1
) (
  input  logic [RW-1:0] rp,   // rewritten remainder, positive part
  input  logic [RW-1:0] rn,   // rewritten remainder, negative part
  output qdigit_e       q     // selected quotient digit / next operation
);

  always_comb begin
    if (rp[ONE])        q = Q_POS;
    else if (rn[ONE])   q = Q_NEG;
    else if (rp[ONE-1]) q = Q_POS;
    else if (rn[ONE-1]) q = Q_NEG;
    else                q = Q_ZERO;
  end

endmodule
