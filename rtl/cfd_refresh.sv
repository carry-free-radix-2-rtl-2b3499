// cfd_refresh: refresh step, recombining the adjusted parts into signed bits.
//
// After digit adjustment the positive part p and the negative part n are two
// binary numbers whose difference is the remainder. Where both hold a 1 at
// the same position, +1 and -1 cancel and the digit becomes 0. The result is
// again a signed-bit number (positive part rp, negative part rn) with no
// position set in both, so each digit reads directly as -1, 0 or +1.
//
// Purely combinational, one gate pair per digit. Follows the described
// refresh step.
module cfd_refresh #(
  parameter int unsigned RW = 36
) (
  input  logic [RW-1:0] p,     // adjusted positive part
  input  logic [RW-1:0] n,     // adjusted negative part
  output logic [RW-1:0] rp,    // refreshed positive part
  output logic [RW-1:0] rn     // refreshed negative part
);

  assign rp = p & ~n;
  assign rn = n & ~p;

endmodule
