// cfd_addsub: carry-free add/subtract of the divisor to/from the remainder.
//
// The shifted remainder arrives as a signed-bit number (positive part wp,
// negative part wn, one bit per digit). The binary divisor is turned into a
// signed-bit number by taking it as a positive part with an all-zero negative
// part. Subtracting it adds its bits to the negative part; adding it adds them
// to the positive part; a zero quotient digit passes the remainder through
// (shift only). Every digit sum is formed on its own, so no carry travels
// between digits: each result digit is 0..2, held in two bits.
//
// The divisor's bit j has weight 2^(j-(N+1)) and lines up with remainder digit
// j. Purely combinational. Follows the described signed-bit addition; the
// digit ordering and widths are this design's choice.
module cfd_addsub
  import cfd_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned RW = rem_digits(N)
) (
  input  logic [RW-1:0]         wp,    // shifted remainder, positive part
  input  logic [RW-1:0]         wn,    // shifted remainder, negative part
  input  logic [N+1:0]          dv,    // prescaled divisor, 1.(N+1)
  input  qdigit_e               op,    // Q_POS: W-D, Q_NEG: W+D, Q_ZERO: W
  output dig2_t  [RW-1:0]       sp,    // result positive part, digits 0..2
  output dig2_t  [RW-1:0]       sn     // result negative part, digits 0..2
);

  logic [RW-1:0] dext;

  always_comb begin
    dext = '0;
    dext[N+1:0] = dv;
    for (int i = 0; i < RW; i++) begin
      sp[i] = {1'b0, wp[i]} + {1'b0, (op == Q_NEG) && dext[i]};
      sn[i] = {1'b0, wn[i]} + {1'b0, (op == Q_POS) && dext[i]};
    end
  end

endmodule
