// cfd_rewrite: rewrite step on the leading digits of the remainder.
//
// A leading digit pair 1,-1 has the same value as 0,1, and -1,1 the same as
// 0,-1. This block applies that rewrite to neighbouring digit pairs from the
// top of the word downward: pair (RW-1, RW-2) first, then (RW-2, RW-3) with
// the already rewritten digit, and so on, down to the pair whose lower digit
// is LO. The value of the remainder never changes.
//
// Why the chain is needed: the remainder magnitude is below 1, but its
// signed-bit form can still carry digits at weights 4, 2 and 1. For a value
// below half the weight of the top digit, a nonzero top digit is always
// followed by an opposite digit, so a single rewrite clears it; repeating the
// rewrite down the word clears every digit above weight 1 and leaves no
// opposite pair among the digits of weight 1, 1/2 and 1/4 that quotient
// selection reads (see cfd_qsel).
//
// Purely combinational; in the divider RW-LO-1 = 4 pair stages. The pair
// rewrite is the described "rewrite" of the two most significant digits;
// repeating it over the top few pairs is this design's choice, made so that
// the quotient digit can be read off the leading digits.
module cfd_rewrite #(
  parameter int unsigned RW = 36,
  parameter int unsigned LO = 31   // lowest digit index a rewrite may touch
) (
  input  logic [RW-1:0] ip,    // positive part in
  input  logic [RW-1:0] in_,   // negative part in
  output logic [RW-1:0] op,    // positive part out
  output logic [RW-1:0] on     // negative part out
);

  always_comb begin
    op = ip;
    on = in_;
    for (int i = RW - 1; i > int'(LO); i--) begin
      if (op[i] && on[i-1]) begin          // 1,-1 -> 0,1
        op[i]   = 1'b0;
        on[i-1] = 1'b0;
        op[i-1] = 1'b1;
      end else if (on[i] && op[i-1]) begin // -1,1 -> 0,-1
        on[i]   = 1'b0;
        op[i-1] = 1'b0;
        on[i-1] = 1'b1;
      end
    end
  end

endmodule
