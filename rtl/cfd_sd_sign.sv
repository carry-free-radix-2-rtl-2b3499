// cfd_sd_sign: sign and zero test of a signed-bit number.
//
// For a signed-bit number with no position set in both parts, the sign is the
// sign of its most significant nonzero digit: the lower digits together can
// never outweigh it. The block scans from the top for the first nonzero digit
// (a priority search, no carries) and reports neg = 1 when that digit is -1,
// and zero = 1 when there is none.
//
// Purely combinational. The divider uses it on the final remainder to choose
// between Q and QM of the on-the-fly conversion; this correction is this
// design's choice.
module cfd_sd_sign #(
  parameter int unsigned RW = 36
) (
  input  logic [RW-1:0] p,      // positive part
  input  logic [RW-1:0] n,      // negative part (p & n == 0)
  output logic          neg,    // value < 0
  output logic          zero    // value == 0
);

  always_comb begin
    neg  = 1'b0;
    zero = 1'b1;
    for (int i = RW - 1; i >= 0; i--) begin
      if (zero && (p[i] || n[i])) begin
        zero = 1'b0;
        neg  = n[i];
      end
    end
  end

endmodule
