// cfd_prescaler: divisor-range prescaling (step 1 of the division).
//
// The iteration of the divider only stays bounded while the divisor lies in
// [1, 1.5]. When the normalized divisor d (format 1.(N-1), value in [1, 2)) is
// greater than 1.1 in binary, both dividend and divisor are multiplied by
// 0.75 (0.11 in binary), which leaves the quotient unchanged and brings the
// divisor into (1.125, 1.5). The product is formed as x/2 + x/4 and needs two
// more fraction bits, so both outputs have format 1.(N+1). Unscaled operands
// are only widened.
//
// The range test and the factor 0.75 follow the described algorithm; forming
// the product with an ordinary binary adder is this design's choice (nothing
// is said about how the multiplication is built). Purely combinational; the
// divider registers the outputs when it accepts a division.
module cfd_prescaler #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x,        // dividend significand, 1.(N-1)
  input  logic [N-1:0] d,        // divisor significand, 1.(N-1)
  output logic [N+1:0] xs,       // dividend after prescaling, 1.(N+1)
  output logic [N+1:0] ds,       // divisor after prescaling, 1.(N+1)
  output logic         scaled    // 1 when d > 1.1b and 0.75 was applied
);

  always_comb begin
    // d > 1.1b: integer bit and first fraction bit set, some lower bit set.
    scaled = d[N-1] & d[N-2] & (|d[N-3:0]);
    if (scaled) begin
      xs = {1'b0, x, 1'b0} + {2'b00, x};
      ds = {1'b0, d, 1'b0} + {2'b00, d};
    end else begin
      xs = {x, 2'b00};
      ds = {d, 2'b00};
    end
  end

endmodule
