// cfd_digit_adjust: digit adjustment of a whole positive or negative part.
//
// The part (RW digits of 0..2, two bits each) is cut into RW/SEG segments of
// SEG digits. Every segment looks up its own table at the same time (pass 1);
// each table's carry then goes into the adder of the segment above (pass 2).
// The result is the same value as an ordinary binary number, one bit per
// digit, ready for the refresh step.
//
// A segment whose four low bits are 1111 passes an incoming carry on to the
// segment above; every other segment absorbs it. The top carry-out is
// reported as ovf; the divider sizes its word so that it stays 0.
//
// Timing: purely combinational. Segmenting into four-digit table lookups with
// a second carry pass follows the described design; RW must be a multiple of
// SEG.
module cfd_digit_adjust
  import cfd_pkg::*;
#(
  parameter int unsigned RW  = rem_digits(32),
  parameter int unsigned SEG = SEG_DIGITS
) (
  input  dig2_t [RW-1:0] dig,    // digits 0..2
  output logic  [RW-1:0] bin,    // same value, binary
  output logic           ovf     // carry out of the top segment
);

  localparam int unsigned NSEG = RW / SEG;

  logic [NSEG:0] carry;

  assign carry[0] = 1'b0;

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    cfd_da_segment #(.SEG(SEG)) u_seg (
      .dig  (dig[s*SEG +: SEG]),
      .cin  (carry[s]),
      .bits (bin[s*SEG +: SEG]),
      .cout (carry[s+1])
    );
  end

  assign ovf = carry[NSEG];

  initial begin
    assert (RW % SEG == 0) else $error("RW must be a multiple of SEG");
  end

endmodule
