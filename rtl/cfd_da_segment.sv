// cfd_da_segment: digit adjustment of one four-digit segment.
//
// Input: four digits of a positive (or negative) part, each 0..2 in two bits,
// as left by the carry-free add/subtract. Output: the same value as four
// ordinary bits plus a carry into the next segment.
//
// Pass 1 is a lookup table: the segment's eight input bits address a
// 256-entry table whose entry is the five-bit binary value sum(d_i * 2^i)
// (for example digits 1,0,0,2 give 01010, digits 2,2,2,2 give 11110). The
// table is a constant computed at elaboration from that formula. Pass 2 is the
// small adder below the table: it adds the carry coming from the segment
// below to the four low table bits. A carry leaves the segment when the table
// carry (bit 4) is set, or when the low bits are 1111 and a carry comes in.
// The two never happen together, since the table's largest entry is 11110.
//
// Timing: purely combinational. The table, the two passes and the four-digit
// segment follow the described digit adjustment. Digit code 3 never occurs;
// the table treats it as value 3.
module cfd_da_segment
  import cfd_pkg::*;
#(
  parameter int unsigned SEG = SEG_DIGITS
) (
  input  dig2_t [SEG-1:0] dig,    // segment digits, 0..2 each
  input  logic            cin,    // carry from the segment below
  output logic  [SEG-1:0] bits,   // adjusted segment, one bit per digit
  output logic            cout    // carry into the segment above
);

  localparam int unsigned ENTRIES = 1 << (2 * SEG);

  typedef logic [SEG:0] entry_t;

  function automatic logic [ENTRIES-1:0][SEG:0] build_table();
    logic [ENTRIES-1:0][SEG:0] t;
    for (int a = 0; a < ENTRIES; a++) begin
      int unsigned v;
      v = 0;
      for (int i = 0; i < SEG; i++) v += ((a >> (2 * i)) & 3) << i;
      t[a] = entry_t'(v);
    end
    return t;
  endfunction

  localparam logic [ENTRIES-1:0][SEG:0] TABLE = build_table();

  entry_t       first;    // pass-1 result: carry bit and four low bits
  logic [SEG:0] second;   // pass-2 sum of low bits and incoming carry

  always_comb begin
    first  = TABLE[dig];
    second = {1'b0, first[SEG-1:0]} + {{SEG{1'b0}}, cin};
    bits   = second[SEG-1:0];
    cout   = first[SEG] | second[SEG];
  end

endmodule
