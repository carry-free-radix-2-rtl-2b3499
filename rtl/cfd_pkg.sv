// cfd_pkg: types and constants shared by the carry-free radix-2 divider.
//
// The divider keeps its partial remainder as a signed-bit number: every digit
// is -1, 0 or +1 and is stored as a bit of a "positive part" and a bit of a
// "negative part" (value = positive - negative). Between the add/subtract
// stage and the digit adjustment each part temporarily holds digits 0..2, kept
// as two bits per digit (the type dig2_t below).
//
// Quotient digits are signed bits as well and are carried between blocks as
// the enum qdigit_e, whose encoding is the two's complement of the digit.
package cfd_pkg;

  // Digits per digit-adjustment segment (four in the divider as described).
  localparam int unsigned SEG_DIGITS = 4;

  // One digit, 0..2, of a positive or negative part before digit adjustment.
  typedef logic [1:0] dig2_t;

  // A signed quotient digit, which is also the operation of the next step:
  // +1 subtract the divisor, 0 only shift, -1 add the divisor.
  typedef enum logic [1:0] {
    Q_ZERO = 2'b00,
    Q_POS  = 2'b01,
    Q_NEG  = 2'b11
  } qdigit_e;

  // Number of digits of the remainder word for an N-bit divider: N+1
  // fraction digits (N-1 operand fraction bits plus two for the 0.75
  // prescaling), three digits at weights 1, 2 and 4, rounded up to whole
  // segments.
  function automatic int unsigned rem_digits(int unsigned n);
    return ((n + 4 + SEG_DIGITS - 1) / SEG_DIGITS) * SEG_DIGITS;
  endfunction

endpackage
