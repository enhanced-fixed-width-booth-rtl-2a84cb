// Shared types for the Booth multipliers.
//
// booth_digit_t is the output of one radix-4 Booth encoder: the digit
// y_i in {-2,-1,0,+1,+2} is carried as a sign flag and two one-hot magnitude
// flags, plus the nonzero flag nz_i that the error-compensation circuit uses.
// The field set (neg/one/two/nz) is this design's own encoding of the digit.
package fwbm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative (-1 or -2); forced low for a zero digit
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
    logic nz;   // digit is nonzero
  } booth_digit_t;

endpackage
