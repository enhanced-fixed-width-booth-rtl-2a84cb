// Radix-4 (modified) Booth encoder for one digit.
//
// Takes three overlapping multiplier bits {y[2i+1], y[2i], y[2i-1]} and
// returns the Booth digit y_i = -2*y[2i+1] + y[2i] + y[2i-1] together with the
// nonzero flag nz_i, exactly as the encoding table of the fixed-width Booth
// multiplier lists them:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// The digit is given as sign / |1| / |2| flags (fwbm_pkg::booth_digit_t).
// For the two zero codes the sign flag is forced low, so a zero digit makes a
// partial product row of all zeros; that choice is this design's own.
// Purely combinational, no clock.
module booth_encoder
  import fwbm_pkg::*;
(
  input  logic [2:0]   y_trip,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_digit_t digit
);

  always_comb begin
    digit.one = y_trip[1] ^ y_trip[0];
    digit.two = ( y_trip[2] & ~y_trip[1] & ~y_trip[0]) |
                (~y_trip[2] &  y_trip[1] &  y_trip[0]);
    digit.nz  = digit.one | digit.two;
    digit.neg = y_trip[2] & digit.nz;
  end

endmodule
