// One partial product row of a radix-4 Booth multiplier.
//
// For an L-bit two's complement multiplicand x and a Booth digit y_i the row
// holds the L+1 bits p_{i,0} .. p_{i,L} and the negation bit n_i, so that
//   y_i * x = signed(p_{i,L..0}) + n_i
// (for a negative digit the row is the one's complement of |y_i|*x and n_i
// supplies the +1). This is the row layout of the partial product array of the
// fixed-width multiplier: row i sits 2i columns to the left of row 0 and its
// n_i sits under p_{i,0}.
// The bit equation p_{i,j} = (one & x_j | two & x_{j-1}) ^ neg, with x
// sign-extended by one bit and x_{-1} = 0, is the usual Booth selector; the
// document gives the row layout, the selector is this design's own.
// Purely combinational.
module pp_row_gen
  import fwbm_pkg::*;
#(
  parameter int L = 8  // operand width
) (
  input  logic [L-1:0] x,      // multiplicand
  input  booth_digit_t digit,  // Booth digit of this row
  output logic [L:0]   p,      // p_{i,0} .. p_{i,L}
  output logic         n       // n_i, added at the weight of p_{i,0}
);

  logic [L:0]   xe;  // multiplicand sign-extended to L+1 bits
  logic [L+1:0] xs;  // xe with x_{-1} = 0 below it

  always_comb begin
    xe = {x[L-1], x};
    xs = {xe, 1'b0};
    for (int j = 0; j <= L; j++) begin
      p[j] = ((digit.one & xs[j+1]) | (digit.two & xs[j])) ^ digit.neg;
    end
    n = digit.neg;
  end

endmodule
