// Error-compensation bias of the fixed-width radix-4 Booth multiplier.
//
// The L-1 least significant columns of the partial product array (LP) are not
// added into the result. Their carry into the kept part (MP) is replaced by
//   sigma = CE[ S_exact + CA[S_minor] ]
// S_exact is the exact value of the top W_COL LP columns. With W_COL = 1 that
// is the single LPmajor column (weight 2^(L-2)) and S_exact is the number of
// ones in it. S_minor is everything below those columns. It is not looked at:
// its carry CA is estimated from the Booth nonzero flags of the rows that
// reach it. A nonzero row whose multiplicand bits are uniformly random puts,
// on average, exactly half a unit of the lowest exact column into the minor
// part, so CA = k/2 with k the number of such nonzero rows.
// CE rounds the total to the MP least significant bit:
//   sigma = floor((2*S_exact + k + 2^W_COL) / 2^(W_COL+1))
// For W_COL = 1 this equals floor((S_LPmajor + floor(k/2) + 1) / 2).
// The form sigma = CE[exact part + CA[minor part]] and the option of adding
// more columns exactly to trade area for accuracy follow the document; the
// estimate k/2 and the rounding constant are this design's own.
// Purely combinational.
module comp_bias #(
  parameter  int L     = 8,                      // operand width (even, >= 4)
  parameter  int W_COL = 1,                      // LP columns added exactly (1 .. L-2)
  localparam int R     = (L - 2 - W_COL) / 2 + 1,  // rows reaching the minor part
  localparam int EW    = W_COL + $clog2(L) + 1,  // width of S_exact
  localparam int SW    = $clog2(L) + 1           // width of sigma
) (
  input  logic [EW-1:0] s_exact,   // exact LP columns, in units of the lowest one
  input  logic [R-1:0]  nz_minor,  // nonzero flags of rows 0 .. R-1
  output logic [SW-1:0] sigma      // bias added at the MP least significant bit
);

  logic [EW+1:0] k_nz;   // nonzero rows reaching the minor part
  logic [EW+1:0] total;  // 2*S_exact + k + rounding constant

  always_comb begin
    k_nz = '0;
    for (int i = 0; i < R; i++) k_nz += (EW+2)'(nz_minor[i]);
    total = ((EW+2)'(s_exact) << 1) + k_nz + ((EW+2)'(1) << W_COL);
    sigma = SW'(total >> (W_COL + 1));
  end

endmodule
