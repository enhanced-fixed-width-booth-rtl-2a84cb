// 4-2 compressor cell.
//
// Adds four bits of one column and a carry-in from the cell to its right:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// built from two full adders: the first adds x1..x3 and sends its carry
// sideways as cout (it does not depend on cin, so there is no ripple
// through a row of these cells); the second adds the first sum, x4 and cin.
// The cell type is the one the partial product array is drawn with; the
// two-full-adder construction is this design's choice. Combinational.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,    // cout of the cell one column to the right
  output logic sum,    // weight 1
  output logic carry,  // weight 2
  output logic cout    // weight 2, to cin of the cell one column to the left
);

  logic s1;

  fa u_fa1 (.a(x1), .b(x2),  .cin(x3),  .s(s1),  .cout(cout));
  fa u_fa2 (.a(s1), .b(x4),  .cin(cin), .s(sum), .cout(carry));

endmodule
