// N-bit adder/subtractor of the radix-2 Booth array multiplier.
//
// s = a + b when sub = 0 and s = a - b when sub = 1. A row of N XOR gates
// inverts b when sub is set and sub enters the ripple-carry chain of N full
// adders (fa) as its carry-in, so a - b = a + ~b + 1. cout is the carry out of
// the top cell; together with the operand signs it gives the sign of the
// (N+1)-bit true result, which booth_substep needs.
// The XOR row plus adder structure follows the design's schematic; the ripple
// chain of full adders is the simplest adder for it. Combinational.
module add_sub #(
  parameter int N = 8  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,   // 1: a - b, 0: a + b
  output logic [N-1:0] s,
  output logic         cout   // carry out of bit N-1
);

  logic [N-1:0] bx;     // b, inverted when subtracting
  logic [N:0]   carry;

  assign bx       = b ^ {N{sub}};
  assign carry[0] = sub;

  for (genvar k = 0; k < N; k++) begin : g_cell
    fa u_fa (
      .a    (a[k]),
      .b    (bx[k]),
      .cin  (carry[k]),
      .s    (s[k]),
      .cout (carry[k+1])
    );
  end

  assign cout = carry[N];

endmodule
