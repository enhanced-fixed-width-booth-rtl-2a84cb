// One row of 4-2 compressors: reduces four W-bit words to two.
//
//   a + b + c + d = s + cy   (mod 2^W)
// Cell k compresses bit k of the four words; its cout feeds cell k+1 as
// cin, its carry becomes bit k+1 of cy. The cout of the top cell and its
// carry fall outside the W-bit window and are dropped, which keeps the
// identity exact modulo 2^W (two's complement wrap). Combinational.
module csa42_row #(
  parameter int W = 9  // word width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W:0] side;   // cout -> cin between neighbouring cells
  logic [W:0] carry;  // carry of cell k lands at bit k+1

  assign side[0]  = 1'b0;
  assign carry[0] = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_cell
    compressor42 u_c42 (
      .x1    (a[k]),
      .x2    (b[k]),
      .x3    (c[k]),
      .x4    (d[k]),
      .cin   (side[k]),
      .sum   (s[k]),
      .carry (carry[k+1]),
      .cout  (side[k+1])
    );
  end

  assign cy = carry[W-1:0];

endmodule
