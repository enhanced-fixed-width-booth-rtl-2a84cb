// Top level: the two Booth multipliers of this design side by side.
//
//  * fw_booth_mult  - L x L signed fixed-width radix-4 Booth multiplier. It
//    keeps only the L most significant product bits and replaces the dropped
//    columns by the error-compensation bias sigma; W_COL sets how many of the
//    dropped columns still enter sigma exactly (accuracy against area).
//  * booth_multiplier - L x L signed radix-2 Booth array multiplier with the
//    full 2L-bit product, built from a chain of add/subtract-and-shift steps.
// Each has its own operand and result ports; they share only the width L.
// Everything is combinational: results follow the operands after one
// propagation delay, with no clock, reset or handshake.
module fwbm_top #(
  parameter  int L     = 8,             // operand width of both multipliers (even, >= 4)
  parameter  int W_COL = 1,             // fixed-width multiplier: LP columns added exactly
  localparam int SW    = $clog2(L) + 1
) (
  // fixed-width compensated radix-4 Booth multiplier
  input  logic [L-1:0]   fw_x,
  input  logic [L-1:0]   fw_y,
  output logic [L-1:0]   fw_pq,      // ~ (fw_x * fw_y) / 2^(L-1), rounded
  output logic [SW-1:0]  fw_sigma,   // compensation bias used
  // full-width radix-2 Booth array multiplier
  input  logic [L-1:0]   bm_multiplier,
  input  logic [L-1:0]   bm_multiplicand,
  output logic [2*L-1:0] bm_product
);

  fw_booth_mult #(.L(L), .W_COL(W_COL)) u_fw (
    .x     (fw_x),
    .y     (fw_y),
    .pq    (fw_pq),
    .sigma (fw_sigma)
  );

  booth_multiplier #(.N(L)) u_bm (
    .multiplier   (bm_multiplier),
    .multiplicand (bm_multiplicand),
    .product      (bm_product),
    .qout         ()              // equals the multiplier's sign bit; not brought out
  );

endmodule
