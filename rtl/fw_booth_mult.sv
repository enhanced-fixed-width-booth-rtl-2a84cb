// Fixed-width radix-4 Booth multiplier with error compensation.
//
// Multiplies two L-bit two's complement numbers x and y and returns only the
// L most significant bits of the (2L-1)-bit product, pq = P[2L-2:L-1], i.e.
// P / 2^(L-1) rounded, with the wrap of the single case x = y = -2^(L-1).
//
// y is radix-4 Booth encoded into Q = L/2 digits (booth_encoder), each digit
// selects a partial product row of L+1 bits plus a negation bit (pp_row_gen).
// Row i is shifted 2i columns. The array is split at weight 2^(L-1):
//   MP  columns of weight >= 2^(L-1)  - added exactly (with sign extension)
//   LP  columns of weight <  2^(L-1)  - not added
// The carry that LP would have sent into MP is replaced by the bias sigma
// from comp_bias. The top W_COL columns of LP are added exactly (by default
// one column, LPmajor, weight 2^(L-2), whose Q+1 bits are simply counted);
// the carry out of the columns below them is estimated from the Booth
// nonzero flags. The result is pq = (MP + sigma * 2^(L-1)) >> (L-1).
// Raising W_COL adds more exact columns: more area, smaller error.
//
// The MP part is added by mp_csa_array: inverted sign bits plus a constant
// instead of sign extension, rows of 4-2 compressors, one final adder.
// The MP/LP split, the LPmajor/LPminor split, the form of sigma and the
// compressor array follow the document; the exact-column sum is written
// as plain arithmetic, which is this design's own choice.
// Purely combinational: the result is valid one propagation delay after x, y.
module fw_booth_mult
  import fwbm_pkg::*;
#(
  parameter  int L     = 8,                        // operand and result width (even, >= 4)
  parameter  int W_COL = 1,                        // LP columns added exactly (1 .. L-2)
  localparam int Q     = L / 2,                    // Booth rows
  localparam int R     = (L - 2 - W_COL) / 2 + 1,  // rows reaching below the exact columns
  localparam int EW    = W_COL + $clog2(L) + 1,    // width of the exact column sum
  localparam int SW    = $clog2(L) + 1             // width of sigma
) (
  input  logic [L-1:0]  x,      // multiplicand, two's complement
  input  logic [L-1:0]  y,      // multiplier, two's complement
  output logic [L-1:0]  pq,     // fixed-width product
  output logic [SW-1:0] sigma   // compensation bias in use (for observation)
);

  if (L % 2 != 0 || L < 4) begin : g_bad_l
    $error("fw_booth_mult: L must be even and at least 4");
  end
  if (W_COL < 1 || W_COL > L - 2) begin : g_bad_w
    $error("fw_booth_mult: W_COL must lie in 1 .. L-2");
  end

  booth_digit_t       digit [Q];
  logic [L:0]         prow  [Q];
  logic [Q-1:0]       nrow;
  logic [L:0]         y_ext;
  logic [EW-1:0]      s_exact;
  logic [R-1:0]       nz_minor;

  assign y_ext = {y, 1'b0};  // y_{-1} = 0

  for (genvar i = 0; i < Q; i++) begin : g_row
    booth_encoder u_enc (
      .y_trip (y_ext[2*i+2 -: 3]),
      .digit  (digit[i])
    );
    pp_row_gen #(.L(L)) u_pp (
      .x     (x),
      .digit (digit[i]),
      .p     (prow[i]),
      .n     (nrow[i])
    );
  end

  // rows that reach below the exact columns: 2i <= L-2-W_COL
  for (genvar i = 0; i < R; i++) begin : g_nz
    assign nz_minor[i] = digit[i].nz;
  end

  comp_bias #(.L(L), .W_COL(W_COL)) u_bias (
    .s_exact  (s_exact),
    .nz_minor (nz_minor),
    .sigma    (sigma)
  );

  // Exact LP columns, weights 2^(L-1-W_COL) .. 2^(L-2), in units of the
  // lowest of them. With W_COL = 1 this is the LPmajor column: p_{i,L-2-2i}
  // of every row plus n_{Q-1}.
  localparam int LOW = L - 1 - W_COL;  // weight of the lowest exact column

  always_comb begin
    logic [2*L-1:0] part;
    s_exact = '0;
    for (int i = 0; i < Q; i++) begin
      part = ({{(L-1){prow[i][L]}}, prow[i]} << (2*i));
      s_exact += EW'(part[L-2:LOW]);
      if (2 * i >= LOW) s_exact += EW'(nrow[i]) << (2 * i - LOW);
    end
  end

  // MP: the kept columns, reduced by the 4-2 compressor array; sigma enters
  // as one more word at the MP least significant column.
  mp_csa_array #(.L(L), .SW(SW)) u_mp (
    .prow  (prow),
    .sigma (sigma),
    .pq    (pq)
  );

endmodule
