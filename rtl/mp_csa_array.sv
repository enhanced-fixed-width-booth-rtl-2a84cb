// Adder array for the kept (MP) part of the fixed-width Booth multiplier.
//
// Inputs are the Q = L/2 partial product rows p_{i,0..L} (row i shifted 2i
// columns) and the compensation bias sigma. Only bits of weight 2^(L-1) and
// above are used; they are held in L-bit words whose bit b has weight
// 2^(L-1+b). Output pq is the compensated product bits 2L-2 .. L-1.
//
// Sign extension is avoided the usual way: each row's sign bit p_{i,L} is
// inverted, and one constant word adds -sum_i 2^(L+2i), so that
//   p_{i,L} * (-2^(L+2i)) = (1 - p_{i,L}) * 2^(L+2i) - 2^(L+2i).
// The Q row words, the constant word and the sigma word are reduced by a
// chain of 4-2 compressor rows (csa42_row): the first row takes four words,
// each further row takes the two words left by the previous one plus two new
// words (a zero word pads an odd count). A carry-propagate adder adds the
// final two words. For L = 8 that is six words, two compressor rows and the
// adder. All arithmetic is modulo 2^L in these words, i.e. modulo 2^(2L-1)
// of the product, which is exact for the L output bits.
// The compressor rows, constant ones, inverted sign bits and final adder are
// the elements the array is drawn with; how the words are fed to the rows
// is this design's choice. Combinational.
module mp_csa_array #(
  parameter  int L  = 8,              // operand width (even, >= 4)
  parameter  int SW = $clog2(L) + 1,  // width of sigma
  localparam int Q  = L / 2,
  localparam int MW = L               // word width, weights 2^(L-1) .. 2^(2L-2)
) (
  input  logic [L:0]    prow [Q],  // partial product rows p_{i,0..L}
  input  logic [SW-1:0] sigma,     // bias at weight 2^(L-1)
  output logic [L-1:0]  pq         // product bits 2L-2 .. L-1
);

  localparam int NW  = Q + 2;              // rows, constant, sigma
  localparam int NLV = (NW - 1) / 2;       // compressor rows: ceil((NW-2)/2)
  localparam int NWP = 2 + 2 * NLV;        // word count after padding

  // -sum_i 2^(L+2i) modulo 2^(2L-1), in word coordinates (divided by 2^(L-1))
  function automatic logic [MW-1:0] sign_const();
    logic [2*L-1:0] c = '0;
    for (int i = 0; i < Q; i++) c -= (2*L)'(1) << (L + 2*i);
    return c[2*L-2 : L-1];
  endfunction

  logic [MW-1:0] word [NWP];
  logic [MW-1:0] ls   [NLV+1];  // running sum word after each compressor row
  logic [MW-1:0] lc   [NLV+1];  // running carry word after each compressor row
  logic [MW-1:0] total;

  // row i: bits of weight >= 2^(L-1), sign bit inverted
  for (genvar i = 0; i < Q; i++) begin : g_word
    always_comb begin
      word[i] = '0;
      for (int j = 0; j <= L; j++) begin
        if (2*i + j >= L - 1)
          word[i][2*i + j - (L - 1)] = (j == L) ? ~prow[i][j] : prow[i][j];
      end
    end
  end
  assign word[Q]     = sign_const();
  assign word[Q + 1] = MW'(sigma);
  for (genvar k = NW; k < NWP; k++) begin : g_pad
    assign word[k] = '0;
  end

  assign ls[0] = word[0];
  assign lc[0] = word[1];
  for (genvar v = 0; v < NLV; v++) begin : g_lvl
    csa42_row #(.W(MW)) u_row (
      .a  (ls[v]),
      .b  (lc[v]),
      .c  (word[2 + 2*v]),
      .d  (word[3 + 2*v]),
      .s  (ls[v+1]),
      .cy (lc[v+1])
    );
  end

  assign total = ls[NLV] + lc[NLV];  // carry-propagate adder
  assign pq    = total;

endmodule
