// End-to-end testbench for fwbm_top at its default size (L = 8).
//
// Drives both multipliers with every operand pair. The full-width product is
// compared with the integer product. The fixed-width product is checked
// against the true product: its error must stay within one output LSB, and
// its mean absolute error must lie below that of dropping the low columns
// without a bias. Mechanisms counted, each must occur at least once:
//   Booth digits -2, -1, 0, +1, +2; sigma = 0, 1, 2, 3; a nonzero estimate of
//   the LPminor carry (two or more nonzero low digits); radix-2 steps that add,
//   subtract and pass; an add/subtract that overflows the accumulator
//   (multiplicand = -2^(L-1)); the wrapping pair x = y = -2^(L-1).
module fwbm_top_tb;
  localparam int L   = 8;
  localparam int LSB = 1 << (L - 1);

  logic [L-1:0]         fw_x, fw_y, fw_pq;
  logic [$clog2(L):0]   fw_sigma;
  logic [L-1:0]         bm_mr, bm_md;
  logic [2*L-1:0]       bm_product;
  int checks = 0, failures = 0;

  fwbm_top dut (
    .fw_x(fw_x), .fw_y(fw_y), .fw_pq(fw_pq), .fw_sigma(fw_sigma),
    .bm_multiplier(bm_mr), .bm_multiplicand(bm_md),
    .bm_product(bm_product)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // counters start at zero here, not in the stimulus block
  int  digit_seen [5] = '{default: 0};  // index digit + 2
  int  sigma_seen [2*L] = '{default: 0};
  int  ca_nonzero = 0, step_add = 0, step_sub = 0, step_pass = 0, step_ovf = 0, wraps = 0;
  real sum_err = 0.0, sum_mp = 0.0;
  int  npairs = 0;

  // Booth digits of y, from the operand itself
  function automatic int booth_digit(logic [L-1:0] y, int i);
    logic [L:0] ye = {y, 1'b0};
    return -2 * int'(ye[2*i+2]) + int'(ye[2*i+1]) + int'(ye[2*i]);
  endfunction

  initial begin
    int p, got, err, k;

    for (int a = -LSB; a < LSB; a++)
      for (int b = -LSB; b < LSB; b++) begin
        fw_x = L'(a); fw_y = L'(b); bm_md = L'(a); bm_mr = L'(b);
        #1;
        p = a * b;

        // full-width multiplier
        checks++;
        if ($signed(bm_product) != (2*L)'(p)) begin
          failures++;
          if (failures < 10) $display("FAIL full %0d * %0d = %0d", b, a, $signed(bm_product));
        end
        // radix-2 step kinds, worked out from the multiplier bits
        for (int s = 0; s < L; s++) begin
          logic qb, qp;
          qb = bm_mr[s];
          qp = (s == 0) ? 1'b0 : bm_mr[s-1];
          if (qb == qp) step_pass++;
          else begin
            if (qb) step_sub++; else step_add++;
            if (a == -LSB) step_ovf++;  // -(-2^(L-1)) or acc + (-2^(L-1)) needs L+1 bits
          end
        end

        // fixed-width multiplier
        k = 0;
        for (int i = 0; i < L / 2; i++) begin
          digit_seen[booth_digit(fw_y, i) + 2]++;
          if (i <= L / 2 - 2 && booth_digit(fw_y, i) != 0) k++;
        end
        if (k >= 2) ca_nonzero++;
        sigma_seen[int'(fw_sigma)]++;
        if (a == -LSB && b == -LSB) begin
          wraps++;
          checks++;
          if (fw_pq != L'(p / LSB)) begin
            failures++;
            $display("FAIL wrap case gave %b", fw_pq);
          end
        end else begin
          got = int'($signed(fw_pq));
          err = p - got * LSB;
          if (err < 0) err = -err;
          checks++;
          if (err > LSB) begin
            failures++;
            if (failures < 10) $display("FAIL fixed %0d * %0d -> %0d (error %0d)", a, b, got, err);
          end
          sum_err += real'(err) / LSB;
          err = p - (p >>> (L - 1)) * LSB;  // exact product, truncated
          sum_mp += real'(err) / LSB;
          npairs++;
        end
      end

    $display("fixed-width L=%0d: mean |error| %f LSB, exact product truncated %f LSB",
             L, sum_err / npairs, sum_mp / npairs);
    checks++;
    if (!(sum_err < sum_mp)) begin
      failures++;
      $display("FAIL compensation is not better than truncation");
    end

    for (int d = 0; d < 5; d++) begin
      $display("booth digit %0d: %0d", d - 2, digit_seen[d]);
      checks++; if (digit_seen[d] == 0) failures++;
    end
    for (int s = 0; s < 4; s++) begin
      $display("sigma = %0d: %0d", s, sigma_seen[s]);
      checks++; if (sigma_seen[s] == 0) failures++;
    end
    $display("LPminor carry estimate nonzero: %0d", ca_nonzero);
    $display("radix-2 steps add %0d, subtract %0d, pass %0d, accumulator overflow %0d",
             step_add, step_sub, step_pass, step_ovf);
    $display("wrapping operand pair: %0d", wraps);
    checks++; if (ca_nonzero == 0) failures++;
    checks++; if (step_add == 0) failures++;
    checks++; if (step_sub == 0) failures++;
    checks++; if (step_pass == 0) failures++;
    checks++; if (step_ovf == 0) failures++;
    checks++; if (wraps == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
