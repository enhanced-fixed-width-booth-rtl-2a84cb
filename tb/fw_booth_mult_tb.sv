// Self-checking testbench for fw_booth_mult: L = 8 with W_COL = 1, 2, 3 and
// L = 4 with W_COL = 1, 2, every pair of operands.
//
// The expected fixed-width product is worked out here with integer
// arithmetic: Booth digits d_i = -2*y[2i+1] + y[2i] + y[2i-1]; row i is d_i*x
// for d_i >= 0 and the (L+1)-bit one's complement of |d_i|*x (plus n_i = 1)
// for d_i < 0; MP is the sum of the rows, 4^i apart, with every bit below
// 2^(L-1) cleared; the W_COL columns below MP are summed exactly (S), the
// nonzero rows reaching further down are counted (k), and
// sigma = floor((2S + k + 2^W_COL) / 2^(W_COL+1)).
// It also checks that the error against the true product never exceeds one
// output LSB, that the bias improves on MP alone, and that more exact
// columns never make the mean error worse. It prints the mean absolute error
// in output LSBs next to MP alone and to rounding the full product.
module fw_booth_mult_tb;
  logic [7:0] x8, y8;
  logic [7:0] pq8 [3];
  logic [3:0] s8  [3];
  logic [3:0] x4, y4;
  logic [3:0] pq4 [2];
  logic [2:0] s4  [2];
  int checks = 0, failures = 0;

  fw_booth_mult #(.L(8), .W_COL(1)) dut8_1 (.x(x8), .y(y8), .pq(pq8[0]), .sigma(s8[0]));
  fw_booth_mult #(.L(8), .W_COL(2)) dut8_2 (.x(x8), .y(y8), .pq(pq8[1]), .sigma(s8[1]));
  fw_booth_mult #(.L(8), .W_COL(3)) dut8_3 (.x(x8), .y(y8), .pq(pq8[2]), .sigma(s8[2]));
  fw_booth_mult #(.L(4), .W_COL(1)) dut4_1 (.x(x4), .y(y4), .pq(pq4[0]), .sigma(s4[0]));
  fw_booth_mult #(.L(4), .W_COL(2)) dut4_2 (.x(x4), .y(y4), .pq(pq4[1]), .sigma(s4[1]));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output for operands xv, yv of width l with w exact LP columns;
  // also returns the MP value
  function automatic int ref_pq(int l, int w, int xv, int yv, output int mp);
    int q = l / 2;
    int low = l - 1 - w;  // weight of the lowest exact LP column
    int sx = 0, k = 0, sig;
    int ybits;
    mp = 0;
    ybits = (yv & ((1 << l) - 1)) << 1;  // y_{-1} = 0 in bit 0
    for (int i = 0; i < q; i++) begin
      int trip = (ybits >> (2 * i)) & 7;
      int d = -2 * ((trip >> 2) & 1) + ((trip >> 1) & 1) + (trip & 1);
      int mag = (d < 0 ? -d : d) * xv;                 // |d| * x
      int row;                                          // row bits, l+1 wide
      int rowsigned;
      if (d < 0) row = (~mag) & ((1 << (l + 1)) - 1);
      else       row = mag & ((1 << (l + 1)) - 1);
      rowsigned = row >= (1 << l) ? row - (1 << (l + 1)) : row;
      mp += (rowsigned * (1 << (2 * i))) & ~((1 << (l - 1)) - 1);
      sx += ((rowsigned * (1 << (2 * i))) >>> low) & ((1 << w) - 1);
      if (d < 0 && 2 * i >= low) sx += 1 << (2 * i - low);   // n_i in an exact column
      if (2 * i <= l - 2 - w && d != 0) k += 1;              // row reaches below them
    end
    sig = (2 * sx + k + (1 << w)) >> (w + 1);
    return ((mp + sig * (1 << (l - 1))) >>> (l - 1)) & ((1 << l) - 1);
  endfunction

  // exact comparison of every instance of width l with the reference
  task automatic sweep(int l);
    int mp, e, got;
    int nw = (l == 8) ? 3 : 2;
    for (int xv = -(1 << (l - 1)); xv < (1 << (l - 1)); xv++)
      for (int yv = -(1 << (l - 1)); yv < (1 << (l - 1)); yv++) begin
        if (l == 8) begin x8 = 8'(xv); y8 = 8'(yv); end
        else        begin x4 = 4'(xv); y4 = 4'(yv); end
        #1;
        for (int w = 1; w <= nw; w++) begin
          got = (l == 8) ? int'(pq8[w-1]) : int'(pq4[w-1]);
          e = ref_pq(l, w, xv, yv, mp);
          checks++;
          if (got != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL L=%0d W_COL=%0d %0d*%0d -> %0d expected %0d", l, w, xv, yv, got, e);
          end
        end
      end
  endtask

  // error statistics of the (checked) reference against the true product,
  // in output LSBs; the wrapping pair x = y = -2^(L-1) is left out
  function automatic void stats(int l, int w, output real mae, output real maxe,
                                output real mae_mp, output real mae_round, output int worst);
    int mp, e, p, err, lsb, n;
    lsb = 1 << (l - 1);
    mae = 0; maxe = 0; mae_mp = 0; mae_round = 0; worst = 0; n = 0;
    for (int xv = -(1 << (l - 1)); xv < (1 << (l - 1)); xv++)
      for (int yv = -(1 << (l - 1)); yv < (1 << (l - 1)); yv++) begin
        if (xv == -(1 << (l - 1)) && yv == xv) continue;
        e = ref_pq(l, w, xv, yv, mp);
        e = e >= (1 << (l - 1)) ? e - (1 << l) : e;
        p = xv * yv;
        err = p - e * lsb;
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        mae += real'(err) / lsb;
        err = p - mp;                                      // MP alone, no bias
        mae_mp += real'(err < 0 ? -err : err) / lsb;
        err = p - ((p + lsb / 2) >>> (l - 1)) * lsb;       // rounded full product
        mae_round += real'(err < 0 ? -err : err) / lsb;
        n++;
      end
    mae /= n; mae_mp /= n; mae_round /= n;
    maxe = real'(worst) / lsb;
  endfunction

  task automatic report(int l, int nw);
    real mae, maxe, mae_mp, mae_round, prev;
    int  worst;
    prev = 1.0e9;
    for (int w = 1; w <= nw; w++) begin
      stats(l, w, mae, maxe, mae_mp, mae_round, worst);
      $display("L=%0d W_COL=%0d mean |error| = %f LSB, max = %f LSB (MP without bias: %f, rounded full product: %f)",
               l, w, mae, maxe, mae_mp, mae_round);
      checks++;
      if (worst > (1 << (l - 1))) begin
        failures++;
        $display("FAIL L=%0d W_COL=%0d worst error above one LSB", l, w);
      end
      checks++;
      if (!(mae < mae_mp)) begin
        failures++;
        $display("FAIL L=%0d W_COL=%0d compensation does not improve on MP alone", l, w);
      end
      checks++;
      if (mae > prev + 1.0e-9) begin
        failures++;
        $display("FAIL L=%0d W_COL=%0d more exact columns made the error worse", l, w);
      end
      prev = mae;
    end
  endtask

  initial begin
    sweep(8);
    sweep(4);
    report(8, 3);
    report(4, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
