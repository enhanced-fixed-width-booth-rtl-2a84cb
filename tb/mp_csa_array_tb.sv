// Self-checking testbench for mp_csa_array at L = 8 (six words, two
// compressor rows) and L = 4 (four words, one row). Random rows and bias; the
// expected output is worked out with integer arithmetic: every row taken as
// an (L+1)-bit signed number shifted 2i places, bits below 2^(L-1) cleared,
// summed, plus sigma * 2^(L-1), then bits 2L-2 .. L-1.
module mp_csa_array_tb;
  logic [8:0] r8 [4];
  logic [3:0] s8;
  logic [7:0] pq8;
  logic [4:0] r4 [2];
  logic [2:0] s4;
  logic [3:0] pq4;
  int checks = 0, failures = 0;

  mp_csa_array #(.L(8)) dut8 (.prow(r8), .sigma(s8), .pq(pq8));
  mp_csa_array #(.L(4)) dut4 (.prow(r4), .sigma(s4), .pq(pq4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output for width l; rows given as integers of l+1 bits
  function automatic int expect_pq(int l, int rows [4], int sig);
    int mp = 0;
    for (int i = 0; i < l / 2; i++) begin
      int v = rows[i] >= (1 << l) ? rows[i] - (1 << (l + 1)) : rows[i];
      mp += (v * (1 << (2 * i))) & ~((1 << (l - 1)) - 1);
    end
    return ((mp + sig * (1 << (l - 1))) >>> (l - 1)) & ((1 << l) - 1);
  endfunction

  initial begin
    int rows [4];
    int e;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < 4; i++) begin
        rows[i] = int'($urandom_range(0, 511));
        r8[i] = 9'(rows[i]);
      end
      s8 = 4'($urandom_range(0, 7));
      #1;
      e = expect_pq(8, rows, int'(s8));
      checks++;
      if (int'(pq8) != e) begin
        failures++;
        if (failures < 10) $display("FAIL L=8 rows %h %h %h %h sigma %0d -> %h expected %h",
                                    r8[0], r8[1], r8[2], r8[3], s8, pq8, e);
      end
      for (int i = 0; i < 2; i++) begin
        rows[i] = int'($urandom_range(0, 31));
        r4[i] = 5'(rows[i]);
      end
      s4 = 3'($urandom_range(0, 3));
      #1;
      e = expect_pq(4, rows, int'(s4));
      checks++;
      if (int'(pq4) != e) begin
        failures++;
        if (failures < 10) $display("FAIL L=4 rows %h %h sigma %0d -> %h expected %h",
                                    r4[0], r4[1], s4, pq4, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
