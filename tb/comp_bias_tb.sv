// Self-checking testbench for comp_bias at L = 8 with one exact column
// (W_COL = 1, the LPmajor column) and with two (W_COL = 2).
// W_COL = 1: every LPmajor count 0..5 and every set of the three nonzero
// flags; expected sigma = floor((S + floor(k/2) + 1) / 2), S the count and k
// the number of set flags, i.e. the LPmajor bits rounded after adding half a
// unit per nonzero low row.
// W_COL = 2: every exact-column value 0..20 and both nonzero flags; expected
// sigma = round-half-up((S + k/2) / 4) with S in units of the lower column.
module comp_bias_tb;
  localparam int L = 8;
  logic [4:0] s1;     // EW = 1 + 3 + 1
  logic [2:0] nz1;    // R = 3
  logic [3:0] sig1;
  logic [5:0] s2;     // EW = 2 + 3 + 1
  logic [1:0] nz2;    // R = 2
  logic [3:0] sig2;
  int checks = 0, failures = 0;

  comp_bias #(.L(L), .W_COL(1)) dut1 (.s_exact(s1), .nz_minor(nz1), .sigma(sig1));
  comp_bias #(.L(L), .W_COL(2)) dut2 (.s_exact(s2), .nz_minor(nz2), .sigma(sig2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, e;
    real v;
    s2 = '0; nz2 = '0;
    for (int s = 0; s <= 5; s++) begin
      for (int b = 0; b < 8; b++) begin
        s1 = 5'(s); nz1 = 3'(b);
        k = $countones(nz1);
        e = (s + k / 2 + 1) / 2;
        #1;
        checks++;
        if (int'(sig1) != e) begin
          failures++;
          $display("FAIL W_COL=1 S=%0d nz=%b -> sigma=%0d expected %0d", s, nz1, sig1, e);
        end
      end
    end
    for (int s = 0; s <= 20; s++) begin
      for (int b = 0; b < 4; b++) begin
        s2 = 6'(s); nz2 = 2'(b);
        k = $countones(nz2);
        v = (real'(s) + real'(k) / 2.0) / 4.0;
        e = int'($floor(v + 0.5));
        #1;
        checks++;
        if (int'(sig2) != e) begin
          failures++;
          $display("FAIL W_COL=2 S=%0d nz=%b -> sigma=%0d expected %0d", s, nz2, sig2, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
