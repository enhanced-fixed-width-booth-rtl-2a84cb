// Self-checking testbench for add_sub (N = 8): every a, b and both values of
// sub, compared with the integer sum a + (b or ~b) + sub.
module add_sub_tb;
  localparam int N = 8;
  logic [N-1:0] a, b, s;
  logic         sub, cout;
  int checks = 0, failures = 0;

  add_sub #(.N(N)) dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int sv = 0; sv < 2; sv++)
      for (int av = 0; av < 256; av++)
        for (int bv = 0; bv < 256; bv++) begin
          a = 8'(av); b = 8'(bv); sub = 1'(sv);
          #1;
          expv = sv ? av + (255 - bv) + 1 : av + bv;
          checks++;
          if ({cout, s} != 9'(expv)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d sub=%0d -> %0d, expected %0d", av, bv, sv, {cout, s}, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
