// Self-checking testbench for compressor42: all 32 input combinations must
// satisfy x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout), and cout must not
// depend on cin (checked by comparing the two cin values).
module compressor42_tb;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                    .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(v); cin = 1'(c);
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + c !=
            int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL in=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b", x1, x2, x3, x4, cin, sum, carry, cout);
        end
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for %b%b%b%b", x1, x2, x3, x4);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
