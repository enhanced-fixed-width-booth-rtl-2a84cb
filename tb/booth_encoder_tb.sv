// Self-checking testbench for booth_encoder: the eight codes of the radix-4
// Booth encoding table, digit value and nonzero flag.
module booth_encoder_tb;
  import fwbm_pkg::*;
  logic [2:0]   y;
  booth_digit_t d;
  int checks = 0, failures = 0;

  booth_encoder dut (.y_trip(y), .digit(d));

  // expected digit for codes 000 .. 111
  int exp_digit [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    for (int c = 0; c < 8; c++) begin
      y = 3'(c);
      #1;
      got = (d.neg ? -1 : 1) * (d.two ? 2 : (d.one ? 1 : 0));
      checks++;
      if (got != exp_digit[c] || d.nz != (exp_digit[c] != 0) || (d.one & d.two) ||
          (d.neg & !d.nz)) begin
        failures++;
        $display("FAIL code %b -> neg=%b one=%b two=%b nz=%b", y, d.neg, d.one, d.two, d.nz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
