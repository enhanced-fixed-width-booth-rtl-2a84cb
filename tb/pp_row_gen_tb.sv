// Self-checking testbench for pp_row_gen (L = 8): every multiplicand and every
// Booth digit; signed(p) + n must equal digit * x, a zero digit must give an
// all-zero row, and n must be set exactly for negative digits.
module pp_row_gen_tb;
  import fwbm_pkg::*;
  localparam int L = 8;
  logic [L-1:0] x;
  booth_digit_t d;
  logic [L:0]   p;
  logic         n;
  int checks = 0, failures = 0;

  pp_row_gen #(.L(L)) dut (.x(x), .digit(d), .p(p), .n(n));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv, got;
    for (int xv = -128; xv < 128; xv++)
      for (dv = -2; dv <= 2; dv++) begin
        x = 8'(xv);
        d.neg = dv < 0; d.one = (dv == 1 || dv == -1); d.two = (dv == 2 || dv == -2);
        d.nz  = dv != 0;
        #1;
        got = int'($signed(p)) + int'(n);
        checks++;
        if (got != dv * xv || n != (dv < 0) || (dv == 0 && p != '0)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d digit=%0d -> p=%b n=%b", xv, dv, p, n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
