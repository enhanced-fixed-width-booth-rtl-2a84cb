// Self-checking testbench for csa42_row at W = 9: random and corner words,
// s + cy must equal a + b + c + d modulo 2^W.
module csa42_row_tb;
  localparam int W = 9;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  csa42_row #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .s(s), .cy(cy));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (W'(s + cy) != W'(a + b + c + d)) begin
      failures++;
      if (failures < 10) $display("FAIL %h %h %h %h -> s=%h cy=%h", a, b, c, d, s, cy);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; d = '1;
    check_one();
    a = '0; b = '0; c = '0; d = '0;
    check_one();
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
