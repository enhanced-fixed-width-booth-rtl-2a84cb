// Self-checking testbench for booth_multiplier (N = 8).
// 1. The worked example of the design's simulation: multiplier 00110101,
//    multiplicand 01101101, product 0001011010010001, with the accumulator and
//    multiplier register values after every step as listed there.
// 2. Every pair of 8-bit operands against the integer product.
module booth_multiplier_tb;
  localparam int N = 8;
  logic [N-1:0]   mr, md;
  logic [2*N-1:0] product;
  logic           qout;
  int checks = 0, failures = 0;

  booth_multiplier #(.N(N)) dut (
    .multiplier(mr), .multiplicand(md), .product(product), .qout(qout)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accumulator after steps 1..7 and multiplier register after steps 1..7
  logic [7:0] ex_acc [7] = '{8'b11001001, 8'b00011011, 8'b11010111, 8'b00100010,
                             8'b11011010, 8'b11101101, 8'b00101101};
  logic [7:0] ex_q   [7] = '{8'b10011010, 8'b01001101, 8'b00100110, 8'b00010011,
                             8'b10001001, 8'b01000100, 8'b00100010};
  logic [7:1] ex_q0 = 7'b0110101;

  initial begin
    mr = 8'b00110101; md = 8'b01101101;
    #1;
    checks++;
    if (product != 16'b0001011010010001) begin
      failures++;
      $display("FAIL example product %b", product);
    end
    for (int k = 1; k <= 7; k++) begin
      checks++;
      if (dut.acc[k] != ex_acc[k-1] || dut.Q[k] != ex_q[k-1] || dut.q0[k] != ex_q0[k]) begin
        failures++;
        $display("FAIL example step %0d acc=%b Q=%b q0=%b", k, dut.acc[k], dut.Q[k], dut.q0[k]);
      end
    end
    checks++;
    if (qout != 1'b0) begin
      failures++;
      $display("FAIL example qout=%b", qout);
    end

    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        mr = 8'(a); md = 8'(b);
        #1;
        checks++;
        if ($signed(product) != 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, $signed(product));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
