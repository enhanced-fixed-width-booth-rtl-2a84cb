// Self-checking testbench for booth_substep (N = 8). Random and corner
// accumulators, multiplier registers and multiplicands; the expected result is
// the integer Booth step: acc + d*M with d = q0 - Q[0], then an arithmetic
// shift of the (N+1)-bit value together with Q.
module booth_substep_tb;
  localparam int N = 8;
  logic [N-1:0] acc, Q, M, nacc, nQ;
  logic         q0, nq0;
  int checks = 0, failures = 0;

  booth_substep #(.N(N)) dut (
    .acc(acc), .Q(Q), .q0(q0), .multiplicand(M),
    .next_acc(nacc), .next_Q(nQ), .q0_next(nq0)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int d, r;
    logic [N:0]     r9;
    logic [2*N:0]   cat;
    d = int'(q0) - int'(Q[0]);
    r = int'($signed(acc)) + d * int'($signed(M));
    r9 = (N+1)'(r);
    cat = {r9, Q} >> 1;
    cat[2*N] = r9[N];
    #1;
    checks++;
    if (nacc != cat[2*N-1:N] || nQ != cat[N-1:0] || nq0 != Q[0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL acc=%h Q=%h q0=%b M=%h -> %h %h %b expected %h %h %b",
                 acc, Q, q0, M, nacc, nQ, nq0, cat[2*N-1:N], cat[N-1:0], Q[0]);
    end
  endtask

  initial begin
    logic [N-1:0] corner [5] = '{8'h00, 8'h7f, 8'h80, 8'hff, 8'h01};
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        for (int k = 0; k < 4; k++) begin
          acc = corner[i]; M = corner[j]; Q = {7'h55, k[1]}; q0 = k[0];
          check_one();
        end
    for (int t = 0; t < 20000; t++) begin
      acc = N'($urandom); Q = N'($urandom); q0 = 1'($urandom); M = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
