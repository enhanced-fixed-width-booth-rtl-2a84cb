// One step of the radix-2 Booth array multiplier.
//
// The step looks at the pair {Q[0], q0} (current multiplier bit and the bit
// shifted out by the previous step):
//   01 -> acc + multiplicand    10 -> acc - multiplicand    00, 11 -> acc
// and then shifts {acc, Q, q0} right by one place, arithmetically:
//   next_acc = {sign, r[N-1:1]},  next_Q = {r[0], Q[N-1:1]},  q0_next = Q[0]
// where r is the N-bit result and sign is the sign of its true (N+1)-bit
// value. Using the true sign, not r[N-1], keeps the product right when
// acc -/+ multiplicand overflows N bits (multiplicand = -2^(N-1)); the
// document shows only N-bit accumulators, so that refinement is this design's.
// Combinational; N of these chained make booth_multiplier.
module booth_substep #(
  parameter int N = 8
) (
  input  logic [N-1:0] acc,
  input  logic [N-1:0] Q,
  input  logic         q0,
  input  logic [N-1:0] multiplicand,
  output logic [N-1:0] next_acc,
  output logic [N-1:0] next_Q,
  output logic         q0_next
);

  logic [N-1:0] as_sum;
  logic         as_cout;
  logic         do_op;    // add or subtract this step
  logic [N-1:0] r;
  logic         r_sign;

  add_sub #(.N(N)) u_as (
    .a    (acc),
    .b    (multiplicand),
    .sub  (Q[0]),          // 10 subtracts, 01 adds
    .s    (as_sum),
    .cout (as_cout)
  );

  always_comb begin
    do_op  = Q[0] ^ q0;
    r      = do_op ? as_sum : acc;
    // sign of the (N+1)-bit sum acc + (multiplicand ^ sub) + sub
    r_sign = do_op ? (acc[N-1] ^ (multiplicand[N-1] ^ Q[0]) ^ as_cout) : acc[N-1];
    next_acc = {r_sign, r[N-1:1]};
    next_Q   = {r[0], Q[N-1:1]};
    q0_next  = Q[0];
  end

endmodule
