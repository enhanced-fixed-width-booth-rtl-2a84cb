// Full-width radix-2 Booth array multiplier.
//
// product = multiplier * multiplicand, all two's complement, product 2N bits.
// N booth_substep stages are chained with no registers: stage k takes the
// accumulator acc[k], the shifting multiplier register Q[k] and the extra bit
// q0[k] and hands the shifted values to stage k+1. Stage 0 starts from
// acc = 0, Q = multiplier, q0 = 0. After N steps the accumulator holds the
// upper half and Q the lower half of the product; q0[N] (qout) is unused.
// The structure (a chain of booth sub-modules, each with an adder/subtractor,
// and the signal names acc, Q, q0, qout) follows the design's schematics and
// simulation; acc and Q here carry one more index than there so that index 0
// is the input of the first stage.
// Combinational: the product is valid one ripple delay after the inputs.
module booth_multiplier #(
  parameter int N = 8  // operand width
) (
  input  logic [N-1:0]   multiplier,
  input  logic [N-1:0]   multiplicand,
  output logic [2*N-1:0] product,
  output logic           qout   // bit shifted out by the last step
);

  logic [N-1:0] acc [N+1];
  logic [N-1:0] Q   [N+1];
  logic         q0  [N+1];

  assign acc[0] = '0;
  assign Q[0]   = multiplier;
  assign q0[0]  = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_step
    booth_substep #(.N(N)) u_step (
      .acc          (acc[k]),
      .Q            (Q[k]),
      .q0           (q0[k]),
      .multiplicand (multiplicand),
      .next_acc     (acc[k+1]),
      .next_Q       (Q[k+1]),
      .q0_next      (q0[k+1])
    );
  end

  assign product = {acc[N], Q[N]};
  assign qout    = q0[N];

endmodule
