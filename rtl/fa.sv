// One-bit full adder: s = a ^ b ^ cin, cout = majority(a, b, cin).
// The cell of the ripple-carry chain inside add_sub. Combinational.
module fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));

endmodule
