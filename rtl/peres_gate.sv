// peres_gate: the 3x3 reversible Peres gate.
// Outputs p = a, q = a ^ b, r = (a & b) ^ c. With c tied to 0 it is a half
// adder: q is the sum and r the carry of a + b. Standard gate equations;
// its use as the half adder of the multipliers follows the design.
// Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
