// tr_gate: the 3x3 reversible TR gate.
// Outputs p = a, q = a ^ b, r = (a & ~b) ^ c. With c tied to 0 and the
// subtrahend on a, it is a half subtractor: q is the difference b - a and r
// the borrow. Standard gate equations; its use as the subtractor of the
// modulo-256 adder follows the design. Purely combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
