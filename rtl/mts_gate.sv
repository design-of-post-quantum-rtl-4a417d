// mts_gate: 4x4 reversible full-adder cell used in the ripple carry adders.
// Inputs a, b, carry in and a constant-0 ancilla; outputs two garbage lines,
// the sum and the carry out:
//   g0 = a, g1 = a ^ b, sum = a ^ b ^ cin, cout = maj(a, b, cin) ^ zero.
// The design gives only the cell's role (full adder with two garbage
// outputs, ancilla tied to 0); the garbage equations are this
// implementation's choice and keep the mapping one-to-one.
// Purely combinational.
module mts_gate (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic zero,
  output logic g0,
  output logic g1,
  output logic sum,
  output logic cout
);
  assign g0   = a;
  assign g1   = a ^ b;
  assign sum  = a ^ b ^ cin;
  assign cout = ((a & b) | (cin & (a ^ b))) ^ zero;
endmodule
