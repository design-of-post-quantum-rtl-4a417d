// feynman_gate: the 2x2 reversible controlled-NOT gate.
// Outputs p = a and q = a ^ b. With b tied to 0 it copies a (reversible
// logic allows no fan-out, so copies are made this way); otherwise q is an
// XOR. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
