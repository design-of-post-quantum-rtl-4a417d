// toffoli_gate: the 3x3 reversible controlled-controlled-NOT gate.
// Outputs p = a, q = b, r = (a & b) ^ c. With c tied to 0, r is the AND of
// a and b; the Vedic multipliers use it to form partial products. The
// gate's equations are the standard ones; only its use is taken from the
// design. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
