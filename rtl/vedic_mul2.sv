// vedic_mul2: 2x2 Vedic (Urdhva Tiryakbhyam, "vertically and crosswise")
// multiplier, p = a * b.
// Four Toffoli gates form the partial products a0b0, a1b0, a0b1, a1b1; two
// Peres half adders add the crosswise pair and then fold its carry into the
// vertical product of the high bits:
//   p0 = a0b0, {c1, p1} = a1b0 + a0b1, {p3, p2} = a1b1 + c1.
// The gate-level arrangement is this implementation's; the design states
// that Toffoli gates multiply and Peres gates form half adders.
// Purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic [3:0] pp;          // partial products
  logic [3:0] ga, gb;      // Toffoli pass-through (garbage) lines
  logic       c1;
  logic [1:0] h_p;         // Peres pass-through lines

  toffoli_gate u_t0 (.a(a[0]), .b(b[0]), .c(1'b0), .p(ga[0]), .q(gb[0]), .r(pp[0]));
  toffoli_gate u_t1 (.a(a[1]), .b(b[0]), .c(1'b0), .p(ga[1]), .q(gb[1]), .r(pp[1]));
  toffoli_gate u_t2 (.a(a[0]), .b(b[1]), .c(1'b0), .p(ga[2]), .q(gb[2]), .r(pp[2]));
  toffoli_gate u_t3 (.a(a[1]), .b(b[1]), .c(1'b0), .p(ga[3]), .q(gb[3]), .r(pp[3]));

  peres_gate u_h0 (.a(pp[1]), .b(pp[2]), .c(1'b0), .p(h_p[0]), .q(p[1]), .r(c1));
  peres_gate u_h1 (.a(pp[3]), .b(c1),    .c(1'b0), .p(h_p[1]), .q(p[2]), .r(p[3]));

  assign p[0] = pp[0];
endmodule
