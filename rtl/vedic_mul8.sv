// vedic_mul8: 8x8 Vedic multiplier, c = a * b, the multiplier of the public
// key generator (first message byte times last message byte).
// Four 4x4 multipliers give q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH.
// Feynman gates copy the operands the adders need, then
//   c[3:0]  = q0[3:0]
//   temp    = q1 + {4'b0, q0[7:4]}            (8-bit MTS ripple adder)
//   s2      = {4'b0, q2} + {q3, 4'b0}         (12-bit MTS ripple adder)
//   c[15:4] = s2 + {4'b0, temp}               (12-bit MTS ripple adder)
// and a last Feynman copy drives c[15:4]. This is the structure of the
// design's 8x8 block diagram. Purely combinational.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] c
);
  logic [7:0]  q0, q1, q2, q3;
  logic [3:0]  c_lo;
  logic [7:0]  q0h_cp, temp, temp_cp;
  logic [11:0] q2_cp, q3_cp, s2, hi;
  logic [2:0]  co;
  // pass-through (garbage) lines of the Feynman copies
  logic [3:0]  g0;
  logic [7:0]  g1, g4;
  logic [11:0] g2, g3, g5;

  vedic_mul4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mul4 u_m1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mul4 u_m2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mul4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  feynman_copy #(.WIDTH(4))  u_cp0 (.x(q0[3:0]),          .x_out(g0), .y(c_lo));
  feynman_copy #(.WIDTH(8))  u_cp1 (.x({4'b0, q0[7:4]}),  .x_out(g1), .y(q0h_cp));
  feynman_copy #(.WIDTH(12)) u_cp2 (.x({4'b0, q2}),       .x_out(g2), .y(q2_cp));
  feynman_copy #(.WIDTH(12)) u_cp3 (.x({q3, 4'b0}),       .x_out(g3), .y(q3_cp));

  mts_ripple_adder #(.WIDTH(8))  u_add0 (.a(q1),    .b(q0h_cp), .cin(1'b0), .sum(temp), .cout(co[0]));
  mts_ripple_adder #(.WIDTH(12)) u_add1 (.a(q2_cp), .b(q3_cp),  .cin(1'b0), .sum(s2),   .cout(co[1]));

  feynman_copy #(.WIDTH(8))  u_cp4 (.x(temp), .x_out(g4), .y(temp_cp));
  mts_ripple_adder #(.WIDTH(12)) u_add2 (.a(s2), .b({4'b0, temp_cp}), .cin(1'b0), .sum(hi), .cout(co[2]));
  feynman_copy #(.WIDTH(12)) u_cp5 (.x(hi), .x_out(g5), .y(c[15:4]));

  assign c[3:0] = c_lo;
endmodule
