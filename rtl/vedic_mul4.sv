// vedic_mul4: 4x4 Vedic multiplier, p = a * b, from four 2x2 multipliers.
// q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH (L/H = low/high 2 bits).
// p[1:0] = q0[1:0]; the upper six bits are
//   (q1 + q0[3:2]) + (q2 + {q3, 2'b00})
// summed with MTS ripple adders, the same arrangement the 8x8 multiplier
// uses one level up. Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] t;            // q1 + q0[3:2]
  logic [5:0] s;            // q2 + {q3, 2'b00}
  logic [2:0] co;           // carries out, always 0 (garbage)

  vedic_mul2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  mts_ripple_adder #(.WIDTH(4)) u_a0 (.a(q1), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(t), .cout(co[0]));
  mts_ripple_adder #(.WIDTH(6)) u_a1 (.a({2'b00, q2}), .b({q3, 2'b00}), .cin(1'b0), .sum(s), .cout(co[1]));
  mts_ripple_adder #(.WIDTH(6)) u_a2 (.a(s), .b({2'b00, t}), .cin(1'b0), .sum(p[7:2]), .cout(co[2]));

  assign p[1:0] = q0[1:0];
endmodule
