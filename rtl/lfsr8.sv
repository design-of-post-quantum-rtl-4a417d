// lfsr8: 8-bit Fibonacci LFSR with taps at bits 7, 3, 2 and 1 (the design
// writes the equation as x^7 + x^3 + x^2 + x + 1, one term per tapped bit),
// built with Feynman gates: (Z1 ^ Z2) ^ (Z3 ^ Z7) is shifted in at Z0 while
// the register moves towards Z7. From any non-zero seed it runs through all
// 255 non-zero bytes. load (synchronous, over en) puts seed in the register;
// en advances one state per clock; rst_n clears it (asynchronous).
module lfsr8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] seed,
  input  logic       en,
  output logic [7:0] q
);
  logic fa, fb, fab, ga, gb, gab;

  feynman_gate u_a  (.a(q[1]), .b(q[2]), .p(ga),  .q(fa));
  feynman_gate u_b  (.a(q[7]), .b(q[3]), .p(gb),  .q(fb));
  feynman_gate u_ab (.a(fa),   .b(fb),   .p(gab), .q(fab));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= seed;
    else if (en)   q <= {q[6:0], fab};
  end
endmodule
