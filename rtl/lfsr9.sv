// lfsr9: 9-bit Fibonacci LFSR, feedback polynomial x^8 + x^7 + x^5 + x^4 + 1,
// built with Feynman gates: A = Z5 ^ Z4, B = Z8 ^ Z7, and A ^ B is shifted in
// at Z0 while the register moves one place towards Z8. It runs through all
// 511 non-zero states. Tap positions and gate arrangement follow the design.
// load (synchronous, over en) puts seed in the register; en advances one
// state per clock. rst_n clears the register (asynchronous, active low).
module lfsr9 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [8:0] seed,
  input  logic       en,
  output logic [8:0] q
);
  logic fa, fb, fab, ga, gb, gab;

  feynman_gate u_a  (.a(q[5]), .b(q[4]), .p(ga),  .q(fa));
  feynman_gate u_b  (.a(q[8]), .b(q[7]), .p(gb),  .q(fb));
  feynman_gate u_ab (.a(fa),   .b(fb),   .p(gab), .q(fab));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= seed;
    else if (en)   q <= {q[7:0], fab};
  end
endmodule
