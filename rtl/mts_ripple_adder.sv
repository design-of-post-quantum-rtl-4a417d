// mts_ripple_adder: WIDTH-bit ripple carry adder made of a chain of MTS
// full-adder cells, carry passed from cell i to cell i+1, ancilla inputs tied
// to 0. sum = a + b + cin (mod 2^WIDTH), cout is the carry out of the top
// cell. The multipliers use 4, 6, 8 and 12 bit instances.
// Purely combinational.
module mts_ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] g0, g1;   // garbage outputs of the reversible cells

  assign carry[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    mts_gate u_mts (
      .a(a[i]), .b(b[i]), .cin(carry[i]), .zero(1'b0),
      .g0(g0[i]), .g1(g1[i]), .sum(sum[i]), .cout(carry[i+1])
    );
  end
  assign cout = carry[WIDTH];
endmodule
