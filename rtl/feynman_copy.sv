// feynman_copy: copies a WIDTH-bit bus with one Feynman gate per bit
// (b input tied to 0), the reversible way of fanning a signal out.
// y is the copy, x_out the pass-through line. Purely combinational.
module feynman_copy #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] x_out,
  output logic [WIDTH-1:0] y
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_fg
    feynman_gate u_fg (.a(x[i]), .b(1'b0), .p(x_out[i]), .q(y[i]));
  end
endmodule
