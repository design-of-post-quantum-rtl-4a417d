// mod256_adder: 2^8 modulo adder, sum = (a + b) mod 256.
// An 8-bit MTS ripple adder forms the 9-bit total {carry, s}. When the carry
// is set, 9'b1_0000_0000 is subtracted from the total by a 9-bit ripple
// subtractor of TR gates (each full subtractor is two TR half subtractors
// whose borrows are merged by a Feynman XOR; they are never both 1), which
// leaves the low eight bits. carry reports that a carry was produced and
// discarded. Purely combinational.
module mod256_adder (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] sum,
  output logic       carry
);
  logic [7:0] s;
  logic [8:0] total, subtrahend, diff;
  logic [9:0] borrow;
  logic [8:0] d1, b1, b2, gp0, gp1, gf;

  mts_ripple_adder #(.WIDTH(8)) u_add (.a(a), .b(b), .cin(1'b0), .sum(s), .cout(carry));

  assign total      = {carry, s};
  assign subtrahend = {carry, 8'b0};   // 9'b100000000 when a carry was generated
  assign borrow[0]  = 1'b0;

  for (genvar i = 0; i < 9; i++) begin : g_fs
    // total[i] - subtrahend[i]
    tr_gate u_hs0 (.a(subtrahend[i]), .b(total[i]), .c(1'b0), .p(gp0[i]), .q(d1[i]), .r(b1[i]));
    // minus the borrow from the bit below
    tr_gate u_hs1 (.a(borrow[i]), .b(d1[i]), .c(1'b0), .p(gp1[i]), .q(diff[i]), .r(b2[i]));
    feynman_gate u_bm (.a(b1[i]), .b(b2[i]), .p(gf[i]), .q(borrow[i+1]));
  end

  assign sum = diff[7:0];
endmodule
