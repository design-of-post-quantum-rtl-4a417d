// tb_mts_gate: exhaustive check of the MTS full-adder cell: with the
// ancilla at 0, {cout, sum} = a + b + cin; all 16 input patterns map to
// distinct outputs.
module tb_mts_gate;
  logic a, b, cin, zero, g0, g1, sum, cout;
  logic [15:0] seen;
  int checks = 0, failures = 0;
  mts_gate dut (.a(a), .b(b), .cin(cin), .zero(zero), .g0(g0), .g1(g1), .sum(sum), .cout(cout));
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, cin, zero} = 4'(i); #1;
      seen[{g0, g1, sum, cout}] = 1'b1;
      if (!zero) begin
        checks++;
        if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
          failures++; $display("FAIL a=%b b=%b cin=%b -> %b%b", a, b, cin, cout, sum);
        end
      end
    end
    checks++;
    if (seen !== 16'hffff) begin failures++; $display("FAIL not reversible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
