// tb_toffoli_gate: exhaustive check of the toffoli gate against its truth table,
// and that the gate is reversible (all 8 output patterns distinct).
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;
  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i); #1;
      checks++;
      if (p !== a || q !== (b) || r !== ((a & b) ^ c)) begin
        failures++; $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin failures++; $display("FAIL not reversible %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
