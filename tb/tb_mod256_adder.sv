// tb_mod256_adder: exhaustive check of the modulo-256 adder: sum is
// (a + b) mod 256 and carry is set exactly when a + b > 255. Includes the
// example 0xAE + 0xB2 = 0x60 with the carry discarded.
module tb_mod256_adder;
  logic [7:0] a, b, sum;
  logic       carry;
  int checks = 0, failures = 0, carries = 0;
  mod256_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 8'hAE; b = 8'hB2; #1; checks++;
    if (sum !== 8'h60 || carry !== 1'b1) begin failures++; $display("FAIL AE+B2=%h c=%b", sum, carry); end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i); #1;
      checks++;
      if (sum !== 8'((int'(a) + int'(b)) % 256) || carry !== (int'(a) + int'(b) > 255)) begin
        failures++; if (failures < 10) $display("FAIL %h+%h=%h c=%b", a, b, sum, carry);
      end
      if (carry) carries++;
    end
    checks++;
    if (carries != 32640) begin failures++; $display("FAIL carry count %0d", carries); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
