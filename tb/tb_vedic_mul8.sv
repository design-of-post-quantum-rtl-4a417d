// tb_vedic_mul8: exhaustive check of the 8x8 Vedic multiplier against
// integer multiplication, plus the two products used by the public key
// examples: 0x52 * 0xB1 = 0x38B2 and 0x2B * 0x3C = 0x0A14.
module tb_vedic_mul8;
  logic [7:0]  a, b;
  logic [15:0] c;
  int checks = 0, failures = 0;
  vedic_mul8 dut (.a(a), .b(b), .c(c));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 8'h52; b = 8'hB1; #1; checks++;
    if (c !== 16'h38B2) begin failures++; $display("FAIL 52*B1=%h", c); end
    a = 8'h2B; b = 8'h3C; #1; checks++;
    if (c !== 16'h0A14) begin failures++; $display("FAIL 2B*3C=%h", c); end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i); #1;
      checks++;
      if (c !== 16'(int'(a) * int'(b))) begin
        failures++; if (failures < 10) $display("FAIL %h*%h=%h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
