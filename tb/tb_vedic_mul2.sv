// tb_vedic_mul2: exhaustive check of the 2x2 Vedic multiplier against
// integer multiplication.
module tb_vedic_mul2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;
  vedic_mul2 dut (.a(a), .b(b), .p(p));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i); #1;
      checks++;
      if (p !== 4'(int'(a) * int'(b))) begin failures++; $display("FAIL %0d*%0d=%0d", a, b, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
