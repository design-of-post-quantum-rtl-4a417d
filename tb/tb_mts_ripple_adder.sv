// tb_mts_ripple_adder: the 8-bit adder exhaustively (both carry-in values)
// and the 12-bit adder on random operands, against integer addition.
module tb_mts_ripple_adder;
  logic [7:0]  a8, b8, s8;
  logic [11:0] a12, b12, s12;
  logic        ci8, co8, ci12, co12;
  int checks = 0, failures = 0;
  mts_ripple_adder #(.WIDTH(8))  dut8  (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  mts_ripple_adder #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .cin(ci12), .sum(s12), .cout(co12));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a12 = '0; b12 = '0; ci12 = 0;
    for (int i = 0; i < 512 * 256; i++) begin
      {ci8, a8, b8} = 17'(i); #1;
      checks++;
      if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++; if (failures < 10) $display("FAIL8 %h+%h+%b=%b%h", a8, b8, ci8, co8, s8);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom); #1;
      checks++;
      if ({co12, s12} !== 13'(int'(a12) + int'(b12) + int'(ci12))) begin
        failures++; if (failures < 10) $display("FAIL12 %h+%h", a12, b12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
