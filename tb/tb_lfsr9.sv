// tb_lfsr9: the 9-bit LFSR must follow Z0 <= Z8^Z7^Z5^Z4 with a left shift,
// return to its seed after exactly 511 steps and not earlier, and load and
// hold correctly.
module tb_lfsr9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       load, en;
  logic [8:0] seed, q, exp_q;
  int checks = 0, failures = 0, period;
  lfsr9 dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en), .q(q));
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    load = 0; en = 0; seed = 9'b000001001;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++; if (q !== 9'd0) begin failures++; $display("FAIL reset %b", q); end
    load = 1; @(posedge clk); #1 load = 0;
    checks++; if (q !== seed) begin failures++; $display("FAIL load %b", q); end
    @(posedge clk); #1;
    checks++; if (q !== seed) begin failures++; $display("FAIL hold %b", q); end
    en = 1; exp_q = seed; period = 0;
    do begin
      exp_q = {exp_q[7:0], exp_q[8] ^ exp_q[7] ^ exp_q[5] ^ exp_q[4]};
      @(posedge clk); #1; period++;
      checks++;
      if (q !== exp_q) begin failures++; if (failures < 10) $display("FAIL step %0d %b", period, q); end
    end while (q != seed && period < 600);
    checks++; if (period != 511) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
