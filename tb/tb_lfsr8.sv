// tb_lfsr8: the 8-bit LFSR seeded with 0xA0 must produce
// a0 41 82 04 09 13 27 4e 9d 3b 76 ec d9 b2 64 c9 92 24 (the start of the
// encryption table of the 128-bit example), follow Z0 <= Z7^Z3^Z2^Z1 with a
// left shift, and return to the seed after exactly 255 steps.
module tb_lfsr8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       load, en;
  logic [7:0] seed, q, exp_q;
  logic [8*18-1:0] head;
  int checks = 0, failures = 0, period;
  lfsr8 dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en), .q(q));
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    head = 144'ha041820409_13274e9d3b_76ecd9b264_c99224;
    load = 0; en = 0; seed = 8'hA0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    load = 1; @(posedge clk); #1 load = 0; en = 1;
    exp_q = seed; period = 0;
    do begin
      if (period < 18) begin
        checks++;
        if (q !== head[(17-period)*8 +: 8]) begin failures++; $display("FAIL head %0d %h", period, q); end
      end
      exp_q = {exp_q[6:0], exp_q[7] ^ exp_q[3] ^ exp_q[2] ^ exp_q[1]};
      @(posedge clk); #1; period++;
      checks++;
      if (q !== exp_q) begin failures++; if (failures < 10) $display("FAIL step %0d %h", period, q); end
    end while (q != seed && period < 300);
    checks++; if (period != 255) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
