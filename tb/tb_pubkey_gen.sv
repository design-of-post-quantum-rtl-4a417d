// tb_pubkey_gen: public key generator.
//  * 128-bit message 2b7e151628aed2a6abf7158809cf4f3c must give the 128-bit
//    key 0a14e15f0436a39d041ae1bf0a9c6a60;
//  * the message 52 12 37 ... 42 B1 must give a key starting
//    38 B2 AE 06 4B 15;
//  * random messages against a behavioural model of the recurrence, for the
//    default 128-bit key and for a 1024-bit message with a 512-bit key;
//  * done must come KEY_BITS/8 - 2 clocks after the clock that samples start;
//  * at least one sum must have had its carry discarded.
module tb_pubkey_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, carry_drop;
  logic [127:0]  msg, key;
  logic          start_b, busy_b, done_b, carry_b;
  logic [1023:0] msg_b;
  logic [511:0]  key_b;
  int checks = 0, failures = 0, drops = 0;

  pubkey_gen dut (.clk(clk), .rst_n(rst_n), .start(start), .msg(msg), .key(key),
                  .busy(busy), .done(done), .carry_drop(carry_drop));
  pubkey_gen #(.MSG_BITS(1024), .KEY_BITS(512)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start_b), .msg(msg_b), .key(key_b),
    .busy(busy_b), .done(done_b), .carry_drop(carry_b));

  always @(posedge clk) if (carry_drop) drops++;

  // behavioural model: key bytes, most significant first, right-aligned
  function automatic logic [511:0] model(input logic [7:0] first, input logic [7:0] last, input int nb);
    logic [7:0] k [64];
    int p, s;
    logic [511:0] r;
    p = int'(first) * int'(last);
    k[0] = 8'(p / 256); k[1] = 8'(p % 256);
    for (int i = 2; i < nb; i++) begin
      s = (int'(k[i-1]) + int'(k[i-2])) % 256;
      k[i] = 8'(((s % 16) * 16) + (s / 16));
    end
    r = '0;
    for (int i = 0; i < nb; i++) r = {r[503:0], k[i]};
    return r;
  endfunction

  task automatic run128(input logic [127:0] m, output int lat);
    msg = m; start = 1; @(posedge clk); #1 start = 0; lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    start = 0; start_b = 0; msg = '0; msg_b = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    run128(128'h2b7e151628aed2a6abf7158809cf4f3c, lat);
    checks++;
    if (key !== 128'h0a14e15f0436a39d041ae1bf0a9c6a60) begin failures++; $display("FAIL key %h", key); end
    checks++;
    if (lat != 14) begin failures++; $display("FAIL latency %0d", lat); end

    run128(128'h52123714_71A11A24_1822C131_500942B1, lat);
    checks++;
    if (key[127:80] !== 48'h38B2AE064B15) begin failures++; $display("FAIL example key %h", key); end

    for (int t = 0; t < 50; t++) begin
      logic [127:0] m;
      m = {$urandom, $urandom, $urandom, $urandom};
      run128(m, lat);
      checks++;
      if (key !== model(m[127:120], m[7:0], 16)[127:0]) begin failures++; $display("FAIL rnd %h -> %h", m, key); end
    end

    for (int t = 0; t < 5; t++) begin
      for (int w = 0; w < 32; w++) msg_b[w*32 +: 32] = $urandom;
      start_b = 1; @(posedge clk); #1 start_b = 0; lat = 0;
      while (!done_b) begin @(posedge clk); #1 lat++; end
      checks++;
      if (key_b !== model(msg_b[1023:1016], msg_b[7:0], 64)) begin failures++; $display("FAIL 512-bit key"); end
      checks++;
      if (lat != 62) begin failures++; $display("FAIL 512 latency %0d", lat); end
    end

    checks++;
    if (drops == 0) begin failures++; $display("FAIL no carry was ever discarded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
