// tb_encrypt_unit: encryption module with its substitution table.
//  * 128-bit example: message 2b7e151628aed2a6abf7158809cf4f3c and public
//    key 0a14e15f0436a39d041ae1bf0a9c6a60 must give cipher
//    71324c988e5a17a24bb64cf73b22f2c7, 271 clocks after start;
//  * a 2048-bit message holding the bytes 00, 01, ..., ff reads the whole
//    table back through the cipher: entry i must be the i-th LFSR
//    combination from the seed (model), entry 255 must be 0;
//  * random messages and keys against the same model.
module tb_encrypt_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, tdone;
  logic [127:0] msg, key, cipher;
  logic         clr, we;
  logic [7:0]   waddr, wdata, raddr, rdata, sd, sa;
  logic         fnd;

  logic          start_b, busy_b, done_b, tdone_b;
  logic [2047:0] msg_b, cipher_b;
  logic [127:0]  key_b;
  logic          clr_b, we_b, fnd_b;
  logic [7:0]    waddr_b, wdata_b, raddr_b, rdata_b, sa_b;
  int checks = 0, failures = 0;

  encrypt_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .msg(msg), .key(key), .cipher(cipher),
    .busy(busy), .done(done), .table_done(tdone), .mem_clear(clr), .mem_we(we), .mem_waddr(waddr),
    .mem_wdata(wdata), .mem_raddr(raddr), .mem_rdata(rdata));
  table_memory mem (.clk(clk), .rst_n(rst_n), .clear(clr), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .sdata(8'h00), .found(fnd), .saddr(sa));

  encrypt_unit #(.MSG_BITS(2048), .KEY_BITS(128)) dut_b (.clk(clk), .rst_n(rst_n), .start(start_b),
    .msg(msg_b), .key(key_b), .cipher(cipher_b), .busy(busy_b), .done(done_b), .table_done(tdone_b),
    .mem_clear(clr_b), .mem_we(we_b), .mem_waddr(waddr_b), .mem_wdata(wdata_b),
    .mem_raddr(raddr_b), .mem_rdata(rdata_b));
  table_memory mem_b (.clk(clk), .rst_n(rst_n), .clear(clr_b), .we(we_b), .waddr(waddr_b), .wdata(wdata_b),
    .raddr(raddr_b), .rdata(rdata_b), .sdata(8'h00), .found(fnd_b), .saddr(sa_b));

  function automatic logic [7:0] seed_of(input logic [127:0] m, input logic [127:0] k);
    logic [7:0] r = 0;
    for (int i = 0; i < 16; i++) r ^= m[i*8 +: 8] ^ k[i*8 +: 8];
    return r;
  endfunction

  // table entry i: the LFSR state i steps after the seed, 0 for entry 255
  function automatic logic [7:0] entry(input logic [7:0] seed, input int i);
    logic [7:0] s = seed;
    if (i == 255) return 8'h00;
    for (int n = 0; n < i; n++) s = {s[6:0], s[7] ^ s[3] ^ s[2] ^ s[1]};
    return s;
  endfunction

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    logic [127:0] expc;
    start = 0; start_b = 0; msg = '0; key = '0; msg_b = '0; key_b = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    msg = 128'h2b7e151628aed2a6abf7158809cf4f3c; key = 128'h0a14e15f0436a39d041ae1bf0a9c6a60;
    start = 1; @(posedge clk); #1 start = 0; lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
    checks++; if (cipher !== 128'h71324c988e5a17a24bb64cf73b22f2c7) begin failures++; $display("FAIL cipher %h", cipher); end
    checks++; if (lat != 271) begin failures++; $display("FAIL latency %0d", lat); end

    for (int i = 0; i < 256; i++) msg_b[(255-i)*8 +: 8] = 8'(i);
    key_b = {$urandom, $urandom, $urandom, $urandom};
    start_b = 1; @(posedge clk); #1 start_b = 0;
    while (!done_b) begin @(posedge clk); #1; end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (cipher_b[(255-i)*8 +: 8] !== entry(seed_of(msg_b[2047:1920], key_b), i)) begin
        failures++; if (failures < 10) $display("FAIL table entry %0d = %h", i, cipher_b[(255-i)*8 +: 8]);
      end
    end

    for (int t = 0; t < 10; t++) begin
      msg = {$urandom, $urandom, $urandom, $urandom}; key = {$urandom, $urandom, $urandom, $urandom};
      start = 1; @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      for (int b = 0; b < 16; b++) expc[b*8 +: 8] = entry(seed_of(msg, key), int'(msg[b*8 +: 8]));
      checks++; if (cipher !== expc) begin failures++; $display("FAIL rnd cipher %h exp %h", cipher, expc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
