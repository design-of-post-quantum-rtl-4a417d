// tb_privkey_gen: private key generator.
//  * message 2b7e151628aed2a6abf7158809cf4f3c (seed bits [32:24] =
//    000001001) must give the 16-bit key 5ebf;
//  * done must come 511 clocks after start;
//  * random messages against a model: the LFSR sequence s[0] = seed,
//    s[i+1] = {s[i][7:0], s[i][8]^s[i][7]^s[i][5]^s[i][4]}; buffer entry j
//    ends holding s[j + 255]; the key concatenates entries 242, 244, ...;
//  * a 512-bit key instance on random messages.
module tb_privkey_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          start, busy, done, busy_b, done_b;
  logic [127:0]  msg;
  logic [15:0]   pk;
  logic [511:0]  pk_b;
  int checks = 0, failures = 0;

  privkey_gen dut (.clk(clk), .rst_n(rst_n), .start(start), .msg(msg), .privkey(pk), .busy(busy), .done(done));
  privkey_gen #(.PRIV_BITS(512)) dut_b (.clk(clk), .rst_n(rst_n), .start(start), .msg(msg),
                                          .privkey(pk_b), .busy(busy_b), .done(done_b));

  function automatic logic [575:0] model(input logic [8:0] seed, input int nent);
    logic [8:0] s [768];
    logic [575:0] r;
    s[0] = seed;
    for (int i = 1; i < 768; i++) s[i] = {s[i-1][7:0], s[i-1][8] ^ s[i-1][7] ^ s[i-1][5] ^ s[i-1][4]};
    r = '0;
    for (int e = 0; e < nent; e++) r = {r[566:0], s[((242 + 2*e) % 256) + 255]};
    return r;
  endfunction

  task automatic run(input logic [127:0] m, output int lat);
    msg = m; start = 1; @(posedge clk); #1 start = 0; lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    start = 0; msg = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, lat);
    checks++; if (pk !== 16'h5ebf) begin failures++; $display("FAIL key %h", pk); end
    checks++; if (lat != 511) begin failures++; $display("FAIL latency %0d", lat); end
    checks++; if (pk_b !== model(9'b000001001, 57)[511:0]) begin failures++; $display("FAIL 512-bit key"); end
    for (int t = 0; t < 8; t++) begin
      logic [127:0] m;
      m = {$urandom, $urandom, $urandom, $urandom};
      run(m, lat);
      checks++;
      if (pk !== model(m[32:24], 2)[15:0]) begin failures++; $display("FAIL rnd %h -> %h", m, pk); end
      checks++;
      if (pk_b !== model(m[32:24], 57)[511:0]) begin failures++; $display("FAIL rnd 512-bit key"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
