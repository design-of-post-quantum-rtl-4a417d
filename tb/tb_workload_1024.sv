// tb_workload_1024: the long-message configuration: 1024-bit message,
// 512-bit public key and 512-bit private key. Random messages go through
// key generation, encryption and decryption; the plain text must equal the
// message, the public key must match a model of the recurrence, and a
// token one bit off the private key must be refused.
module tb_workload_1024;
  localparam int MB = 1024, PB = 512, VB = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, dec_start;
  logic [MB-1:0] msg, cipher, plain;
  logic [PB-1:0] pubkey;
  logic [VB-1:0] privkey, token;
  logic          pub_ready, priv_ready, enc_ready, carry_drop, dec_ready, dec_done;
  logic          otp_ok, otp_invalid, not_found;
  int checks = 0, failures = 0;

  pqc_keygen_top #(.MSG_BITS(MB), .PUB_BITS(PB), .PRIV_BITS(VB)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .msg(msg),
    .pubkey(pubkey), .privkey(privkey), .cipher(cipher),
    .pub_ready(pub_ready), .priv_ready(priv_ready), .enc_ready(enc_ready), .carry_drop(carry_drop),
    .dec_ready(dec_ready), .dec_start(dec_start), .token(token), .plain(plain), .dec_done(dec_done),
    .otp_ok(otp_ok), .otp_invalid(otp_invalid), .not_found(not_found)
  );

  function automatic logic [PB-1:0] pub_model(input logic [7:0] first, input logic [7:0] last);
    logic [7:0] k [PB/8];
    int p, s;
    logic [PB-1:0] r;
    p = int'(first) * int'(last);
    k[0] = 8'(p / 256); k[1] = 8'(p % 256);
    for (int i = 2; i < PB/8; i++) begin
      s = (int'(k[i-1]) + int'(k[i-2])) % 256;
      k[i] = 8'(((s % 16) * 16) + (s / 16));
    end
    for (int i = 0; i < PB/8; i++) r[(PB/8-1-i)*8 +: 8] = k[i];
    return r;
  endfunction

  task automatic decrypt(input logic [VB-1:0] tok);
    token = tok; dec_start = 1; @(posedge clk); #1 dec_start = 0;
    while (!dec_done) begin @(posedge clk); #1; end
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; dec_start = 0; msg = '0; token = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int w = 0; w < MB/32; w++) msg[w*32 +: 32] = $urandom;
      start = 1; @(posedge clk); #1 start = 0;
      while (!(enc_ready && priv_ready)) begin @(posedge clk); #1; end
      checks++; if (pubkey !== pub_model(msg[MB-1 -: 8], msg[7:0])) begin failures++; $display("FAIL pubkey"); end
      decrypt(privkey);
      checks++; if (!otp_ok || not_found || plain !== msg) begin failures++; $display("FAIL round trip"); end
      decrypt(privkey ^ {1'b1, {(VB-1){1'b0}}});
      checks++; if (!otp_invalid) begin failures++; $display("FAIL wrong OTP accepted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
