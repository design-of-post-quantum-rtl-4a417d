// tb_pqc_keygen_top: the whole design end to end at its default sizes
// (128-bit message and public key, 16-bit private key).
//  * the 128-bit example: public key 0a14e15f0436a39d041ae1bf0a9c6a60,
//    private key 5ebf, cipher 71324c988e5a17a24bb64cf73b22f2c7; decryption
//    with token 5ebf returns the message, token 9122 is refused;
//  * ready flags 15 (public key), 287 (cipher) and 512 (private key) clocks
//    after the clock that samples start;
//  * random messages: round trip, and the public key against a model;
//  * every mechanism must occur at least once: a discarded carry in the
//    public key recurrence, a completed table fill, an accepted and a
//    refused OTP.
module tb_pqc_keygen_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, dec_start;
  logic [127:0] msg, pubkey, cipher, plain;
  logic [15:0]  privkey, token;
  logic         pub_ready, priv_ready, enc_ready, carry_drop, dec_ready, dec_done;
  logic         otp_ok, otp_invalid, not_found;
  int checks = 0, failures = 0;
  int n_carry = 0, n_fill = 0, n_ok = 0, n_bad = 0;

  pqc_keygen_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .msg(msg),
    .pubkey(pubkey), .privkey(privkey), .cipher(cipher),
    .pub_ready(pub_ready), .priv_ready(priv_ready), .enc_ready(enc_ready), .carry_drop(carry_drop),
    .dec_ready(dec_ready), .dec_start(dec_start), .token(token), .plain(plain), .dec_done(dec_done),
    .otp_ok(otp_ok), .otp_invalid(otp_invalid), .not_found(not_found)
  );

  logic enc_ready_q;
  always @(posedge clk) begin
    if (carry_drop) n_carry++;
    if (enc_ready && !enc_ready_q) n_fill++;
    enc_ready_q <= enc_ready;
  end

  function automatic logic [127:0] pub_model(input logic [127:0] m);
    logic [7:0] k [16];
    int p, s;
    logic [127:0] r;
    p = int'(m[127:120]) * int'(m[7:0]);
    k[0] = 8'(p / 256); k[1] = 8'(p % 256);
    for (int i = 2; i < 16; i++) begin
      s = (int'(k[i-1]) + int'(k[i-2])) % 256;
      k[i] = 8'(((s % 16) * 16) + (s / 16));
    end
    for (int i = 0; i < 16; i++) r[(15-i)*8 +: 8] = k[i];
    return r;
  endfunction

  task automatic generate_keys(input logic [127:0] m, output int t_pub, output int t_enc, output int t_priv);
    int t;
    msg = m; start = 1; @(posedge clk); #1 start = 0;
    t = 0; t_pub = -1; t_enc = -1; t_priv = -1;
    while (!(enc_ready && priv_ready) && t < 2000) begin
      @(posedge clk); #1 t++;
      if (pub_ready  && t_pub  < 0) t_pub  = t;
      if (enc_ready  && t_enc  < 0) t_enc  = t;
      if (priv_ready && t_priv < 0) t_priv = t;
    end
  endtask

  task automatic decrypt(input logic [15:0] tok);
    token = tok; dec_start = 1; @(posedge clk); #1 dec_start = 0;
    while (!dec_done) begin @(posedge clk); #1; end
    if (otp_ok) n_ok++;
    if (otp_invalid) n_bad++;
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tp, te, tv;
    start = 0; dec_start = 0; msg = '0; token = '0; enc_ready_q = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    generate_keys(128'h2b7e151628aed2a6abf7158809cf4f3c, tp, te, tv);
    checks++; if (pubkey !== 128'h0a14e15f0436a39d041ae1bf0a9c6a60) begin failures++; $display("FAIL pubkey %h", pubkey); end
    checks++; if (privkey !== 16'h5ebf) begin failures++; $display("FAIL privkey %h", privkey); end
    checks++; if (cipher !== 128'h71324c988e5a17a24bb64cf73b22f2c7) begin failures++; $display("FAIL cipher %h", cipher); end
    checks++; if (tp != 15 || te != 287 || tv != 512) begin failures++; $display("FAIL timing %0d %0d %0d", tp, te, tv); end
    checks++; if (!dec_ready) begin failures++; $display("FAIL not ready to decrypt"); end

    decrypt(16'h5ebf);
    checks++; if (!otp_ok || plain !== 128'h2b7e151628aed2a6abf7158809cf4f3c) begin failures++; $display("FAIL plain %h", plain); end
    decrypt(16'h9122);
    checks++; if (!otp_invalid || plain !== '0) begin failures++; $display("FAIL wrong OTP accepted"); end

    for (int t = 0; t < 6; t++) begin
      logic [127:0] m;
      m = {$urandom, $urandom, $urandom, $urandom};
      generate_keys(m, tp, te, tv);
      checks++; if (pubkey !== pub_model(m)) begin failures++; $display("FAIL rnd pubkey"); end
      decrypt(privkey);
      checks++; if (!otp_ok || not_found || plain !== m) begin failures++; $display("FAIL rnd round trip %h -> %h", m, plain); end
      decrypt(privkey ^ 16'h0001);
      checks++; if (!otp_invalid) begin failures++; $display("FAIL rnd wrong OTP accepted"); end
    end

    checks++; if (n_carry == 0) begin failures++; $display("FAIL no discarded carry"); end
    checks++; if (n_fill  == 0) begin failures++; $display("FAIL no table fill"); end
    checks++; if (n_ok    == 0) begin failures++; $display("FAIL no accepted OTP"); end
    checks++; if (n_bad   == 0) begin failures++; $display("FAIL no refused OTP"); end
    $display("mechanisms: carry_drop=%0d table_fill=%0d otp_ok=%0d otp_invalid=%0d", n_carry, n_fill, n_ok, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
