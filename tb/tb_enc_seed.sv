// tb_enc_seed: seed of the encryption LFSR.
//  * 128-bit example: message 2b7e151628aed2a6abf7158809cf4f3c, key
//    0a14e15f0436a39d041ae1bf0a9c6a60 -> seed a0;
//  * random operands against a model for 128/128, a 1024-bit message with a
//    512-bit key (first 128 message bits, key chunks XORed) and a 64-bit
//    message with a 64-bit key (both zero-padded after their last bit).
module tb_enc_seed;
  logic [127:0]  m0, k0;
  logic [1023:0] m1;
  logic [511:0]  k1;
  logic [63:0]   m2, k2;
  logic [7:0]    s0, s1, s2;
  int checks = 0, failures = 0;

  enc_seed dut0 (.msg(m0), .key(k0), .seed(s0));
  enc_seed #(.MSG_BITS(1024), .KEY_BITS(512)) dut1 (.msg(m1), .key(k1), .seed(s1));
  enc_seed #(.MSG_BITS(64), .KEY_BITS(64)) dut2 (.msg(m2), .key(k2), .seed(s2));

  function automatic logic [7:0] fold(input logic [127:0] x);
    logic [7:0] r = 0;
    for (int i = 0; i < 16; i++) r ^= x[i*8 +: 8];
    return r;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m0 = 128'h2b7e151628aed2a6abf7158809cf4f3c; k0 = 128'h0a14e15f0436a39d041ae1bf0a9c6a60;
    m1 = '0; k1 = '0; m2 = '0; k2 = '0; #1;
    checks++; if (s0 !== 8'ha0) begin failures++; $display("FAIL example seed %h", s0); end
    for (int t = 0; t < 200; t++) begin
      m0 = {$urandom, $urandom, $urandom, $urandom};
      k0 = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 32; w++) m1[w*32 +: 32] = $urandom;
      for (int w = 0; w < 16; w++) k1[w*32 +: 32] = $urandom;
      m2 = {$urandom, $urandom}; k2 = {$urandom, $urandom};
      #1;
      checks++; if (s0 !== fold(m0 ^ k0)) begin failures++; $display("FAIL 128/128"); end
      checks++;
      if (s1 !== fold(m1[1023:896] ^ k1[511:384] ^ k1[383:256] ^ k1[255:128] ^ k1[127:0])) begin
        failures++; $display("FAIL 1024/512");
      end
      checks++; if (s2 !== fold({m2, 64'h0} ^ {k2, 64'h0})) begin failures++; $display("FAIL 64/64"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
