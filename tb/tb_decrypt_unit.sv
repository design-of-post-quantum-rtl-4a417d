// tb_decrypt_unit: decryption module with a substitution table that the
// testbench fills with a random permutation.
//  * right OTP: every cipher byte c must decrypt to the address of c in the
//    table, in 16 clocks, otp_ok set;
//  * wrong OTP (token 5ecf against private key 9122, as in the design's
//    example) and a token differing only in its high byte: otp_invalid,
//    plain 0, done with the clock that samples start;
//  * a cipher byte missing from the table raises not_found.
module tb_decrypt_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, ok, bad, nf;
  logic [15:0]  token, pk;
  logic [127:0] cipher, plain, expp;
  logic         clr, we, fnd;
  logic [7:0]   waddr, wdata, rd, sd, sa;
  logic [7:0]   perm [256];
  int checks = 0, failures = 0;

  decrypt_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .token(token), .privkey(pk), .cipher(cipher),
    .plain(plain), .busy(busy), .done(done), .otp_ok(ok), .otp_invalid(bad), .not_found(nf),
    .mem_sdata(sd), .mem_found(fnd), .mem_saddr(sa));
  table_memory mem (.clk(clk), .rst_n(rst_n), .clear(clr), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(8'h00), .rdata(rd), .sdata(sd), .found(fnd), .saddr(sa));

  task automatic run(output int lat);
    start = 1; @(posedge clk); #1 start = 0; lat = 0;
    while (!done) begin @(posedge clk); #1 lat++; end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    start = 0; clr = 0; we = 0; waddr = 0; wdata = 0; token = 0; pk = 0; cipher = 0;
    for (int i = 0; i < 256; i++) perm[i] = 8'(i);
    for (int i = 255; i > 0; i--) begin
      int j; logic [7:0] t;
      j = $urandom_range(i, 0); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 256; i++) begin we = 1; waddr = 8'(i); wdata = perm[i]; @(posedge clk); #1; end
    we = 0;

    for (int t = 0; t < 20; t++) begin
      for (int b = 0; b < 16; b++) begin
        expp[b*8 +: 8] = 8'($urandom);
        cipher[b*8 +: 8] = perm[expp[b*8 +: 8]];
      end
      pk = 16'($urandom); token = pk;
      run(lat);
      checks++; if (!ok || bad || nf) begin failures++; $display("FAIL flags ok=%b bad=%b nf=%b", ok, bad, nf); end
      checks++; if (plain !== expp) begin failures++; $display("FAIL plain %h exp %h", plain, expp); end
      checks++; if (lat != 16) begin failures++; $display("FAIL latency %0d", lat); end
    end

    pk = 16'h9122; token = 16'h5ecf;
    run(lat);
    checks++; if (ok || !bad || plain !== '0) begin failures++; $display("FAIL wrong OTP accepted"); end
    checks++; if (lat != 0) begin failures++; $display("FAIL wrong-OTP latency %0d", lat); end

    pk = 16'h5ebf; token = 16'h9ebf;   // differs in the high byte only
    run(lat);
    checks++; if (ok || !bad) begin failures++; $display("FAIL high-byte OTP difference accepted"); end

    // remove value perm[5] from the table
    we = 1; waddr = 8'd5; wdata = perm[6]; @(posedge clk); #1 we = 0;
    cipher = {perm[5], 120'h0}; pk = 16'h1234; token = 16'h1234;
    run(lat);
    checks++; if (!nf) begin failures++; $display("FAIL missing byte not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
