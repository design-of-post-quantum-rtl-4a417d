// tb_table_memory: writes a random permutation of the 256 byte values,
// reads every entry back, searches every value (the address found must be
// the one written), checks a value that is absent, the lowest-address rule
// for a value present twice, and clear.
module tb_table_memory;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       clear, we, found;
  logic [7:0] waddr, wdata, raddr, rdata, sdata, saddr;
  logic [7:0] perm [256];
  int checks = 0, failures = 0;

  table_memory dut (.clk(clk), .rst_n(rst_n), .clear(clear), .we(we), .waddr(waddr), .wdata(wdata),
                    .raddr(raddr), .rdata(rdata), .sdata(sdata), .found(found), .saddr(saddr));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; we = 0; waddr = 0; wdata = 0; raddr = 0; sdata = 0;
    for (int i = 0; i < 256; i++) perm[i] = 8'(i);
    for (int i = 255; i > 0; i--) begin
      int j; logic [7:0] t;
      j = $urandom_range(i, 0); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    raddr = 8'd77; sdata = 8'h00; #1;
    checks++; if (rdata !== 8'h00 || !found || saddr !== 8'h00) begin failures++; $display("FAIL after reset"); end
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = 8'(i); wdata = perm[i]; @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); sdata = perm[i]; #1;
      checks++; if (rdata !== perm[i]) begin failures++; $display("FAIL read %0d", i); end
      checks++; if (!found || saddr !== 8'(i)) begin failures++; $display("FAIL search %h -> %0d", perm[i], saddr); end
    end
    // make entry 200 hold 0x00 as well: only one copy of perm value moved there
    we = 1; waddr = 8'd200; wdata = perm[10]; @(posedge clk); #1 we = 0;
    sdata = perm[10]; #1;
    checks++; if (!found || saddr !== 8'd10) begin failures++; $display("FAIL lowest address %0d", saddr); end
    sdata = perm[200]; #1;
    checks++; if (found) begin failures++; $display("FAIL absent value found at %0d", saddr); end
    clear = 1; @(posedge clk); #1 clear = 0;
    raddr = 8'd200; sdata = 8'h00; #1;
    checks++; if (rdata !== 8'h00 || !found || saddr !== 8'h00) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
