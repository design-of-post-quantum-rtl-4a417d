// table_memory: the 16 x 16 byte substitution memory of the encryption
// module. Entry address = {row, column} = {addr[7:4], addr[3:0]}.
// Ports:
//  * write: we/waddr/wdata, synchronous;
//  * clear: synchronous, sets every entry to 0 (asynchronous rst_n as well);
//  * read:  raddr -> rdata, combinational (encryption looks a message byte up);
//  * search: sdata -> found/saddr, combinational; saddr is the lowest
//    address whose entry equals sdata, i.e. the row and column where the
//    byte is found (decryption).
// The memory and its row/column view are the design's; the port set and
// the parallel compare of the search port are this implementation's.
module table_memory
  import pqc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  we,
  input  byte_t waddr,
  input  byte_t wdata,
  input  byte_t raddr,
  output byte_t rdata,
  input  byte_t sdata,
  output logic  found,
  output byte_t saddr
);
  byte_t mem [TABLE_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TABLE_DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < TABLE_DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

  always_comb begin
    found = 1'b0;
    saddr = '0;
    for (int i = TABLE_DEPTH - 1; i >= 0; i--) begin
      if (mem[i] == sdata) begin
        found = 1'b1;
        saddr = byte_t'(i);
      end
    end
  end

  // write and clear are never requested together
  a_no_write_during_clear: assert property (@(posedge clk) disable iff (!rst_n) !(we && clear))
    else $error("table_memory: write during clear");
endmodule
