// pqc_pkg: types and small helpers shared by the key generation and
// encryption blocks.
//   byte_t        one message, key or table byte
//   swap_nibbles  exchanges the high and low nibble of a byte; the public key
//                 generator applies it to every modulo-256 sum it stores
//   TABLE_DEPTH   entries of the substitution table, seen as 16 rows of 16
//                 bytes: an address is {row, column}
package pqc_pkg;
  typedef logic [7:0] byte_t;

  localparam int unsigned TABLE_DEPTH = 256;

  function automatic byte_t swap_nibbles(byte_t b);
    return {b[3:0], b[7:4]};
  endfunction
endpackage
