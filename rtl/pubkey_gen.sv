// pubkey_gen: message-dependent public key generator.
// The first and last message bytes are multiplied (8x8 Vedic multiplier);
// the high and low product bytes become key bytes 0 and 1. Every further
// byte is the modulo-256 sum of the two bytes before it, carry discarded,
// with its nibbles swapped:
//   k[i] = swap_nibbles((k[i-1] + k[i-2]) mod 256),  i >= 2.
// Bytes are produced until KEY_BITS bits exist; byte 0 is the most
// significant byte of key. The algorithm is the design's; the byte-serial
// schedule and the handshake are this implementation's.
// Interface: a start pulse (ignored while busy) samples msg; busy is high
// while bytes are generated; the clock that samples start stores bytes 0 and
// 1, each later clock one byte, and done pulses for one clock when key is
// complete, KEY_BITS/8 - 2 clocks after the clock that sampled start. key holds until
// the next start. carry_drop pulses whenever a sum's carry was discarded.
module pubkey_gen
  import pqc_pkg::*;
#(
  parameter int unsigned MSG_BITS = 128,
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [MSG_BITS-1:0] msg,
  output logic [KEY_BITS-1:0] key,
  output logic                busy,
  output logic                done,
  output logic                carry_drop
);
  localparam int unsigned NBYTES = KEY_BITS / 8;
  localparam int unsigned CW     = $clog2(NBYTES + 1);

  initial begin
    assert (KEY_BITS % 8 == 0 && KEY_BITS >= 16)
      else $error("pubkey_gen: KEY_BITS must be a multiple of 8, at least 16");
    assert (MSG_BITS % 8 == 0 && MSG_BITS >= 16)
      else $error("pubkey_gen: MSG_BITS must be a multiple of 8, at least 16");
  end

  logic [15:0]   product;
  byte_t         prev1, prev2;     // k[i-1], k[i-2]
  byte_t         sum;
  logic          carry;
  logic [CW-1:0] count;            // bytes produced so far

  vedic_mul8   u_mul (.a(msg[MSG_BITS-1 -: 8]), .b(msg[7:0]), .c(product));
  mod256_adder u_add (.a(prev1), .b(prev2), .sum(sum), .carry(carry));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key   <= '0;
      prev1 <= '0;
      prev2 <= '0;
      count <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          key   <= KEY_BITS'(product);
          prev2 <= product[15:8];
          prev1 <= product[7:0];
          count <= CW'(2);
          busy  <= (NBYTES > 2);
          done  <= (NBYTES == 2);
        end
      end else begin
        key   <= {key[KEY_BITS-9:0], swap_nibbles(sum)};
        prev2 <= prev1;
        prev1 <= swap_nibbles(sum);
        count <= count + 1'b1;
        if (count == CW'(NBYTES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign carry_drop = busy & carry;
endmodule
