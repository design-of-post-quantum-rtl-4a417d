// enc_seed: forms the 8-bit seed of the encryption LFSR from the message and
// the public key (combinational).
//  * message: its first (most significant) 128 bits are used; a shorter
//    message is padded with zeros after its last bit to 128 bits;
//  * key: all its 128-bit chunks are XORed into one (a shorter key, or a
//    short last chunk, is padded with zeros after its last bit);
//  * the two 128-bit values are added in GF(2) (XOR) and the 16 bytes of
//    the result are XORed together into one byte.
// The steps are the design's; the side on which short operands are padded
// is this implementation's choice.
module enc_seed #(
  parameter int unsigned MSG_BITS = 128,
  parameter int unsigned KEY_BITS = 128
) (
  input  logic [MSG_BITS-1:0] msg,
  input  logic [KEY_BITS-1:0] key,
  output logic [7:0]          seed
);
  localparam int unsigned NCHUNK   = (KEY_BITS + 127) / 128;
  localparam int unsigned KPAD     = NCHUNK * 128;
  localparam int unsigned MPAD     = (MSG_BITS > 128) ? MSG_BITS : 128;

  logic [MPAD-1:0] m_ext;
  logic [KPAD-1:0] k_ext;
  logic [127:0]    m128, k128, mix;

  always_comb begin
    m_ext = '0;
    m_ext[MPAD-1 -: MSG_BITS] = msg;
    m128  = m_ext[MPAD-1 -: 128];

    k_ext = '0;
    k_ext[KPAD-1 -: KEY_BITS] = key;
    k128  = '0;
    for (int c = 0; c < NCHUNK; c++) k128 ^= k_ext[c*128 +: 128];

    mix  = m128 ^ k128;
    seed = '0;
    for (int b = 0; b < 16; b++) seed ^= mix[b*8 +: 8];
  end
endmodule
