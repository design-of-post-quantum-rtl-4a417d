// pqc_keygen_top: key generation unit, encryption module and decryption
// module of the message-dependent asymmetric scheme, wired as one design.
//  * start samples msg and starts both key generators:
//      pubkey_gen  -> MSG_BITS-dependent public key of PUB_BITS bits,
//      privkey_gen -> PRIV_BITS-bit private key (the one-time password).
//  * When the public key is complete the encryption module starts on the
//    same message: it fills the 16 x 16 substitution table from the
//    key-seeded 8-bit LFSR and substitutes every message byte (cipher).
//  * dec_start, accepted once cipher and private key are both ready
//    (dec_ready), compares the user's token with the private key and, if
//    they match, recovers plain from cipher through the table's search port;
//    otherwise otp_invalid is raised.
// Sequencing flags and the acceptance rule for dec_start are this
// implementation's; the blocks and their data flow follow the design.
// Timing at the defaults, clocks after the clock that samples start until the
// ready flag is seen: pub_ready 15, enc_ready 15 + 271 + 1 = 287, priv_ready
// 512. dec_done comes 16 clocks after the clock that samples dec_start, or
// with that clock for a wrong OTP. msg must stay stable until pub_ready.
module pqc_keygen_top
  import pqc_pkg::*;
#(
  parameter int unsigned MSG_BITS  = 128,
  parameter int unsigned PUB_BITS  = 128,
  parameter int unsigned PRIV_BITS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // key generation and encryption
  input  logic                 start,
  input  logic [MSG_BITS-1:0]  msg,
  output logic [PUB_BITS-1:0]  pubkey,
  output logic [PRIV_BITS-1:0] privkey,
  output logic [MSG_BITS-1:0]  cipher,
  output logic                 pub_ready,
  output logic                 priv_ready,
  output logic                 enc_ready,
  output logic                 carry_drop,
  // decryption
  output logic                 dec_ready,
  input  logic                 dec_start,
  input  logic [PRIV_BITS-1:0] token,
  output logic [MSG_BITS-1:0]  plain,
  output logic                 dec_done,
  output logic                 otp_ok,
  output logic                 otp_invalid,
  output logic                 not_found
);
  logic  pub_busy, pub_done, priv_busy, priv_done;
  logic  enc_busy, enc_done, table_done, dec_busy;
  logic  idle, go;
  logic  mem_clear, mem_we, mem_found;
  byte_t mem_waddr, mem_wdata, mem_raddr, mem_rdata, mem_sdata, mem_saddr;

  assign idle      = !(pub_busy || priv_busy || enc_busy || dec_busy);
  assign go        = start && idle;
  assign dec_ready = enc_ready && priv_ready && !dec_busy;

  pubkey_gen #(.MSG_BITS(MSG_BITS), .KEY_BITS(PUB_BITS)) u_pub (
    .clk(clk), .rst_n(rst_n), .start(go), .msg(msg),
    .key(pubkey), .busy(pub_busy), .done(pub_done), .carry_drop(carry_drop)
  );

  privkey_gen #(.MSG_BITS(MSG_BITS), .PRIV_BITS(PRIV_BITS)) u_priv (
    .clk(clk), .rst_n(rst_n), .start(go), .msg(msg),
    .privkey(privkey), .busy(priv_busy), .done(priv_done)
  );

  encrypt_unit #(.MSG_BITS(MSG_BITS), .KEY_BITS(PUB_BITS)) u_enc (
    .clk(clk), .rst_n(rst_n), .start(pub_done), .msg(msg), .key(pubkey),
    .cipher(cipher), .busy(enc_busy), .done(enc_done), .table_done(table_done),
    .mem_clear(mem_clear), .mem_we(mem_we), .mem_waddr(mem_waddr),
    .mem_wdata(mem_wdata), .mem_raddr(mem_raddr), .mem_rdata(mem_rdata)
  );

  table_memory u_table (
    .clk(clk), .rst_n(rst_n), .clear(mem_clear),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata),
    .sdata(mem_sdata), .found(mem_found), .saddr(mem_saddr)
  );

  decrypt_unit #(.MSG_BITS(MSG_BITS), .PRIV_BITS(PRIV_BITS)) u_dec (
    .clk(clk), .rst_n(rst_n), .start(dec_start && dec_ready),
    .token(token), .privkey(privkey), .cipher(cipher),
    .plain(plain), .busy(dec_busy), .done(dec_done),
    .otp_ok(otp_ok), .otp_invalid(otp_invalid), .not_found(not_found),
    .mem_sdata(mem_sdata), .mem_found(mem_found), .mem_saddr(mem_saddr)
  );

  // readiness flags, cleared by a new start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pub_ready  <= 1'b0;
      priv_ready <= 1'b0;
      enc_ready  <= 1'b0;
    end else if (go) begin
      pub_ready  <= 1'b0;
      priv_ready <= 1'b0;
      enc_ready  <= 1'b0;
    end else begin
      if (pub_done)  pub_ready  <= 1'b1;
      if (priv_done) priv_ready <= 1'b1;
      if (enc_done)  enc_ready  <= 1'b1;
    end
  end

  // the table is filled before any byte is substituted
  a_fill_before_cipher: assert property (@(posedge clk) disable iff (!rst_n) enc_done |-> !table_done)
    else $error("pqc_keygen_top: table and cipher completed together");
endmodule
