// privkey_gen: private key (one-time password) generator.
// On start the 9-bit LFSR (x^8 + x^7 + x^5 + x^4 + 1) is loaded with message
// bits [SEED_LSB+8:SEED_LSB] and then stepped for RUN_LEN clocks, producing
// the 511 combinations of its cycle. Combination n (n = 1 is the seed) is
// written to entry n mod 256 of a 256 x 9-bit combination buffer, so when
// the run ends the buffer holds the last 256 combinations. The key is the
// low PRIV_BITS bits of the concatenation
//   {entry[FIRST_ENTRY], entry[FIRST_ENTRY + ENTRY_STEP], ...}
// (as many entries as PRIV_BITS needs, indices mod 256). With the defaults
// that is the 16-bit key {entry 242, entry 244}[15:0] of the design's
// example. The write order of the buffer is this implementation's choice, made
// so that the design's worked example comes out; how longer keys pick their
// entries is also this implementation's choice.
// Interface: start pulse (ignored while busy); busy while the LFSR runs;
// done pulses one clock when privkey is valid, RUN_LEN clocks after the clock
// that sampled start. privkey holds until the next start.
module privkey_gen #(
  parameter int unsigned MSG_BITS    = 128,
  parameter int unsigned PRIV_BITS   = 16,
  parameter int unsigned SEED_LSB    = 24,
  parameter int unsigned RUN_LEN     = 511,
  parameter int unsigned FIRST_ENTRY = 242,
  parameter int unsigned ENTRY_STEP  = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [MSG_BITS-1:0]  msg,
  output logic [PRIV_BITS-1:0] privkey,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned NENT = (PRIV_BITS + 8) / 9;   // entries per key
  localparam int unsigned CW   = $clog2(RUN_LEN + 2);

  initial begin
    assert (SEED_LSB + 9 <= MSG_BITS)
      else $error("privkey_gen: seed bits lie outside the message");
  end

  logic [8:0]    lfsr_q;
  logic [8:0]    comb_buf [256];
  logic [CW-1:0] n;                 // number of the combination now in the LFSR
  logic [NENT*9-1:0] cat;

  lfsr9 u_lfsr (
    .clk(clk), .rst_n(rst_n),
    .load(start & ~busy), .seed(msg[SEED_LSB +: 9]),
    .en(busy), .q(lfsr_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          n    <= CW'(1);
          busy <= 1'b1;
        end
      end else begin
        n <= n + 1'b1;
        if (n == CW'(RUN_LEN)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // combination buffer: cleared on reset, written while the LFSR runs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 256; i++) comb_buf[i] <= '0;
    end else if (busy) begin
      comb_buf[n[7:0]] <= lfsr_q;
    end
  end

  always_comb begin
    cat = '0;
    for (int j = 0; j < NENT; j++)
      cat[(NENT-1-j)*9 +: 9] = comb_buf[8'((FIRST_ENTRY + j*ENTRY_STEP) % 256)];
  end

  assign privkey = cat[PRIV_BITS-1:0];
endmodule
