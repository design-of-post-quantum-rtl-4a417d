// encrypt_unit: table-substitution encryption with a key-seeded LFSR.
// Part 1 (table): enc_seed folds message and public key into one byte, which
// seeds the 8-bit LFSR; the LFSR is then clocked 255 times and its 255
// combinations (seed first) are written to table entries 0..254. The table
// is cleared when the run starts, so entry 255 stays 0 and the table is a
// permutation of all 256 byte values.
// Part 2 (substitution): every message byte, most significant first, is used
// as a table address and the entry read there becomes the cipher byte.
// The two parts are the design's; the clear of the table and the
// byte-serial schedule are this implementation's.
// Interface: start pulse (ignored while busy) samples msg and key; the unit
// drives the table's write/clear/read ports; done pulses for one clock when
// cipher is complete, 255 + MSG_BITS/8 clocks after the clock that sampled
// start; table_done pulses when part 1 ends. cipher holds until the next
// start.
module encrypt_unit
  import pqc_pkg::*;
#(
  parameter int unsigned MSG_BITS = 128,
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [MSG_BITS-1:0] msg,
  input  logic [KEY_BITS-1:0] key,
  output logic [MSG_BITS-1:0] cipher,
  output logic                busy,
  output logic                done,
  output logic                table_done,
  // substitution table ports
  output logic                mem_clear,
  output logic                mem_we,
  output byte_t               mem_waddr,
  output byte_t               mem_wdata,
  output byte_t               mem_raddr,
  input  byte_t               mem_rdata
);
  localparam int unsigned NBYTES = MSG_BITS / 8;
  localparam int unsigned CW     = $clog2(NBYTES + 1);

  initial begin
    assert (MSG_BITS % 8 == 0) else $error("encrypt_unit: MSG_BITS must be a multiple of 8");
  end

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_LOOKUP} state_t;
  state_t state;

  byte_t               seed, lfsr_q, idx;
  logic [CW-1:0]       j;
  logic [MSG_BITS-1:0] msg_sr;

  enc_seed #(.MSG_BITS(MSG_BITS), .KEY_BITS(KEY_BITS)) u_seed (.msg(msg), .key(key), .seed(seed));

  lfsr8 u_lfsr (
    .clk(clk), .rst_n(rst_n),
    .load(start && state == S_IDLE), .seed(seed),
    .en(state == S_FILL), .q(lfsr_q)
  );

  assign busy      = (state != S_IDLE);
  assign mem_clear = start && state == S_IDLE;
  assign mem_we    = (state == S_FILL);
  assign mem_waddr = idx;
  assign mem_wdata = lfsr_q;
  assign mem_raddr = msg_sr[MSG_BITS-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      j          <= '0;
      msg_sr     <= '0;
      cipher     <= '0;
      done       <= 1'b0;
      table_done <= 1'b0;
    end else begin
      done       <= 1'b0;
      table_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          msg_sr <= msg;
          idx    <= '0;
          state  <= S_FILL;
        end
        S_FILL: begin
          idx <= idx + 1'b1;
          if (idx == 8'd254) begin
            j          <= '0;
            table_done <= 1'b1;
            state      <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (MSG_BITS > 8) begin
            cipher <= {cipher[MSG_BITS-9:0], mem_rdata};
            msg_sr <= {msg_sr[MSG_BITS-9:0], 8'h00};
          end else begin
            cipher <= MSG_BITS'(mem_rdata);
          end
          j <= j + 1'b1;
          if (j == CW'(NBYTES - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
