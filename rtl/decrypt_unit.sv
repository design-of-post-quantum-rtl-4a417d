// decrypt_unit: OTP-checked inverse table substitution.
// On start the OTP (token) offered by the user is compared with the
// generated private key. If they differ, otp_invalid is raised, plain is
// cleared and the unit finishes at once. If they match, every cipher byte,
// most significant first, is searched for in the substitution table; the
// row and column where it is found, {row, column}, is the plain byte.
// The check and the row/column recovery are the design's; the handling of
// a byte that is not in the table (plain byte 0, not_found raised) and the
// byte-serial schedule are this implementation's.
// Interface: start pulse (ignored while busy) samples token, privkey and
// cipher; the unit drives the table's search port; done pulses one clock
// when finished: together with the clock that samples start for a wrong
// OTP, MSG_BITS/8 clocks after it for a right one. otp_ok, otp_invalid, not_found and plain hold until the next
// start.
module decrypt_unit
  import pqc_pkg::*;
#(
  parameter int unsigned MSG_BITS  = 128,
  parameter int unsigned PRIV_BITS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [PRIV_BITS-1:0] token,
  input  logic [PRIV_BITS-1:0] privkey,
  input  logic [MSG_BITS-1:0]  cipher,
  output logic [MSG_BITS-1:0]  plain,
  output logic                 busy,
  output logic                 done,
  output logic                 otp_ok,
  output logic                 otp_invalid,
  output logic                 not_found,
  // substitution table search port
  output byte_t                mem_sdata,
  input  logic                 mem_found,
  input  byte_t                mem_saddr
);
  localparam int unsigned NBYTES = MSG_BITS / 8;
  localparam int unsigned CW     = $clog2(NBYTES + 1);

  initial begin
    assert (MSG_BITS % 8 == 0) else $error("decrypt_unit: MSG_BITS must be a multiple of 8");
  end

  logic [MSG_BITS-1:0] cip_sr;
  logic [CW-1:0]       j;

  assign mem_sdata = cip_sr[MSG_BITS-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cip_sr      <= '0;
      plain       <= '0;
      j           <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      otp_ok      <= 1'b0;
      otp_invalid <= 1'b0;
      not_found   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          plain     <= '0;
          not_found <= 1'b0;
          j         <= '0;
          cip_sr    <= cipher;
          if (token == privkey) begin
            otp_ok      <= 1'b1;
            otp_invalid <= 1'b0;
            busy        <= 1'b1;
          end else begin
            otp_ok      <= 1'b0;
            otp_invalid <= 1'b1;
            done        <= 1'b1;
          end
        end
      end else begin
        if (MSG_BITS > 8) begin
          plain  <= {plain[MSG_BITS-9:0], mem_found ? mem_saddr : 8'h00};
          cip_sr <= {cip_sr[MSG_BITS-9:0], 8'h00};
        end else begin
          plain <= MSG_BITS'(mem_found ? mem_saddr : 8'h00);
        end
        if (!mem_found) not_found <= 1'b1;
        j <= j + 1'b1;
        if (j == CW'(NBYTES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
