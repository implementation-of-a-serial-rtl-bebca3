// spac_frame_tx: SPAC frame transmitter.
//
// On start it sends the preamble word ($35, continue 1), then one word per
// byte pushed on in_valid/in_byte (continue 1), and after the byte marked
// in_last the checksum word (sum modulo 256 of the bytes, continue 0).
// Bytes are taken into a one-byte holding register, which is free again
// as soon as its byte has moved into the shift register, so the source has
// a whole word time (36 cycles) to supply the next byte. If the holding
// register is still empty when a word ends, the frame is closed with the
// checksum of what was sent (the source is expected to keep up).
// brk_req sends an interrupt frame instead: the line is held high for
// INTR_CYCLES cycles (about 1 us).
// Framing follows the protocol; the checksum algorithm and the byte
// handshake are this design's.
//
// Drives spac_manch_enc through its bit handshake; busy covers the whole
// frame including the last bit on the line.
module spac_frame_tx #(
  parameter int unsigned INTR_CYCLES = spac_pkg::INTR_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  input  logic       in_last,
  output logic       in_ready,
  input  logic       brk_req,
  output logic       bit_valid,
  output logic       bit_val,
  input  logic       bit_ready,
  input  logic       enc_busy,
  output logic       brk,
  output logic       busy
);
  import spac_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_SHIFT, T_FLUSH, T_BRK} st_t;
  st_t st;

  logic [8:0] sh;
  logic [3:0] nbits;
  logic [7:0] sum;
  logic       hold_full;
  logic [7:0] hold;
  logic       sent_last;   // the checksum word is in the shifter
  logic       got_last;    // the last data byte has been taken
  logic [7:0] bcnt;

  assign in_ready  = (st == T_SHIFT) && !hold_full && !got_last;
  assign bit_valid = (st == T_SHIFT);
  assign bit_val   = sh[0];
  assign brk       = (st == T_BRK);
  assign busy      = (st != T_IDLE) || enc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; sh <= '0; nbits <= '0; sum <= '0;
      hold_full <= 1'b0; hold <= '0;
      sent_last <= 1'b0; got_last <= 1'b0; bcnt <= '0;
    end else begin
      if (in_valid && in_ready) begin
        hold_full <= 1'b1;
        hold      <= in_byte;
        got_last  <= in_last;
      end
      unique case (st)
        T_IDLE: begin
          if (brk_req) begin
            st <= T_BRK; bcnt <= '0;
          end else if (start) begin
            st <= T_SHIFT;
            sh <= {1'b1, PREAMBLE};
            nbits <= '0; sum <= '0;
            hold_full <= 1'b0;
            sent_last <= 1'b0; got_last <= 1'b0;
          end
        end
        T_SHIFT: if (bit_ready) begin
          if (nbits == 4'(WORD_BITS - 1)) begin
            nbits <= '0;
            if (sent_last) begin
              st <= T_FLUSH;
            end else if (hold_full) begin
              sh        <= {1'b1, hold};
              sum       <= chk_add(sum, hold);
              hold_full <= 1'b0;
            end else begin
              sh        <= {1'b0, sum};
              sent_last <= 1'b1;
            end
          end else begin
            sh    <= {1'b0, sh[8:1]};
            nbits <= nbits + 4'd1;
          end
        end
        T_FLUSH: if (!enc_busy) st <= T_IDLE;
        T_BRK: begin
          if (bcnt == 8'(INTR_CYCLES - 1)) st <= T_IDLE;
          else bcnt <= bcnt + 8'd1;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
