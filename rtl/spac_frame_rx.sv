// spac_frame_rx: SPAC frame receiver (word assembly, preamble and checksum).
//
// Takes the decoded bit stream and cuts it into 9-bit words: eight data
// bits, least significant first, then the continue bit. The first word of
// a frame must be the preamble ($35 with continue = 1). Every following
// word with continue = 1 is passed on at once on word_valid/word_byte with
// its position (0 = address word, 1 = sub-address word, 2.. = data field).
// The word with continue = 0 is the checksum, compared with the sum modulo
// 256 of all bytes after the preamble (the checksum algorithm is this
// design's choice; the protocol only says it covers every byte but the
// preamble).
// When the decoder reports the end of the frame, done pulses with ok = 1 if
// the preamble was right, a checksum word was received and matched, and
// no bit followed it; otherwise ok = 0 (corrupted frame).
//
// Timing: word_valid one cycle after the ninth bit; done one cycle after
// frame_end.
module spac_frame_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_valid,
  input  logic        bit_val,
  input  logic        frame_end,
  output logic        word_valid,
  output logic [7:0]  word_byte,
  output logic [15:0] word_pos,
  output logic        done,
  output logic        ok
);
  import spac_pkg::*;

  typedef enum logic [1:0] {S_PRE, S_WORDS, S_AFTER, S_BAD} st_t;
  st_t st;

  logic [8:0] sh;
  logic [3:0] nbits;
  logic [7:0] sum;
  logic       chk_ok;
  logic [15:0] pos;

  wire [8:0] w = {bit_val, sh[8:1]};   // word once the ninth bit arrives

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_PRE; sh <= '0; nbits <= '0; sum <= '0; chk_ok <= 1'b0; pos <= '0;
      word_valid <= 1'b0; word_byte <= '0; word_pos <= '0; done <= 1'b0; ok <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      done <= 1'b0;
      if (frame_end) begin
        done   <= 1'b1;
        ok     <= (st == S_AFTER) && chk_ok && (nbits == 4'd0);
        st     <= S_PRE;
        nbits  <= '0;
        sum    <= '0;
        pos    <= '0;
        chk_ok <= 1'b0;
      end else if (bit_valid) begin
        sh <= w;
        if (nbits == 4'(WORD_BITS - 1)) begin
          nbits <= '0;
          unique case (st)
            S_PRE:   st <= (w == {1'b1, PREAMBLE}) ? S_WORDS : S_BAD;
            S_WORDS: begin
              if (w[8]) begin
                word_valid <= 1'b1;
                word_byte  <= w[7:0];
                word_pos   <= pos;
                pos        <= pos + 16'd1;
                sum        <= chk_add(sum, w[7:0]);
              end else begin
                chk_ok <= (w[7:0] == sum) && (pos >= 16'd2);
                st     <= S_AFTER;
              end
            end
            S_AFTER: st <= S_BAD;   // bits after the checksum
            default: st <= S_BAD;
          endcase
        end else begin
          nbits <= nbits + 4'd1;
          if (st == S_AFTER) st <= S_BAD;
        end
      end
    end
  end

endmodule
