// spac_master: SPAC master protocol engine.
//
// Turns one command into one SPAC transaction on a network:
//  - write (cmd_rnw = 0): sends {1, address}, {W, sub-address} and cmd_len
//    data bytes taken from the wd_* stream; no answer is expected;
//  - read (cmd_rnw = 1): sends {1, address}, {R, sub-address} and the byte
//    count cmd_len (empty field for 1, one byte below 256, else two bytes,
//    low byte first), then waits for the slave's answer, checks its
//    address word {0, address}, sub-address word, byte count and checksum,
//    and passes the bytes on rd_valid/rd_data.
// done pulses at the end with ok. A read that gets no answer within
// ANS_TIMEOUT cycles, or an interrupt frame instead, ends with ok = 0.
// intr pulses whenever an interrupt frame (a long high level) is seen on
// the upstream line.
// The frame is sent on MS1 or MS2 according to ms_sel (the other line
// stays idle), and the answer is taken from SM1 or SM2 according to
// sm_sel: the choice of line is the master's, as the protocol requires.
// Frame formats follow the protocol; the command interface toward the
// host (a VME interface in the original system) is this design's.
//
// Timing: 9 bit periods (36 cycles) per word at 10 Mbit/s; the frame
// starts two cycles after the command is accepted.
module spac_master
  import spac_pkg::*;
#(
  parameter int unsigned ANS_TIMEOUT = 400
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_rnw,
  input  logic [6:0]  cmd_addr,
  input  logic [6:0]  cmd_sub,
  input  logic [15:0] cmd_len,
  input  logic        ms_sel,
  input  logic        sm_sel,
  // write data
  input  logic        wd_valid,
  input  logic [7:0]  wd_data,
  output logic        wd_ready,
  // read data and status
  output logic        rd_valid,
  output logic [7:0]  rd_data,
  output logic        done,
  output logic        ok,
  output logic        intr,
  // serial lines
  output logic        ms1,
  output logic        ms2,
  input  logic        sm1,
  input  logic        sm2
);
  typedef enum logic [2:0] {M_IDLE, M_START, M_SEND, M_TXWAIT, M_ANS} st_t;
  st_t st;

  logic        rnw;
  logic [6:0]  addr, sub;
  logic [15:0] len;
  logic [1:0]  nfield;
  logic [15:0] k;
  logic        msel, ssel;
  logic [15:0] tmo;
  logic        seen;
  logic        hdr_ok;
  logic [15:0] got;

  // transmit path
  logic tx_start, tx_valid, tx_last, tx_ready, tx_busy;
  logic [7:0] tx_byte;
  logic ebv, ebval, ebrdy, ebrk, ebusy, line;

  // receive path
  logic [2:0] smp;
  logic bv, bval, in_frame, fend, brk_det;
  logic wv; logic [7:0] wb; logic [15:0] wp;
  logic rdone, rok;

  wire [15:0] total = (rnw ? 16'(nfield) : len) + 16'd2;

  assign cmd_ready = (st == M_IDLE);
  assign tx_start  = (st == M_START);

  always_comb begin
    tx_valid = 1'b0; tx_byte = '0; wd_ready = 1'b0;
    tx_last  = (k == total - 16'd1);
    if (st == M_SEND) begin
      if (k == 16'd0) begin
        tx_valid = 1'b1; tx_byte = {DIR_MASTER, addr};
      end else if (k == 16'd1) begin
        tx_valid = 1'b1; tx_byte = {rnw, sub};
      end else if (rnw) begin
        tx_valid = 1'b1; tx_byte = (k == 16'd2) ? len[7:0] : len[15:8];
      end else begin
        tx_valid = wd_valid; tx_byte = wd_data; wd_ready = tx_ready;
      end
    end
  end

  spac_frame_tx u_tx (.clk, .rst_n, .start(tx_start), .in_valid(tx_valid), .in_byte(tx_byte),
                      .in_last(tx_last), .in_ready(tx_ready), .brk_req(1'b0),
                      .bit_valid(ebv), .bit_val(ebval), .bit_ready(ebrdy), .enc_busy(ebusy),
                      .brk(ebrk), .busy(tx_busy));

  spac_manch_enc u_enc (.clk, .rst_n, .bit_valid(ebv), .bit_val(ebval), .bit_ready(ebrdy),
                        .brk(ebrk), .line, .busy(ebusy));

  assign ms1 = msel ? 1'b0 : line;
  assign ms2 = msel ? line : 1'b0;

  spac_sampler u_smp (.clk, .rst_n, .line_in(ssel ? sm2 : sm1), .smp);

  spac_manch_dec u_dec (.clk, .rst_n, .smp, .bit_valid(bv),
                        .bit_val(bval), .in_frame, .frame_end(fend), .brk_det);

  spac_frame_rx u_rx (.clk, .rst_n, .bit_valid(bv), .bit_val(bval), .frame_end(fend),
                      .word_valid(wv), .word_byte(wb), .word_pos(wp), .done(rdone), .ok(rok));

  assign intr = brk_det;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; rnw <= 1'b0; addr <= '0; sub <= '0; len <= '0; nfield <= '0; k <= '0;
      msel <= 1'b0; ssel <= 1'b0; tmo <= '0; seen <= 1'b0; hdr_ok <= 1'b0; got <= '0;
      rd_valid <= 1'b0; rd_data <= '0; done <= 1'b0; ok <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (cmd_valid) begin
          rnw <= cmd_rnw; addr <= cmd_addr; sub <= cmd_sub; len <= cmd_len;
          nfield <= (cmd_len == 16'd1) ? 2'd0 : (cmd_len[15:8] == 8'd0) ? 2'd1 : 2'd2;
          msel <= ms_sel; ssel <= sm_sel;
          k <= '0;
          st <= M_START;
        end
        M_START: st <= M_SEND;
        M_SEND: if (tx_valid && tx_ready) begin
          k <= k + 16'd1;
          if (tx_last) st <= M_TXWAIT;
        end
        M_TXWAIT: if (!tx_busy) begin
          if (rnw) begin
            st <= M_ANS; tmo <= '0; seen <= 1'b0; hdr_ok <= 1'b1; got <= '0;
          end else begin
            st <= M_IDLE; done <= 1'b1; ok <= 1'b1;
          end
        end
        M_ANS: begin
          if (in_frame) seen <= 1'b1;
          if (!seen && !in_frame) tmo <= tmo + 16'd1;
          if (wv) begin
            if (wp == 16'd0 && wb != {DIR_SLAVE, addr}) hdr_ok <= 1'b0;
            if (wp == 16'd1 && wb != {RW_READ, sub})    hdr_ok <= 1'b0;
            if (wp >= 16'd2) begin
              rd_valid <= 1'b1; rd_data <= wb; got <= got + 16'd1;
            end
          end
          if (brk_det) begin
            st <= M_IDLE; done <= 1'b1; ok <= 1'b0;
          end else if (rdone) begin
            st <= M_IDLE; done <= 1'b1; ok <= rok && hdr_ok && (got == len);
          end else if (tmo == 16'(ANS_TIMEOUT)) begin
            st <= M_IDLE; done <= 1'b1; ok <= 1'b0;
          end
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
