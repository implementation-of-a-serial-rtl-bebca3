// spac_slave_ctrl: protocol engine of the SPAC slave.
//
// Reads the words of an incoming frame as the receiver delivers them:
//  - address word {direction, address}: the frame concerns this slave if
//    it comes from the master (direction 1) and the address is the slave's
//    own, the global broadcast address, or the local broadcast address of
//    the slave's group;
//  - sub-address word {R/W, sub-address};
//  - data field: for a write, each byte is written at once to the resource
//    (byte number 0, 1, ...); for a read request it is the byte count,
//    low byte first, at most two bytes, 1 when empty.
// When the frame ends correctly and was a read request addressed to this
// slave alone (broadcasts are write only), the answer is sent after
// TA_CYCLES: {0, own address}, {R, sub-address}, then the count of bytes
// read from the resource one at a time, then (by the transmitter) the
// checksum. A corrupted frame (bad preamble or checksum, or a cut word)
// makes the slave send an interrupt frame when intr_en is set.
// Frame layout, addressing and broadcasts, byte count rules and the
// interrupt follow the protocol. Writing before the checksum has been
// checked (needed for blocks of any length without a buffer), ignoring
// read requests with more than two count bytes, and the fixed turnaround
// are this design's choices.
//
// Resource side: acc_valid pulses with acc; acc_ack returns (with
// acc_rdata for a read) within a word time.
module spac_slave_ctrl
  import spac_pkg::*;
#(
  parameter int unsigned TA_CYCLES = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  my_addr,
  input  logic [3:0]  my_group,
  input  logic        intr_en,
  // from spac_frame_rx
  input  logic        word_valid,
  input  logic [7:0]  word_byte,
  input  logic [15:0] word_pos,
  input  logic        done,
  input  logic        ok,
  // to spac_frame_tx
  output logic        tx_start,
  output logic        tx_valid,
  output logic [7:0]  tx_byte,
  output logic        tx_last,
  input  logic        tx_ready,
  output logic        brk_req,
  input  logic        tx_busy,
  // resource accesses
  output logic        acc_valid,
  output acc_req_t    acc,
  input  logic        acc_ack,
  input  logic [7:0]  acc_rdata,
  // status
  output logic        frame_err
);
  typedef enum logic [2:0] {A_IDLE, A_WAIT, A_ADDR, A_SUB, A_RDREQ, A_RDWAIT, A_PUSH} st_t;
  st_t st;

  logic        hit, bcast, rnw;
  logic [6:0]  sub;
  logic [7:0]  cnt_lo, cnt_hi;
  logic [15:0] ndata;
  logic [15:0] nread, i;
  logic [7:0]  ta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; hit <= 1'b0; bcast <= 1'b0; rnw <= 1'b0; sub <= '0;
      cnt_lo <= '0; cnt_hi <= '0; ndata <= '0; nread <= '0; i <= '0; ta <= '0;
      tx_start <= 1'b0; tx_valid <= 1'b0; tx_byte <= '0; tx_last <= 1'b0;
      brk_req <= 1'b0; acc_valid <= 1'b0; acc <= '0; frame_err <= 1'b0;
    end else begin
      tx_start  <= 1'b0;
      brk_req   <= 1'b0;
      acc_valid <= 1'b0;
      frame_err <= 1'b0;

      // Incoming frame.
      if (word_valid) begin
        if (word_pos == 16'd0) begin
          hit   <= (word_byte[7] == DIR_MASTER) && addr_match(word_byte[6:0], my_addr, my_group);
          bcast <= word_byte[6:0] != my_addr;
          ndata <= '0;
        end else if (word_pos == 16'd1) begin
          rnw <= word_byte[7];
          sub <= word_byte[6:0];
        end else begin
          ndata <= ndata + 16'd1;
          if (rnw == RW_READ) begin
            if (word_pos == 16'd2) cnt_lo <= word_byte;
            if (word_pos == 16'd3) cnt_hi <= word_byte;
          end else if (hit) begin
            acc_valid <= 1'b1;
            acc.wr    <= 1'b1;
            acc.sub   <= sub;
            acc.idx   <= word_pos - 16'd2;
            acc.wdata <= word_byte;
          end
        end
      end

      if (done) begin
        hit <= 1'b0;
        if (!ok) begin
          frame_err <= 1'b1;
          if (intr_en && st == A_IDLE) brk_req <= 1'b1;
        end else if (hit && !bcast && rnw == RW_READ && ndata <= 16'd2 && st == A_IDLE) begin
          st    <= A_WAIT;
          ta    <= '0;
          nread <= (ndata == 16'd0) ? 16'd1 :
                   (ndata == 16'd1) ? {8'h00, cnt_lo} : {cnt_hi, cnt_lo};
        end
      end

      // Answer.
      unique case (st)
        A_IDLE: ;
        A_WAIT: begin
          if (ta == 8'(TA_CYCLES)) begin
            if (!tx_busy) begin
              tx_start <= 1'b1;
              st <= A_ADDR;
              tx_valid <= 1'b1;
              tx_byte  <= {DIR_SLAVE, my_addr};
              tx_last  <= 1'b0;
            end
          end else ta <= ta + 8'd1;
        end
        A_ADDR: if (tx_valid && tx_ready) begin
          tx_byte <= {RW_READ, sub};
          tx_last <= (nread == 16'd0);
          st      <= A_SUB;
        end
        A_SUB: if (tx_ready) begin
          tx_valid <= 1'b0;
          i <= '0;
          st <= (nread == 16'd0) ? A_IDLE : A_RDREQ;
        end
        A_RDREQ: begin
          acc_valid <= 1'b1;
          acc.wr    <= 1'b0;
          acc.sub   <= sub;
          acc.idx   <= i;
          acc.wdata <= '0;
          st        <= A_RDWAIT;
        end
        A_RDWAIT: if (acc_ack) begin
          tx_valid <= 1'b1;
          tx_byte  <= acc_rdata;
          tx_last  <= (i == nread - 16'd1);
          st       <= A_PUSH;
        end
        A_PUSH: if (tx_ready) begin
          tx_valid <= 1'b0;
          i <= i + 16'd1;
          st <= (i == nread - 16'd1) ? A_IDLE : A_RDREQ;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
