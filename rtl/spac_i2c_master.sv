// spac_i2c_master: I2C bus master engine of the SPAC slave, for two buses.
//
// One transaction per start pulse: START, the I2C address byte (7-bit
// device address and R/W bit, as given), its acknowledge, then len data
// bytes (0..15) and STOP. For a write the bytes come from the emission
// FIFO (tx_*), and each must be acknowledged by the device; a missing
// acknowledge (or an empty FIFO) stops the transaction and sets nack. For
// a read the bytes go to the reception FIFO (rx_*); the master
// acknowledges every byte but the last. Bytes are sent most significant
// bit first, as I2C requires.
// The SCL period is 16*(div+1) clock cycles: 2.5 MHz for div = 0 and about
// 156 kHz for div = 15 at 40 MHz, the range the protocol gives. Each bit is
// four quarter periods: SCL low (SDA changes), high, high (SDA sampled at
// its end), low. Both lines are open drain: *_oe = 1 pulls the line low.
// Only the bus chosen by bus_sel (latched at start) is driven. Clock
// stretching by a device and multi-master arbitration are not supported.
// Two buses, up to 15 bytes and the clock range follow the protocol; the
// transaction format and the rest are this design's.
module spac_i2c_master (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] addr_byte,
  input  logic [3:0] len,
  input  logic [3:0] div,
  input  logic       bus_sel,
  input  logic [7:0] tx_data,
  input  logic       tx_empty,
  output logic       tx_pop,
  output logic [7:0] rx_data,
  output logic       rx_push,
  output logic       busy,
  output logic       nack,
  output logic       done,
  output logic [1:0] scl_oe,
  output logic [1:0] sda_oe,
  input  logic [1:0] sda_i
);
  typedef enum logic [2:0] {I_IDLE, I_START, I_WBYTE, I_WACK, I_RBYTE, I_RACK, I_STOP} st_t;
  st_t st;

  logic [9:0] qcnt;      // cycles inside the quarter period
  logic [1:0] ph;        // quarter period inside the bit
  logic [2:0] bitn;
  logic [7:0] sh;
  logic [3:0] left;      // data bytes still to transfer
  logic       rnw;
  logic       bsel;
  logic [3:0] div_q;
  logic [1:0] sda_s;     // synchronizer of the selected SDA line
  logic       scl, sda;  // line levels the master wants (1 = released)

  wire [9:0] qlen = {4'd0, div_q, 2'b00} + 10'd4;   // 4*(div+1)
  wire tick = (qcnt == qlen - 10'd1);
  wire bit_end = tick && (ph == 2'd3);
  wire sample = tick && (ph == 2'd2);

  assign busy = (st != I_IDLE);

  always_comb begin
    scl = 1'b1; sda = 1'b1;
    unique case (st)
      I_IDLE:  begin scl = 1'b1; sda = 1'b1; end
      I_START: begin scl = (ph != 2'd3); sda = (ph < 2'd2); end
      I_WBYTE: begin scl = (ph == 2'd1) || (ph == 2'd2); sda = sh[7]; end
      I_WACK:  begin scl = (ph == 2'd1) || (ph == 2'd2); sda = 1'b1; end
      I_RBYTE: begin scl = (ph == 2'd1) || (ph == 2'd2); sda = 1'b1; end
      I_RACK:  begin scl = (ph == 2'd1) || (ph == 2'd2); sda = (left == 4'd0); end
      I_STOP:  begin scl = (ph != 2'd0); sda = (ph >= 2'd2); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_oe <= '0; sda_oe <= '0;
    end else begin
      scl_oe <= {bsel & ~scl, ~bsel & ~scl};
      sda_oe <= {bsel & ~sda, ~bsel & ~sda};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; qcnt <= '0; ph <= '0; bitn <= '0; sh <= '0; left <= '0;
      rnw <= 1'b0; bsel <= 1'b0; div_q <= '0; sda_s <= 2'b11;
      tx_pop <= 1'b0; rx_push <= 1'b0; rx_data <= '0; nack <= 1'b0; done <= 1'b0;
    end else begin
      sda_s  <= {sda_s[0], sda_i[bsel]};
      tx_pop <= 1'b0;
      rx_push <= 1'b0;
      done <= 1'b0;
      if (st == I_IDLE) begin
        qcnt <= '0; ph <= '0;
        if (start) begin
          st <= I_START;
          sh <= addr_byte;
          rnw <= addr_byte[0];
          left <= len;
          bsel <= bus_sel;
          div_q <= div;
          nack <= 1'b0;
          bitn <= '0;
        end
      end else begin
        qcnt <= tick ? '0 : qcnt + 10'd1;
        if (tick) ph <= ph + 2'd1;
        if (sample && st == I_RBYTE) sh <= {sh[6:0], sda_s[1]};
        if (sample && st == I_WACK && sda_s[1]) nack <= 1'b1;
        if (bit_end) begin
          unique case (st)
            I_START: begin st <= I_WBYTE; bitn <= '0; end
            I_WBYTE: begin
              if (bitn == 3'd7) st <= I_WACK;
              else begin sh <= {sh[6:0], 1'b1}; bitn <= bitn + 3'd1; end
            end
            I_WACK: begin
              bitn <= '0;
              if (nack || left == 4'd0) st <= I_STOP;
              else if (rnw) st <= I_RBYTE;
              else if (tx_empty) begin nack <= 1'b1; st <= I_STOP; end
              else begin
                sh <= tx_data; tx_pop <= 1'b1;
                left <= left - 4'd1;
                st <= I_WBYTE;
              end
            end
            I_RBYTE: begin
              if (bitn == 3'd7) begin
                st <= I_RACK;
                rx_data <= sh; rx_push <= 1'b1;
                left <= left - 4'd1;
              end else bitn <= bitn + 3'd1;
            end
            I_RACK: begin
              bitn <= '0;
              st <= (left == 4'd0) ? I_STOP : I_RBYTE;
            end
            I_STOP: begin st <= I_IDLE; done <= 1'b1; end
            default: st <= I_IDLE;
          endcase
        end
      end
    end
  end

endmodule
