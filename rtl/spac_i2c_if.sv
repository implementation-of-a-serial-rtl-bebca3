// spac_i2c_if: the slave's I2C master interface, as seen from SPAC.
//
// The SPAC master drives the I2C buses of a board by reading and writing
// internal registers of the slave, reached at reserved sub-addresses (the
// sub-address values are this design's choice, see spac_pkg):
//   SA_I2C_DATA  write: each byte goes into the 16-byte emission FIFO
//                read:  each byte comes from the 16-byte reception FIFO
//                       (0 when it is empty)
//   SA_I2C_CFG   byte 0: [3:0] SCL divider (2.5 MHz / (div+1)), [4] bus
//   SA_I2C_CMD   byte 0: I2C address byte (device address << 1 | R/W)
//                byte 1: number of data bytes (0..15); writing it starts
//                        the transaction
//   SA_I2C_STAT  byte 0 (read only): [0] busy, [1] no acknowledge,
//                [2] emission FIFO empty, [3] reception FIFO empty
// The FIFO sizes, the 15-byte limit, the two buses and the clock range
// follow the protocol; the register layout is this design's.
// Request side: like spac_par_if, ack one cycle after req_valid.
module spac_i2c_if
  import spac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  acc_req_t   req,
  output logic       ack,
  output logic [7:0] rdata,
  output logic [1:0] scl_oe,
  output logic [1:0] sda_oe,
  input  logic [1:0] sda_i
);
  logic [3:0] div;
  logic       bus_sel;
  logic [7:0] addr_byte;
  logic [3:0] len;
  logic       start;

  logic [7:0] tx_dout, rx_dout, rx_din;
  logic       tx_empty, tx_full, rx_empty, rx_full, tx_pop, rx_push;
  logic [4:0] tx_count, rx_count;
  logic       busy, nack, done;

  wire wr = req_valid && req.wr;
  wire rd = req_valid && !req.wr;

  spac_fifo #(.WIDTH(8), .DEPTH(16)) u_txf (
    .clk, .rst_n, .clear(1'b0),
    .push(wr && req.sub == SA_I2C_DATA), .din(req.wdata),
    .pop(tx_pop), .dout(tx_dout), .empty(tx_empty), .full(tx_full), .count(tx_count));

  spac_fifo #(.WIDTH(8), .DEPTH(16)) u_rxf (
    .clk, .rst_n, .clear(1'b0),
    .push(rx_push), .din(rx_din),
    .pop(rd && req.sub == SA_I2C_DATA), .dout(rx_dout), .empty(rx_empty), .full(rx_full),
    .count(rx_count));

  spac_i2c_master u_m (
    .clk, .rst_n, .start, .addr_byte, .len, .div, .bus_sel,
    .tx_data(tx_dout), .tx_empty, .tx_pop, .rx_data(rx_din), .rx_push,
    .busy, .nack, .done, .scl_oe, .sda_oe, .sda_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; bus_sel <= 1'b0; addr_byte <= '0; len <= '0; start <= 1'b0;
      ack <= 1'b0; rdata <= '0;
    end else begin
      start <= 1'b0;
      ack   <= req_valid;
      if (wr) begin
        unique case (req.sub)
          SA_I2C_CFG: if (req.idx == 16'd0) begin
            div <= req.wdata[3:0]; bus_sel <= req.wdata[4];
          end
          SA_I2C_CMD: begin
            if (req.idx == 16'd0) addr_byte <= req.wdata;
            if (req.idx == 16'd1) begin
              len <= req.wdata[3:0];
              start <= !busy;
            end
          end
          default: ;
        endcase
      end
      if (rd) begin
        unique case (req.sub)
          SA_I2C_DATA: rdata <= rx_empty ? 8'h00 : rx_dout;
          SA_I2C_CFG:  rdata <= {3'b000, bus_sel, div};
          SA_I2C_CMD:  rdata <= (req.idx == 16'd0) ? addr_byte : {4'h0, len};
          SA_I2C_STAT: rdata <= {4'h0, rx_empty, tx_empty, nack, busy | start};
          default:     rdata <= 8'h00;
        endcase
      end
    end
  end

endmodule
