// spac_par_if: parallel interface from the SPAC slave to its host board.
//
// The board's resources (8, 16 or 32-bit registers, or byte blocks of any
// length) are reached one byte at a time: pi_addr carries the 7-bit
// sub-address of the resource and pi_idx the byte number inside it (0 for
// the first byte of a frame's data field, then 1, 2, ...; for a register
// byte 0 is the least significant byte). A write is a one-cycle pi_wr
// strobe with pi_wdata; a read is a one-cycle pi_rd strobe and pi_rdata is
// sampled RD_WAIT cycles later. Address, index and write data are held
// stable from the strobe until the next access.
// That the slave reads and writes board resources through a parallel
// interface, and what the resources may be, follows the protocol; the bus
// signals and timing are this design's.
//
// Request side: req_valid for one cycle with req; ack pulses when done
// (one cycle after the strobe for a write, RD_WAIT+1 for a read) with
// rdata valid in that cycle.
module spac_par_if
  import spac_pkg::*;
#(
  parameter int unsigned RD_WAIT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  acc_req_t    req,
  output logic        ack,
  output logic [7:0]  rdata,
  output logic [6:0]  pi_addr,
  output logic [15:0] pi_idx,
  output logic [7:0]  pi_wdata,
  output logic        pi_wr,
  output logic        pi_rd,
  input  logic [7:0]  pi_rdata
);
  logic [3:0] wait_cnt;
  logic       rd_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi_addr <= '0; pi_idx <= '0; pi_wdata <= '0; pi_wr <= 1'b0; pi_rd <= 1'b0;
      ack <= 1'b0; rdata <= '0; wait_cnt <= '0; rd_busy <= 1'b0;
    end else begin
      pi_wr <= 1'b0;
      pi_rd <= 1'b0;
      ack   <= 1'b0;
      if (req_valid && !rd_busy) begin
        pi_addr  <= req.sub;
        pi_idx   <= req.idx;
        pi_wdata <= req.wdata;
        if (req.wr) begin
          pi_wr <= 1'b1;
          ack   <= 1'b1;
        end else begin
          pi_rd    <= 1'b1;
          rd_busy  <= 1'b1;
          wait_cnt <= '0;
        end
      end else if (rd_busy) begin
        if (wait_cnt == 4'(RD_WAIT - 1)) begin
          rdata   <= pi_rdata;
          ack     <= 1'b1;
          rd_busy <= 1'b0;
        end else begin
          wait_cnt <= wait_cnt + 4'd1;
        end
      end
    end
  end

endmodule
