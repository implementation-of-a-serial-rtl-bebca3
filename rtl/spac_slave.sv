// spac_slave: the SPAC slave ASIC.
//
// Receives frames from the master on the duplicated downstream lines
// MS1/MS2 (whichever is active), decodes them, accesses the host board
// through its parallel interface or drives the board's two I2C buses, and
// sends its answers, identical on both upstream lines SM1 and SM2. A
// corrupted frame is answered by an interrupt frame (SM held high for
// about 1 us) when intr_en is tied high.
//
//   ms1, ms2 -> spac_sampler x2 -> spac_line_sel -> spac_manch_dec -> spac_frame_rx
//            -> spac_slave_ctrl -> spac_par_if (sub-addresses below $7C)
//                               -> spac_i2c_if (sub-addresses $7C..$7F)
//            -> spac_frame_tx -> spac_manch_enc -> sm1, sm2
//
// Configuration pins: slave_addr (7-bit address), bcast_group (4-bit local
// broadcast group) and intr_en. All logic runs on the 40 MHz clock; the
// serial inputs are asynchronous and synchronized inside.
// The block structure follows the slave's functional description; the
// internal interfaces are this design's.
//
// Timing: the first bit of a read answer starts nine bit periods (0.9 us)
// after the last bit of the request has ended.
module spac_slave
  import spac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  slave_addr,
  input  logic [3:0]  bcast_group,
  input  logic        intr_en,
  input  logic        ms1,
  input  logic        ms2,
  output logic        sm1,
  output logic        sm2,
  // parallel interface to the board
  output logic [6:0]  pi_addr,
  output logic [15:0] pi_idx,
  output logic [7:0]  pi_wdata,
  output logic        pi_wr,
  output logic        pi_rd,
  input  logic [7:0]  pi_rdata,
  // two I2C buses, open drain
  output logic [1:0]  scl_oe,
  output logic [1:0]  sda_oe,
  input  logic [1:0]  sda_i,
  // status
  output logic        line_sel,
  output logic        frame_err
);
  // Cycles from the receiver's end-of-frame to the start of the answer,
  // chosen so that the gap on the lines is TURNAROUND_CYCLES.
  localparam int unsigned TA = TURNAROUND_CYCLES - 10;

  logic [2:0] smp1, smp2, smp;
  logic bv, bval, in_frame, fend, brk_det;
  logic wv; logic [7:0] wb; logic [15:0] wp;
  logic rdone, rok;
  logic tx_start, tx_valid, tx_last, tx_ready, brk_req, tx_busy;
  logic [7:0] tx_byte;
  logic ebv, ebval, ebrdy, ebrk, ebusy, sm;
  logic acc_valid, acc_ack, pi_ack, ii_ack;
  acc_req_t acc;
  logic [7:0] acc_rdata, pi_rd_byte, ii_rd_byte;
  logic internal;

  spac_sampler u_s1 (.clk, .rst_n, .line_in(ms1), .smp(smp1));
  spac_sampler u_s2 (.clk, .rst_n, .line_in(ms2), .smp(smp2));

  spac_line_sel u_sel (.clk, .rst_n, .a(smp1), .b(smp2), .smp, .sel(line_sel));

  spac_manch_dec u_dec (.clk, .rst_n, .smp, .bit_valid(bv), .bit_val(bval),
                        .in_frame, .frame_end(fend), .brk_det);

  spac_frame_rx u_rx (.clk, .rst_n, .bit_valid(bv), .bit_val(bval), .frame_end(fend),
                      .word_valid(wv), .word_byte(wb), .word_pos(wp), .done(rdone), .ok(rok));

  spac_slave_ctrl #(.TA_CYCLES(TA)) u_ctrl (
    .clk, .rst_n, .my_addr(slave_addr), .my_group(bcast_group), .intr_en,
    .word_valid(wv), .word_byte(wb), .word_pos(wp), .done(rdone), .ok(rok),
    .tx_start, .tx_valid, .tx_byte, .tx_last, .tx_ready, .brk_req, .tx_busy,
    .acc_valid, .acc, .acc_ack, .acc_rdata, .frame_err);

  // Sub-addresses $7C..$7F are the slave's own I2C registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         internal <= 1'b0;
    else if (acc_valid) internal <= acc.sub >= SA_INTERNAL_BASE;
  end
  wire acc_int = acc.sub >= SA_INTERNAL_BASE;

  spac_par_if u_pi (.clk, .rst_n, .req_valid(acc_valid && !acc_int), .req(acc),
                    .ack(pi_ack), .rdata(pi_rd_byte),
                    .pi_addr, .pi_idx, .pi_wdata, .pi_wr, .pi_rd, .pi_rdata);

  spac_i2c_if u_i2c (.clk, .rst_n, .req_valid(acc_valid && acc_int), .req(acc),
                     .ack(ii_ack), .rdata(ii_rd_byte), .scl_oe, .sda_oe, .sda_i);

  assign acc_ack   = pi_ack | ii_ack;
  assign acc_rdata = internal ? ii_rd_byte : pi_rd_byte;

  spac_frame_tx u_tx (.clk, .rst_n, .start(tx_start), .in_valid(tx_valid), .in_byte(tx_byte),
                      .in_last(tx_last), .in_ready(tx_ready), .brk_req,
                      .bit_valid(ebv), .bit_val(ebval), .bit_ready(ebrdy), .enc_busy(ebusy),
                      .brk(ebrk), .busy(tx_busy));

  spac_manch_enc u_enc (.clk, .rst_n, .bit_valid(ebv), .bit_val(ebval), .bit_ready(ebrdy),
                        .brk(ebrk), .line(sm), .busy(ebusy));

  // The two upstream lines carry the same signal.
  assign sm1 = sm;
  assign sm2 = sm;

endmodule
