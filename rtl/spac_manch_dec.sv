// spac_manch_dec: Manchester decoder with clock recovery for SPAC.
//
// The input is the output of spac_sampler: the serial line sampled on both
// edges of the 40 MHz clock (a sample every 12.5 ns, eight per 10 Mbit/s
// bit); every clock cycle the two new samples are processed in time order,
// smp[0] being the last sample of the previous cycle. Every Manchester bit has a transition in its middle;
// transitions at bit boundaries only occur between equal bits. The decoder
// locks on the mid-bit transitions: after accepting one it ignores
// transitions for ACCEPT-1 half cycles (the boundary transition comes half
// a bit later) and takes the next one as the next mid-bit transition. The
// bit value is the new line level (rising = 1). A frame starts from the
// idle low level, so the first transition accepted must be rising. If no
// transition comes for TIMEOUT half cycles the line is idle again and
// frame_end pulses. Because the receiver re-times itself on every bit it
// tolerates clock differences of at least ten percent between master and
// slave. Using both clock edges makes the result depend on the clock duty
// cycle, as for the original receiver.
// A level held high for BRK_HALVES half cycles is reported as an interrupt
// frame (brk_det); Manchester data never stays high for more than one bit.
//
// The protocol gives the line code and that the receiver locks onto the
// stream; the edge-window algorithm and its thresholds are this design's.
//
// Timing: bit_valid comes one cycle after the samples holding the
// mid-bit transition (3 to 4 cycles after it reaches the line).
module spac_manch_dec #(
  parameter int unsigned ACCEPT     = 6,
  parameter int unsigned TIMEOUT    = 12,
  parameter int unsigned BRK_HALVES = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [2:0] smp,
  output logic bit_valid,
  output logic bit_val,
  output logic in_frame,
  output logic frame_end,
  output logic brk_det
);
  logic [7:0] cnt;       // half cycles since the last accepted transition
  logic [7:0] high_cnt;  // half cycles the line has been high

  // Process the samples smp[1] (older) and smp[2] (newer) in order.
  logic       in_frame_d, bv_d, bval_d, fend_d, brk_d;
  logic [7:0] cnt_d, high_d;
  always_comb begin
    logic s, pv;
    in_frame_d = in_frame;
    cnt_d      = cnt;
    high_d     = high_cnt;
    bv_d       = 1'b0;
    bval_d     = bit_val;
    fend_d     = 1'b0;
    brk_d      = 1'b0;
    pv         = smp[0];
    for (int k = 0; k < 2; k++) begin
      s = smp[k+1];
      if (!in_frame_d) begin
        if (s && !pv) begin
          in_frame_d = 1'b1; bv_d = 1'b1; bval_d = 1'b1; cnt_d = 8'd1;
        end
      end else if ((s != pv) && (cnt_d >= 8'(ACCEPT))) begin
        bv_d = 1'b1; bval_d = s; cnt_d = 8'd1;
      end else if (cnt_d >= 8'(TIMEOUT)) begin
        in_frame_d = 1'b0; fend_d = 1'b1;
      end else begin
        cnt_d = cnt_d + 8'd1;
      end
      if (!s) high_d = '0;
      else if (high_d != 8'hFF) high_d = high_d + 8'd1;
      if (s && high_d == 8'(BRK_HALVES)) brk_d = 1'b1;
      pv = s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; high_cnt <= '0;
      in_frame <= 1'b0; bit_valid <= 1'b0; bit_val <= 1'b0;
      frame_end <= 1'b0; brk_det <= 1'b0;
    end else begin
      in_frame <= in_frame_d;
      cnt <= cnt_d;
      high_cnt <= high_d;
      bit_valid <= bv_d;
      bit_val <= bval_d;
      frame_end <= fend_d;
      brk_det <= brk_d;
    end
  end

endmodule
