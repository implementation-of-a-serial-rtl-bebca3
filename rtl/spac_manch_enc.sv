// spac_manch_enc: Manchester encoder for the SPAC serial lines.
//
// Each bit lasts CLK_PER_BIT clock cycles (4 at 40 MHz = 10 Mbit/s). A one
// is sent as a low-to-high transition in the middle of the bit (first half
// low, second half high), a zero as a high-to-low transition. With no bit
// to send the line rests low without transitions; while brk is asserted
// and no bit is in flight the line is held high (used for the interrupt
// frame). Line coding and rate follow the protocol; the brk input is this
// design's way of producing the interrupt frame.
//
// Interface: bit_valid/bit_ready handshake, one bit per transfer. bit_ready
// is high when idle and in the last cycle of a bit, so a producer that
// keeps bit_valid high gets a gap-free stream. The line output is
// registered: it starts one cycle after the bit is accepted.
module spac_manch_enc #(
  parameter int unsigned CLK_PER_BIT = spac_pkg::CLK_PER_BIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_valid,
  input  logic bit_val,
  output logic bit_ready,
  input  logic brk,
  output logic line,
  output logic busy
);
  localparam int unsigned PW = $clog2(CLK_PER_BIT);
  localparam int unsigned HALF = CLK_PER_BIT / 2;

  logic [PW-1:0] phase;
  logic          active;
  logic          cur;

  assign bit_ready = !active || (phase == PW'(CLK_PER_BIT - 1));
  assign busy      = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      active <= 1'b0;
      cur    <= 1'b0;
    end else if (bit_valid && bit_ready) begin
      active <= 1'b1;
      cur    <= bit_val;
      phase  <= '0;
    end else if (active) begin
      if (phase == PW'(CLK_PER_BIT - 1)) active <= 1'b0;
      else                               phase  <= phase + 1'b1;
    end
  end

  // Registered line: the value for the bit phase held in phase/cur.
  logic line_d;
  always_comb begin
    if (bit_valid && bit_ready) line_d = ~bit_val;           // first half of new bit
    else if (active && phase != PW'(CLK_PER_BIT - 1))
      line_d = (phase + 1'b1 < PW'(HALF)) ? ~cur : cur;
    else line_d = brk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line <= 1'b0;
    else        line <= line_d;
  end

endmodule
