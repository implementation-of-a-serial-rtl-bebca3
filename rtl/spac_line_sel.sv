// spac_line_sel: picks the active one of the two duplicated downstream lines.
//
// The master sends each frame on one of MS1/MS2 and leaves the other idle;
// the slave has to find the active one by itself. The inputs are the
// sample groups of the two lines from spac_sampler (see there). The
// selection moves to the other line when that line rises while the
// selected line has shown no transition for QUIET half cycles (longer than
// any gap inside a Manchester frame). The decision is made on the same
// samples it passes on, so the rising edge that opens a frame on the newly
// chosen line reaches the decoder intact. A frame in progress never loses
// its line, and a selected line that is stuck (high or low) is abandoned
// at the first frame on the other one. The switching rule is this
// design's; the protocol only requires that the slave find the active line
// automatically.
//
// Output: the sample group of the chosen line (combinational) and sel
// (0 = MS1, 1 = MS2), registered.
module spac_line_sel #(
  parameter int unsigned QUIET = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] a,     // samples of MS1
  input  logic [2:0] b,     // samples of MS2
  output logic [2:0] smp,
  output logic       sel
);
  logic [7:0] quiet;  // half cycles since the last transition of the selected line

  function automatic logic rises(input logic [2:0] x);
    return (x[1] & ~x[0]) | (x[2] & ~x[1]);
  endfunction
  function automatic logic moves(input logic [2:0] x);
    return (x[1] != x[0]) | (x[2] != x[1]);
  endfunction

  wire cur_quiet = quiet >= 8'(QUIET);
  wire sel_n = !cur_quiet ? sel :
               sel ? !rises(a) : rises(b);
  wire [2:0] cur_n = sel_n ? b : a;

  assign smp = cur_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quiet <= 8'hFF;
      sel <= 1'b0;
    end else begin
      sel <= sel_n;
      if (moves(cur_n)) quiet <= '0;
      else if (quiet < 8'hFE) quiet <= quiet + 8'd2;
    end
  end

endmodule
