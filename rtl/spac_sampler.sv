// spac_sampler: double-edge sampler for an asynchronous SPAC serial line.
//
// Samples the line on both edges of the 40 MHz clock, each through a
// two-flop synchronizer, giving one sample per 12.5 ns (eight per 10 Mbit/s
// bit). Once per clock cycle it presents the samples in time order:
// smp[0] the newest sample of the previous cycle, smp[1] the older and
// smp[2] the newer sample of this cycle, so that a receiver sees every
// transition between consecutive samples. Sampling on both edges is how
// the receiver gets the resolution of a 80 MHz clock from a 40 MHz one;
// it makes the receiver sensitive to the clock duty cycle.
//
// Latency: about two clock cycles from the line to smp.
module spac_sampler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       line_in,
  output logic [2:0] smp
);
  logic p1, p2, n1, n2, prev;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin n1 <= 1'b0; n2 <= 1'b0; end
    else        begin n1 <= line_in; n2 <= n1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin p1 <= 1'b0; p2 <= 1'b0; prev <= 1'b0; end
    else        begin p1 <= line_in; p2 <= p1; prev <= n2; end
  end

  // p2 was taken half a cycle before n2 (both seen at this rising edge).
  assign smp = {n2, p2, prev};

endmodule
