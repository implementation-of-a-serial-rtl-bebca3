// tb_spac_frame_tx: checks frame building and the interrupt frame.
// The transmitter drives the real Manchester encoder. For frames of random
// bytes, pushed with random delays, the bits handed to the encoder must be
// the preamble word ($35, continue 1), each byte with continue 1 and the
// checksum (sum modulo 256) with continue 0, one bit every 4 cycles with
// no gap, so that a frame of n words lasts 36*n cycles. An interrupt
// request must hold the line high for 40 cycles (1 us).
module tb_spac_frame_tx;
  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0, in_last = 0, in_ready, brk_req = 0;
  logic [7:0] in_byte = 0;
  logic bit_valid, bit_val, bit_ready, enc_busy, brk, busy, line;
  int checks = 0, failures = 0;
  logic gotb [$];
  int t_bits [$];
  int cyc = 0;

  spac_frame_tx dut (.*);
  spac_manch_enc u_enc (.clk, .rst_n, .bit_valid, .bit_val, .bit_ready, .brk, .line, .busy(enc_busy));

  always #12.5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && bit_valid && bit_ready) begin gotb.push_back(bit_val); t_bits.push_back(cyc); end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [8:0] word_at(int k);
    logic [8:0] w;
    for (int i = 0; i < 9; i++) w[i] = gotb[9*k + i];
    return w;
  endfunction

  task automatic frame(input int n);
    logic [7:0] d [$];
    logic [7:0] sum = 0;
    gotb.delete(); t_bits.delete();
    for (int i = 0; i < n; i++) begin d.push_back(8'($urandom)); sum += d[i]; end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      repeat ($urandom % 20) @(negedge clk);
      in_valid = 1; in_byte = d[i]; in_last = (i == n - 1);
      while (!in_ready) @(negedge clk);
      @(posedge clk); #1;
      in_valid = 0;
    end
    @(negedge clk);
    while (busy) @(negedge clk);
    check(gotb.size() == 9 * (n + 2), $sformatf("bit count %0d for %0d bytes", gotb.size(), n));
    if (gotb.size() == 9 * (n + 2)) begin
      check(word_at(0) == {1'b1, 8'h35}, "preamble");
      for (int i = 0; i < n; i++) check(word_at(i + 1) == {1'b1, d[i]}, "data word");
      check(word_at(n + 1) == {1'b0, sum}, "checksum word");
      check(t_bits[$] - t_bits[0] == 4 * (9 * (n + 2) - 1), "no gap in the frame");
    end
  endtask

  initial begin
    int hi;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    frame(1); frame(2); frame(4); frame(15);
    for (int k = 0; k < 6; k++) frame(1 + $urandom % 20);
    // interrupt frame
    @(negedge clk); brk_req = 1; @(negedge clk); brk_req = 0;
    hi = 0;
    repeat (60) begin @(posedge clk); #1; if (line) hi++; end
    check(hi == 40, $sformatf("interrupt frame length %0d", hi));
    check(!line, "line low after interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
