// tb_spac_frame_rx: checks word assembly, preamble and checksum checks.
// Frames are given as decoded bits (one every 4 cycles, as at 10 Mbit/s):
// the write and read examples of the protocol (write $3412 at sub-address
// $08 of slave $10, read 4 bytes at sub-address $08 of slave $11), random
// frames, and corrupted ones (wrong checksum, wrong preamble, cut short,
// extra bits after the checksum). Delivered words and the ok flag are
// compared with values computed here.
module tb_spac_frame_rx;
  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_val = 0, frame_end = 0;
  logic word_valid; logic [7:0] word_byte; logic [15:0] word_pos;
  logic done, ok;
  int checks = 0, failures = 0;
  logic [7:0] gotw [$];
  int ndone = 0; logic lastok;

  spac_frame_rx dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && word_valid) begin
      if (word_pos != 16'(gotw.size())) begin failures++; $display("FAIL word position %0d vs %0d at %0t", word_pos, gotw.size(), $time); end
      gotw.push_back(word_byte);
    end
    if (rst_n && done) begin ndone++; lastok = ok; end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send_bit(input logic b);
    @(negedge clk); bit_valid = 1; bit_val = b;
    @(negedge clk); bit_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_word(input logic [7:0] by, input logic cont);
    for (int i = 0; i < 8; i++) send_bit(by[i]);
    send_bit(cont);
  endtask

  // kind: 0 good, 1 bad checksum, 2 bad preamble, 3 cut, 4 extra bits
  task automatic frame(input logic [7:0] w [$], input int kind);
    logic [7:0] sum = 0;
    int n0 = ndone;
    gotw.delete();
    foreach (w[i]) sum += w[i];
    send_word(kind == 2 ? 8'h36 : 8'h35, 1'b1);
    foreach (w[i]) send_word(w[i], 1'b1);
    if (kind == 3) begin
      for (int i = 0; i < 5; i++) send_bit(sum[i]);
    end else begin
      send_word(kind == 1 ? sum ^ 8'h10 : sum, 1'b0);
    end
    if (kind == 4) send_bit(1'b1);
    repeat (6) @(negedge clk);
    frame_end = 1; @(negedge clk); frame_end = 0;
    repeat (3) @(negedge clk);
    check(ndone == n0 + 1, "done once");
    check(lastok == (kind == 0), $sformatf("ok flag, kind %0d", kind));
    if (kind != 2) begin
      check(gotw.size() == w.size(), "word count");
      if (gotw.size() == w.size()) foreach (w[i]) check(gotw[i] == w[i], "word value");
    end else check(gotw.size() == 0, "no words after bad preamble");
  endtask

  initial begin
    logic [7:0] w [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame('{8'h90, 8'h08, 8'h12, 8'h34}, 0);
    frame('{8'h91, 8'h88, 8'h04}, 0);
    frame('{8'h91, 8'h88}, 0);
    for (int k = 0; k < 25; k++) begin
      w.delete();
      for (int i = 0; i < 2 + ($urandom % 8); i++) w.push_back(8'($urandom));
      frame(w, k % 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
