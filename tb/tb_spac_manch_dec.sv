// tb_spac_manch_dec: checks clock recovery and decoding of Manchester frames.
// Frames of random bits (first bit 1, as every frame starts with the
// preamble) are generated with the transmitter's bit period at the nominal
// 100 ns and 8 % and 10 % slower and faster than the receiver's 40 MHz clock. Every
// bit must be decoded in order, frame_end must follow each frame once, and
// a 1 us high level must be reported as an interrupt frame (never a frame).
module tb_spac_manch_dec;
  logic clk = 0, rst_n = 0;
  logic line_in = 0;
  logic bit_valid, bit_val, in_frame, frame_end, brk_det;
  int checks = 0, failures = 0;
  localparam int NB = 90;
  logic bits [NB];
  logic got [$];
  int n_end = 0, n_brk = 0;

  logic [2:0] smp;
  spac_sampler u_smp (.clk, .rst_n, .line_in, .smp);
  spac_manch_dec dut (.clk, .rst_n, .smp, .bit_valid, .bit_val, .in_frame, .frame_end, .brk_det);

  always #12.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (bit_valid) got.push_back(bit_val);
    if (frame_end) n_end++;
    if (brk_det) n_brk++;
  end

  task automatic send_frame(input realtime half);
    for (int i = 0; i < NB; i++) begin
      line_in = ~bits[i]; #(half);
      line_in = bits[i];  #(half);
    end
    line_in = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  realtime halves [5] = '{50.0, 54.0, 46.0, 55.0, 45.0};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    foreach (halves[h]) begin
      for (int rep = 0; rep < 3; rep++) begin
        foreach (bits[i]) bits[i] = (i == 0) ? 1'b1 : 1'($urandom);
        got.delete();
        n_end = 0;
        #(7.3 * rep + 3.1);
        send_frame(halves[h]);
        #1us;
        check(got.size() == NB, $sformatf("bit count %0d (half %0.1f)", got.size(), halves[h]));
        if (got.size() == NB)
          foreach (bits[i]) check(got[i] == bits[i], $sformatf("bit %0d", i));
        check(n_end == 1, "one frame end");
        check(!in_frame, "idle after frame");
      end
    end
    check(n_brk == 0, "no interrupt inside frames");
    // interrupt frame: 1 us high
    got.delete(); n_end = 0;
    line_in = 1; #1us; line_in = 0; #1us;
    check(n_brk == 1, "interrupt frame detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
