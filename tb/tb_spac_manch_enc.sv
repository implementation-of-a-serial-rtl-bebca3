// tb_spac_manch_enc: checks the Manchester encoder cycle by cycle.
// A stream of random bits is fed without gaps; the line must show, for
// each bit b, ~b for two cycles then b for two cycles (4 cycles per bit,
// 10 Mbit/s at 40 MHz), then rest low, and go high while brk is set.
module tb_spac_manch_enc;
  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_val = 0, bit_ready, brk = 0, line, busy;
  int checks = 0, failures = 0;
  localparam int N = 200;
  logic bits [N];

  spac_manch_enc dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  int t_first, t_last, nacc = 0;
  always @(posedge clk) if (bit_valid && bit_ready) begin
    if (nacc == 0) t_first = $time;
    t_last = $time;
    nacc++;
  end
  initial begin
    foreach (bits[i]) bits[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(line, 1'b0, "idle low");
    // Feed the stream; bit i is accepted at cycle 4*i after the first.
    fork
      begin
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          bit_valid = 1; bit_val = bits[i];
          while (!bit_ready) @(negedge clk);
        end
        @(negedge clk);
        bit_valid = 0;
      end
      begin
        // wait for the first accept, then check 4 line samples per bit
        @(posedge clk iff (bit_valid && bit_ready));
        for (int i = 0; i < N; i++) begin
          for (int p = 0; p < 4; p++) begin
            if (i != 0 || p != 0) @(posedge clk);
            #1;
            check(line, p < 2 ? ~bits[i] : bits[i], "line");
          end
        end
      end
    join
    // rate: N bits accepted over 4*(N-1) cycles
    checks++;
    if ((t_last - t_first) != 4 * (N - 1) * 25) begin
      failures++; $display("FAIL rate: %0t", t_last - t_first);
    end
    repeat (2) @(posedge clk); #1;
    check(line, 1'b0, "idle after stream");
    check(busy, 1'b0, "not busy");
    brk <= 1;
    repeat (3) @(posedge clk); #1;
    check(line, 1'b1, "brk high");
    brk <= 0;
    repeat (2) @(posedge clk); #1;
    check(line, 1'b0, "brk released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
