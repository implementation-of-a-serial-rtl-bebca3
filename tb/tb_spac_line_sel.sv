// tb_spac_line_sel: checks the choice between the two downstream lines.
// Frames are sent on MS1 or MS2 while the other line idles (or is stuck
// high); after each frame the selector must point at the line that
// carried it, every bit of the frame (decoded by spac_manch_dec behind the
// selector) must be right, including the first, and a glitch on the idle
// line in the middle of a frame must not move the selection.
module tb_spac_line_sel;
  logic clk = 0, rst_n = 0;
  logic ms1 = 0, ms2 = 0;
  logic [2:0] a, b, smp;
  logic sel;
  logic bit_valid, bit_val, in_frame, frame_end, brk_det;
  int checks = 0, failures = 0;
  localparam int NB = 45;
  logic bits [NB];
  logic got [$];
  int n_switch = 0;

  spac_sampler u_a (.clk, .rst_n, .line_in(ms1), .smp(a));
  spac_sampler u_b (.clk, .rst_n, .line_in(ms2), .smp(b));
  spac_line_sel dut (.clk, .rst_n, .a, .b, .smp, .sel);
  spac_manch_dec u_dec (.clk, .rst_n, .smp, .bit_valid, .bit_val, .in_frame, .frame_end, .brk_det);

  always #12.5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic sel_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (bit_valid) got.push_back(bit_val);
    sel_q <= sel;
    if (sel != sel_q) n_switch++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Manchester frame on line l (1 or 2); glitch: pulse on the other line mid-frame.
  task automatic send(input int l, input bit glitch);
    foreach (bits[i]) bits[i] = (i == 0) ? 1'b1 : 1'($urandom);
    got.delete();
    for (int i = 0; i < NB; i++) begin
      if (l == 1) ms1 = ~bits[i]; else ms2 = ~bits[i];
      #50;
      if (l == 1) ms1 = bits[i]; else ms2 = bits[i];
      if (glitch && i == NB / 2) begin
        if (l == 1) ms2 = ~ms2; else ms1 = ~ms1;
        #20;
        if (l == 1) ms2 = ~ms2; else ms1 = ~ms1;
        #30;
      end else #50;
    end
    if (l == 1) ms1 = 0; else ms2 = 0;
    #1us;
    check(sel == (l == 2), $sformatf("selected line %0d", l));
    check(got.size() == NB, $sformatf("bit count %0d", got.size()));
    if (got.size() == NB) foreach (bits[i]) check(got[i] == bits[i], $sformatf("bit %0d", i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #300;
    send(1, 0);
    send(2, 0);
    send(2, 1);
    send(1, 1);
    send(1, 0);
    // MS2 stuck high, then frames on MS1 only
    ms2 = 1; #1us;
    send(1, 0);
    check(n_switch >= 2, "selection moved between lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
