// tb_spac_master: the master engine against a slave written here.
// The testbench decodes the master's Manchester frames from the line it
// chose (MS1 or MS2; the other must stay idle) and answers on SM1 or SM2.
// Checked: the frames of the protocol's examples (write $3412 at $08 of
// slave $10: 90 08 12 34; read of 1, 4 and $1234 bytes at $08 of slave
// $11: 91 88 with an empty, one-byte and two-byte count) and their
// checksums, the frame time (9 bits of 100 ns per word), delivery of the
// answer bytes, and the error cases: wrong checksum, wrong header, no
// answer (timeout) and an interrupt frame.
module tb_spac_master;
  import spac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_rnw = 0; logic [6:0] cmd_addr = 0, cmd_sub = 0;
  logic [15:0] cmd_len = 0; logic ms_sel = 0, sm_sel = 0;
  logic wd_valid = 0, wd_ready; logic [7:0] wd_data = 0;
  logic rd_valid; logic [7:0] rd_data; logic done, ok, intr;
  logic ms1, ms2, sm1 = 0, sm2 = 0;
  int checks = 0, failures = 0;
  logic [7:0] rdq [$];
  int ndone = 0, nintr = 0; logic last_ok;

  spac_master #(.ANS_TIMEOUT(400)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #4ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rd_valid) rdq.push_back(rd_data);
    if (done) begin ndone++; last_ok = ok; end
    if (intr) nintr++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // write data source: bytes of wq
  logic [7:0] wq [$];
  always @(negedge clk) begin
    wd_valid = wq.size() > 0;
    wd_data = wq.size() > 0 ? wq[0] : 8'h00;
  end
  always @(posedge clk) if (rst_n && wd_valid && wd_ready) void'(wq.pop_front());

  // Decode one frame from line l of the master (bytes after the preamble,
  // checksum included, and whether the checksum is right).
  logic [7:0] fb [$]; bit fchk; realtime f_t0, f_t1;
  task automatic grab(input int l);
    logic [8:0] wd; logic [7:0] sum = 0;
    fb.delete(); fchk = 0;
    if (l == 1) @(posedge ms1); else @(posedge ms2);
    f_t0 = $realtime - 50.0;
    for (int k = 0; ; k++) begin
      for (int i = 0; i < 9; i++) begin #25; wd[i] = (l == 1) ? ms1 : ms2; #75; end
      if (k == 0) check(wd == {1'b1, 8'h35}, "preamble");
      else begin
        fb.push_back(wd[7:0]);
        if (wd[8]) sum += wd[7:0];
        else begin fchk = (wd[7:0] == sum); break; end
      end
    end
    f_t1 = $realtime - 50.0;
  endtask

  task automatic answer(input int l, input logic [7:0] w [$], input bit bad = 0);
    logic [8:0] words [$];
    logic [7:0] sum = 0;
    words.push_back({1'b1, 8'h35});
    foreach (w[i]) begin words.push_back({1'b1, w[i]}); sum += w[i]; end
    words.push_back({1'b0, bad ? ~sum : sum});
    foreach (words[k]) for (int i = 0; i < 9; i++) begin
      if (l == 1) sm1 = ~words[k][i]; else sm2 = ~words[k][i];
      #50;
      if (l == 1) sm1 = words[k][i]; else sm2 = words[k][i];
      #50;
    end
    sm1 = 0; sm2 = 0;
  endtask

  task automatic command(input logic rnw, input logic [6:0] a, input logic [6:0] sa,
                         input logic [15:0] n, input logic msel, input logic ssel);
    @(negedge clk);
    cmd_valid = 1; cmd_rnw = rnw; cmd_addr = a; cmd_sub = sa; cmd_len = n;
    ms_sel = msel; sm_sel = ssel;
    @(negedge clk); cmd_valid = 0;
  endtask

  bit ms_other_moved;
  initial begin
    int nd;
    logic [7:0] d [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    #200;
    // write example
    wq = '{8'h12, 8'h34};
    nd = ndone;
    fork command(0, 7'h10, 7'h08, 2, 0, 0); grab(1); join
    check(fb.size() == 5 && fb[0] == 8'h90 && fb[1] == 8'h08 && fb[2] == 8'h12 && fb[3] == 8'h34,
          "write example frame");
    check(fchk, "write frame checksum");
    check(f_t1 - f_t0 == 6 * 900.0, $sformatf("write frame time %0.1f", f_t1 - f_t0));
    #500;
    check(ndone == nd + 1 && last_ok, "write done");
    // read examples: request fields
    begin
      logic [15:0] ns [3];
      ns = '{16'd1, 16'd4, 16'h1234};
      foreach (ns[j]) begin
        fork command(1, 7'h11, 7'h08, ns[j], 0, 0); grab(1); join
        check(fchk && fb[0] == 8'h91 && fb[1] == 8'h88, "read request header");
        if (j == 0) check(fb.size() == 3, "empty count field for 1 byte");
        if (j == 1) check(fb.size() == 4 && fb[2] == 8'h04, "one-byte count");
        if (j == 2) check(fb.size() == 5 && fb[2] == 8'h34 && fb[3] == 8'h12, "two-byte count");
        // let it time out (no answer)
        nd = ndone;
        #15us;
        check(ndone == nd + 1 && !last_ok, "timeout without answer");
      end
    end
    // good answer of 6 bytes on SM2, request on MS2
    d.delete();
    for (int i = 0; i < 6; i++) d.push_back(8'($urandom));
    rdq.delete(); nd = ndone;
    ms_other_moved = 0;
    fork
      begin
        fork command(1, 7'h11, 7'h08, 6, 1, 1); grab(2); join
      end
      begin @(posedge ms1); ms_other_moved = 1; end
    join_any
    disable fork;
    check(!ms_other_moved, "MS1 idle while MS2 used");
    #900;
    answer(2, '{8'h11, 8'h88, d[0], d[1], d[2], d[3], d[4], d[5]});
    #500;
    check(ndone == nd + 1 && last_ok, "read answer accepted");
    check(rdq == d, "read data delivered");
    // bad checksum
    nd = ndone;
    fork command(1, 7'h11, 7'h08, 1, 0, 0); grab(1); join
    #900; answer(1, '{8'h11, 8'h88, 8'h55}, 1); #500;
    check(ndone == nd + 1 && !last_ok, "bad checksum rejected");
    // wrong header (answer from another slave)
    nd = ndone;
    fork command(1, 7'h11, 7'h08, 1, 0, 0); grab(1); join
    #900; answer(1, '{8'h12, 8'h88, 8'h55}); #500;
    check(ndone == nd + 1 && !last_ok, "wrong header rejected");
    // interrupt frame
    nd = ndone;
    fork command(1, 7'h11, 7'h08, 1, 0, 0); grab(1); join
    #900; sm1 = 1; #1us; sm1 = 0; #500;
    check(ndone == nd + 1 && !last_ok, "interrupt ends the read");
    check(nintr == 1, "interrupt reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
