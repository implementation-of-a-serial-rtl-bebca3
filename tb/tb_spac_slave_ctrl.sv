// tb_spac_slave_ctrl: checks the slave's protocol engine at word level.
// Words are given as the frame receiver delivers them. Checked: writes to
// the slave's own address, to the global broadcast address and to the
// local broadcast address of its group reach the resources with the right
// sub-address, byte number and data; writes to other addresses or groups,
// and frames with direction bit 0, do not. Read requests with an empty,
// one-byte and two-byte count field are answered with {0, address},
// {R, sub-address} and the right number of bytes read from the resources,
// last flag on the final byte; broadcast reads get no answer. A corrupted
// frame raises an interrupt request only when intr_en is set.
module tb_spac_slave_ctrl;
  import spac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [6:0] my_addr = 7'h11; logic [3:0] my_group = 4'd3; logic intr_en = 1;
  logic word_valid = 0; logic [7:0] word_byte = 0; logic [15:0] word_pos = 0;
  logic done = 0, ok = 0;
  logic tx_start, tx_valid, tx_last, tx_ready, brk_req, tx_busy;
  logic [7:0] tx_byte;
  logic acc_valid, acc_ack; acc_req_t acc; logic [7:0] acc_rdata;
  logic frame_err;
  int checks = 0, failures = 0;

  spac_slave_ctrl #(.TA_CYCLES(22)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // resource model: read data = f(sub, idx), ack 3 cycles after a read
  function automatic logic [7:0] f(input logic [6:0] s, input logic [15:0] i);
    return 8'(s * 13 + i * 5 + (i >> 8));
  endfunction
  acc_req_t writes [$];
  int rd_pending = 0; acc_req_t rd_req;
  always @(posedge clk) if (rst_n) begin
    acc_ack <= 0;
    if (acc_valid && acc.wr) begin writes.push_back(acc); acc_ack <= 1; end
    if (acc_valid && !acc.wr) begin rd_pending <= 3; rd_req <= acc; end
    if (rd_pending == 1) begin acc_ack <= 1; acc_rdata <= f(rd_req.sub, rd_req.idx); end
    if (rd_pending > 0) rd_pending <= rd_pending - 1;
  end

  // transmitter model: one-byte holding register drained every 36 cycles
  logic [7:0] txq [$]; logic txlast [$];
  int starts = 0, brks = 0, hold = 0;
  assign tx_ready = (hold == 0);
  assign tx_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_start) starts++;
    if (brk_req) brks++;
    if (tx_valid && tx_ready) begin txq.push_back(tx_byte); txlast.push_back(tx_last); hold <= 36; end
    else if (hold > 0) hold <= hold - 1;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic frame(input logic [7:0] w [$], input logic good);
    foreach (w[i]) begin
      @(negedge clk); word_valid = 1; word_byte = w[i]; word_pos = 16'(i);
      @(negedge clk); word_valid = 0;
      repeat (34) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    done = 1; ok = good; @(negedge clk); done = 0;
  endtask

  task automatic write_test(input logic [6:0] a, input logic dir, input bit expect_hit);
    logic [7:0] d [$];
    writes.delete();
    for (int i = 0; i < 5; i++) d.push_back(8'($urandom));
    frame('{{dir, a}, {RW_WRITE, 7'h08}, d[0], d[1], d[2], d[3], d[4]}, 1);
    if (expect_hit) begin
      check(writes.size() == 5, $sformatf("writes to %h", a));
      if (writes.size() == 5) foreach (d[i])
        check(writes[i].sub == 7'h08 && writes[i].idx == 16'(i) && writes[i].wdata == d[i],
              "write access");
    end else check(writes.size() == 0, $sformatf("no write for address %h", a));
  endtask

  task automatic read_test(input logic [6:0] a, input int nfield, input int n, input bit expect_ans);
    logic [7:0] w [$];
    int s0 = starts;
    txq.delete(); txlast.delete();
    w = '{{DIR_MASTER, a}, {RW_READ, 7'h05}};
    if (nfield >= 1) w.push_back(8'(n));
    if (nfield == 2) w.push_back(8'(n >> 8));
    frame(w, 1);
    repeat (60 + 45 * n) @(negedge clk);
    if (!expect_ans) begin
      check(starts == s0 && txq.size() == 0, "no answer");
      return;
    end
    check(starts == s0 + 1, "answer started");
    check(txq.size() == n + 2, $sformatf("answer length %0d for %0d", txq.size(), n));
    if (txq.size() == n + 2) begin
      check(txq[0] == {DIR_SLAVE, my_addr}, "answer address word");
      check(txq[1] == {RW_READ, 7'h05}, "answer sub-address word");
      for (int i = 0; i < n; i++) check(txq[i + 2] == f(7'h05, 16'(i)), "answer data");
      foreach (txlast[i]) check(txlast[i] == (i == n + 1), "last flag");
    end
  endtask

  initial begin
    int b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_test(7'h11, 1, 1);
    write_test(7'h12, 1, 0);
    write_test(ADDR_GLOBAL, 1, 1);
    write_test(ADDR_LOCAL_BASE + 3, 1, 1);
    write_test(ADDR_LOCAL_BASE + 4, 1, 0);
    write_test(7'h11, 0, 0);
    read_test(7'h11, 0, 1, 1);
    read_test(7'h11, 1, 4, 1);
    read_test(7'h11, 2, 3, 1);
    read_test(7'h11, 2, 300, 1);
    read_test(ADDR_GLOBAL, 0, 1, 0);
    read_test(7'h10, 0, 1, 0);
    b0 = brks;
    frame('{8'h91, 8'h88}, 0);
    repeat (5) @(negedge clk);
    check(brks == b0 + 1, "interrupt request on corrupted frame");
    intr_en = 0;
    frame('{8'h91, 8'h88}, 0);
    repeat (5) @(negedge clk);
    check(brks == b0 + 1, "no interrupt when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
