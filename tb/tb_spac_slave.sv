// tb_spac_slave: the slave ASIC driven through its serial lines.
// A serial master written here (bit-level tasks, independent of the RTL)
// sends Manchester frames on MS1 or MS2 and decodes the answers on SM1,
// which must always equal SM2. A board model (byte memory per sub-address)
// sits on the parallel interface and an I2C memory device on I2C bus 0.
// Checked: the write and read examples of the protocol, reads of 1, 2, 4
// and 15 bytes with their total times (request + answer + 0.9 us, as in
// the measured parallel-interface timings), a frame on MS2 after MS1,
// frames from a master whose clock is 9 % off, broadcasts, an I2C write
// and read through the internal registers, and the interrupt frame after
// a corrupted request.
module tb_spac_slave;
  import spac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ms1 = 0, ms2 = 0, sm1, sm2;
  logic [6:0] pi_addr; logic [15:0] pi_idx; logic [7:0] pi_wdata, pi_rdata;
  logic pi_wr, pi_rd;
  logic [1:0] scl_oe, sda_oe, sda_i, dev_oe, scl, sda;
  logic line_sel, frame_err;
  int checks = 0, failures = 0;
  realtime half = 50.0;

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | dev_oe);
  assign sda_i = sda;

  spac_slave dut (.clk, .rst_n, .slave_addr(7'h11), .bcast_group(4'd2), .intr_en(1'b1),
                  .ms1, .ms2, .sm1, .sm2, .pi_addr, .pi_idx, .pi_wdata, .pi_wr, .pi_rd, .pi_rdata,
                  .scl_oe, .sda_oe, .sda_i, .line_sel, .frame_err);
  i2c_dev_model #(.ADDR(7'h50)) u_dev (.scl(scl[0]), .sda(sda[0]), .sda_oe(dev_oe[0]));
  assign dev_oe[1] = 1'b0;

  always #12.5 clk = ~clk;

  // board: byte memory indexed by {sub-address, byte number}
  logic [7:0] board [logic [22:0]];
  always @(posedge clk) begin
    if (pi_wr) board[{pi_addr, pi_idx}] = pi_wdata;
    if (pi_rd) pi_rdata <= board.exists({pi_addr, pi_idx}) ? board[{pi_addr, pi_idx}] : 8'hEE;
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(sm1 or sm2) begin
    #1;
    if (sm1 !== sm2) begin failures++; $display("FAIL SM1 and SM2 differ at %0t", $time); end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  realtime t_req_start, t_req_end;
  // Send a frame: preamble, bytes, checksum (corrupted if bad).
  task automatic send(input int l, input logic [7:0] w [$], input bit bad = 0);
    logic [8:0] words [$];
    logic [7:0] sum = 0;
    words.push_back({1'b1, 8'h35});
    foreach (w[i]) begin words.push_back({1'b1, w[i]}); sum += w[i]; end
    words.push_back({1'b0, bad ? ~sum : sum});
    t_req_start = $realtime;
    foreach (words[k]) for (int i = 0; i < 9; i++) begin
      if (l == 1) ms1 = ~words[k][i]; else ms2 = ~words[k][i];
      #(half);
      if (l == 1) ms1 = words[k][i]; else ms2 = words[k][i];
      #(half);
    end
    ms1 = 0; ms2 = 0;
    t_req_end = $realtime;
  endtask

  realtime t_ans_end;
  // Receive an answer on SM1; returns the bytes (checksum checked) or none.
  logic [7:0] b [$], r [$];
  bit got, chk_ok;
  task automatic receive();
    realtime t0;
    logic [8:0] wd; logic [7:0] sum = 0;
    b.delete(); got = 0; chk_ok = 0;
    fork : wait_ans
      begin @(posedge sm1); got = 1; end
      begin #3us; end
    join_any
    disable wait_ans;
    if (!got) return;
    t0 = $realtime;
    for (int k = 0; ; k++) begin
      for (int i = 0; i < 9; i++) begin
        #(25.0 + (k * 9 + i == 0 ? 0.0 : 0.0));
        wd[i] = sm1;
        #(75.0);
      end
      if (k == 0) begin
        if (wd != {1'b1, 8'h35}) begin got = 0; return; end
      end else if (wd[8]) begin b.push_back(wd[7:0]); sum += wd[7:0]; end
      else begin chk_ok = (wd[7:0] == sum); break; end
    end
    t_ans_end = $realtime - 100.0 + 25.0;   // end of the last bit
  endtask

  // Read n bytes at sub-address sa; checks the answer and returns the data.
  task automatic read(input int l, input logic [6:0] sa, input int n, input bit check_time = 0);
    logic [7:0] w [$];
    int nreq, nans;
    w = '{{DIR_MASTER, 7'h11}, {RW_READ, sa}};
    if (n != 1) w.push_back(8'(n));
    if (n > 255) w.push_back(8'(n >> 8));
    nreq = w.size() + 2;
    send(l, w);
    receive();
    check(got && chk_ok, "answer received with good checksum");
    check(b.size() == n + 2, $sformatf("answer size %0d for %0d bytes", b.size(), n));
    if (b.size() >= 2) check(b[0] == {DIR_SLAVE, 7'h11} && b[1] == {RW_READ, sa}, "answer header");
    r.delete();
    for (int i = 2; i < b.size(); i++) r.push_back(b[i]);
    nans = n + 4;
    if (check_time) begin
      realtime tot = t_ans_end - t_req_start;
      realtime expt = (nreq + nans + 1) * 900.0;
      check(tot > expt - 50.0 && tot < expt + 50.0,
            $sformatf("read of %0d bytes took %0.1f ns, expected %0.1f", n, tot, expt));
    end
    #1us;
  endtask

  task automatic write(input int l, input logic [6:0] a, input logic [6:0] sa, input logic [7:0] d [$]);
    logic [7:0] w [$];
    w = '{{DIR_MASTER, a}, {RW_WRITE, sa}};
    foreach (d[i]) w.push_back(d[i]);
    send(l, w);
    if (half == 50.0) check((t_req_end - t_req_start) == (d.size() + 4) * 900.0, "write frame time");
    #2us;
  endtask

  initial begin
    logic [7:0] d [$];
    int sizes [4];
    sizes = '{1, 2, 4, 15};
    repeat (3) @(posedge clk);
    rst_n = 1;
    #500;
    // protocol example: write $3412 at sub-address $08
    write(1, 7'h11, 7'h08, '{8'h12, 8'h34});
    check(board[{7'h08, 16'd0}] == 8'h12 && board[{7'h08, 16'd1}] == 8'h34, "example write");
    read(1, 7'h08, 2, 1);
    check(r.size() == 2 && r[0] == 8'h12 && r[1] == 8'h34, "example read back");
    // reads of the measured sizes, with timing
    foreach (sizes[s]) begin
      d.delete();
      for (int i = 0; i < sizes[s]; i++) d.push_back(8'($urandom));
      write(1, 7'h11, 7'h20, d);
      read(1, 7'h20, sizes[s], 1);
      check(r == d, $sformatf("read back %0d bytes", sizes[s]));
    end
    // the other downstream line
    write(2, 7'h11, 7'h09, '{8'hA5});
    check(line_sel == 1, "MS2 selected");
    read(2, 7'h09, 1);
    check(r.size() == 1 && r[0] == 8'hA5, "read on MS2");
    read(1, 7'h09, 1);
    check(line_sel == 0, "back on MS1");
    // master clock 9 % slow, then 9 % fast
    half = 54.5;
    write(1, 7'h11, 7'h0A, '{8'h5A, 8'hC3});
    half = 45.5;
    read(1, 7'h0A, 2);
    check(r.size() == 2 && r[0] == 8'h5A && r[1] == 8'hC3, "9 % clock offsets");
    half = 50.0;
    // broadcasts: global, own group, other group
    write(1, ADDR_GLOBAL, 7'h0B, '{8'h01});
    write(1, ADDR_LOCAL_BASE + 2, 7'h0C, '{8'h02});
    write(1, ADDR_LOCAL_BASE + 5, 7'h0D, '{8'h03});
    check(board[{7'h0B, 16'd0}] == 8'h01, "global broadcast");
    check(board[{7'h0C, 16'd0}] == 8'h02, "local broadcast of own group");
    check(!board.exists({7'h0D, 16'd0}), "local broadcast of another group ignored");
    // I2C: write pointer $30 and 3 bytes to device $50 on bus 0 at 2.5 MHz
    write(1, 7'h11, SA_I2C_CFG, '{8'h00});
    write(1, 7'h11, SA_I2C_DATA, '{8'h30, 8'h71, 8'h72, 8'h73});
    write(1, 7'h11, SA_I2C_CMD, '{{7'h50, 1'b0}, 8'd4});
    #25us;
    read(1, SA_I2C_STAT, 1);
    check(r.size() == 1 && r[0][0] == 0 && r[0][1] == 0, "I2C write done without nack");
    check(u_dev.mem[8'h30] == 8'h71 && u_dev.mem[8'h32] == 8'h73, "I2C device written");
    write(1, 7'h11, SA_I2C_DATA, '{8'h30});
    write(1, 7'h11, SA_I2C_CMD, '{{7'h50, 1'b0}, 8'd1});
    #15us;
    write(1, 7'h11, SA_I2C_CMD, '{{7'h50, 1'b1}, 8'd3});
    #25us;
    read(1, SA_I2C_DATA, 3);
    check(r.size() == 3 && r[0] == 8'h71 && r[1] == 8'h72 && r[2] == 8'h73, "I2C read back");
    // corrupted frame: interrupt frame of about 1 us
    begin
      realtime tr, tf;
      send(1, '{8'h91, 8'h08}, 1);
      fork : wi
        begin @(posedge sm1); tr = $realtime; @(negedge sm1); tf = $realtime; end
        begin #5us; tr = 0; tf = 0; end
      join_any
      disable wi;
      check(tf - tr > 950.0 && tf - tr < 1050.0, $sformatf("interrupt frame %0.1f ns", tf - tr));
    end
    #2us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
