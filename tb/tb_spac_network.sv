// tb_spac_network: a whole SPAC network at its full size, one master and
// 15 slaves on the copper bus, run end to end through the master's
// command interface.
// Slave s has address $10+s and local broadcast group s mod 4; each has a
// board memory model on its parallel interface, and slave 3 has an I2C
// memory device on bus 0. The link between the master and the bus is a
// direct connection through which the testbench can corrupt one bit.
// Every mechanism is made to happen and counted: point-to-point writes
// and reads (with the read times of 1, 2, 4 and 15 bytes checked against
// request + answer + 0.9 us), global and local broadcast writes, a switch
// to the MS2 downstream line and to the SM2 upstream line, a read with no
// answer (timeout), a corrupted frame answered by interrupt frames, and an
// I2C write and read through a slave.
module tb_spac_network;
  import spac_pkg::*;
  localparam int NS = 15;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_rnw = 0; logic [6:0] cmd_addr = 0, cmd_sub = 0;
  logic [15:0] cmd_len = 0; logic ms_sel = 0, sm_sel = 0;
  logic wd_valid, wd_ready; logic [7:0] wd_data;
  logic rd_valid; logic [7:0] rd_data; logic done, ok, intr;
  logic mst_ms1, mst_ms2, mst_sm1, mst_sm2, bus_ms1, bus_ms2, bus_sm1, bus_sm2;
  logic [6:0]  slave_addr [NS]; logic [3:0] bcast_group [NS]; logic intr_en [NS];
  logic [6:0]  pi_addr [NS]; logic [15:0] pi_idx [NS]; logic [7:0] pi_wdata [NS];
  logic        pi_wr [NS], pi_rd [NS]; logic [7:0] pi_rdata [NS];
  logic [1:0]  scl_oe [NS], sda_oe [NS], sda_i [NS];
  logic        line_sel [NS], frame_err [NS];
  logic corrupt = 0;
  int checks = 0, failures = 0;

  spac_network dut (.*);

  assign bus_ms1 = mst_ms1 ^ corrupt;
  assign bus_ms2 = mst_ms2;
  assign mst_sm1 = bus_sm1;
  assign mst_sm2 = bus_sm2;

  // I2C device on bus 0 of slave 3; other buses have none
  logic dev_oe;
  wire scl3 = ~scl_oe[3][0];
  wire sda3 = ~(sda_oe[3][0] | dev_oe);
  i2c_dev_model #(.ADDR(7'h50)) u_dev (.scl(scl3), .sda(sda3), .sda_oe(dev_oe));
  for (genvar s = 0; s < NS; s++) begin : g_cfg
    assign slave_addr[s] = 7'h10 + 7'(s);
    assign bcast_group[s] = 4'(s % 4);
    assign intr_en[s] = 1'b1;
    assign sda_i[s] = (s == 3) ? {~sda_oe[s][1], sda3} : ~sda_oe[s];
  end

  always #12.5 clk = ~clk;

  // board memories: 128 sub-addresses x 16 bytes per slave
  logic [7:0] board [NS][128][16];
  always @(posedge clk) for (int s = 0; s < NS; s++) begin
    if (pi_wr[s]) board[s][pi_addr[s]][pi_idx[s][3:0]] <= pi_wdata[s];
    if (pi_rd[s]) pi_rdata[s] <= board[s][pi_addr[s]][pi_idx[s][3:0]];
  end

  initial begin
    #6ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // master side bookkeeping
  logic [7:0] wq [$], rdq [$];
  int ndone = 0, nintr = 0; logic last_ok;
  assign wd_valid = wq.size() > 0;
  assign wd_data = wq.size() > 0 ? wq[0] : 8'h00;
  always @(posedge clk) if (rst_n) begin
    if (wd_valid && wd_ready) void'(wq.pop_front());
    if (rd_valid) rdq.push_back(rd_data);
    if (done) begin ndone++; last_ok = ok; end
    if (intr) nintr++;
  end

  // line activity times for the timing checks
  realtime t_first_ms, t_last_sm;
  bit ms_seen;
  logic sm_q = 0;
  always @(posedge clk) begin
    if (!ms_seen && (mst_ms1 || mst_ms2)) begin ms_seen = 1; t_first_ms = $realtime; end
    sm_q <= bus_sm1;
    if (bus_sm1 != sm_q) t_last_sm = $realtime;
  end

  int n_write = 0, n_read = 0, n_gbc = 0, n_lbc = 0, n_ms2 = 0, n_sm2 = 0, n_timeout = 0,
      n_intr = 0, n_i2c = 0, n_timed = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic transact(input logic rnw, input logic [6:0] a, input logic [6:0] sa,
                          input logic [15:0] n, input logic msel = 0, input logic ssel = 0);
    int nd = ndone;
    rdq.delete();
    ms_seen = 0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_rnw = rnw; cmd_addr = a; cmd_sub = sa; cmd_len = n;
    ms_sel = msel; sm_sel = ssel;
    @(negedge clk); cmd_valid = 0;
    while (ndone == nd) @(negedge clk);
    #2us;
  endtask

  task automatic write(input logic [6:0] a, input logic [6:0] sa, input logic [7:0] d [$],
                       input logic msel = 0);
    wq = d;
    transact(0, a, sa, 16'(d.size()), msel, 0);
    check(last_ok, "write done");
  endtask

  initial begin
    logic [7:0] d [$];
    int sizes [4];
    sizes = '{1, 2, 4, 15};
    foreach (board[s, a, i]) board[s][a][i] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1us;
    // point-to-point writes and timed reads on every slave in turn
    for (int s = 0; s < NS; s++) begin
      int n;
      realtime expt;
      n = sizes[s % 4];
      d.delete();
      for (int i = 0; i < n; i++) d.push_back(8'($urandom));
      write(7'h10 + 7'(s), 7'h08, d);
      check(board[s][8][0] == d[0], $sformatf("slave %0d written: %h vs %h", s, board[s][8][0], d[0]));
      n_write++;
      transact(1, 7'h10 + 7'(s), 7'h08, 16'(n));
      check(last_ok && rdq == d, $sformatf("slave %0d read back", s));
      n_read++;
      // request words: 4 + (n != 1); answer words: n + 4; plus one word time
      expt = ((n == 1 ? 4 : 5) + n + 4 + 1) * 900.0;
      check(t_last_sm - t_first_ms > expt - 100.0 && t_last_sm - t_first_ms < expt + 100.0,
            $sformatf("read of %0d bytes: %0.1f ns, expected %0.1f", n, t_last_sm - t_first_ms, expt));
      n_timed++;
    end
    // global broadcast
    write(ADDR_GLOBAL, 7'h10, '{8'hB0, 8'hB1});
    begin
      bit all;
      all = 1;
      for (int s = 0; s < NS; s++) all &= (board[s][16][0] == 8'hB0 && board[s][16][1] == 8'hB1);
      check(all, "global broadcast reached every slave");
      n_gbc++;
    end
    // local broadcast to group 2: slaves 2, 6, 10, 14
    write(ADDR_LOCAL_BASE + 2, 7'h11, '{8'hC2});
    begin
      bit good;
      good = 1;
      for (int s = 0; s < NS; s++) good &= ((board[s][17][0] == 8'hC2) == (s % 4 == 2));
      check(good, "local broadcast reached exactly group 2");
      n_lbc++;
    end
    // MS2 downstream and SM2 upstream
    write(7'h15, 7'h12, '{8'h6E}, 1);
    check(dut.line_sel[5] == 1, "slave 5 switched to MS2");
    n_ms2++;
    transact(1, 7'h15, 7'h12, 1, 1, 1);
    check(last_ok && rdq.size() == 1 && rdq[0] == 8'h6E, "read over MS2/SM2");
    n_sm2++;
    transact(1, 7'h15, 7'h12, 1, 0, 0);
    check(last_ok && line_sel[5] == 0, "back on MS1");
    // read from an absent slave: timeout
    transact(1, 7'h3F, 7'h08, 1);
    check(!last_ok, "absent slave times out");
    n_timeout++;
    // corrupted write frame: one half bit inverted on the link
    begin
      int i0;
      i0 = nintr;
      fork
        write(7'h12, 7'h13, '{8'h01, 8'h02, 8'h03});
        begin #3us; corrupt = 1; #50; corrupt = 0; end
      join
      #3us;
      check(nintr == i0 + 1, "interrupt frame reached the master");
      n_intr += nintr - i0;
    end
    // I2C through slave 3: pointer $40 and 4 bytes, then read back
    write(7'h13, SA_I2C_CFG, '{8'h00});
    write(7'h13, SA_I2C_DATA, '{8'h40, 8'hD1, 8'hD2, 8'hD3, 8'hD4});
    write(7'h13, SA_I2C_CMD, '{{7'h50, 1'b0}, 8'd5});
    #25us;
    transact(1, 7'h13, SA_I2C_STAT, 1);
    check(last_ok && rdq[0][1:0] == 2'b00, "I2C write finished with acknowledge");
    write(7'h13, SA_I2C_DATA, '{8'h40});
    write(7'h13, SA_I2C_CMD, '{{7'h50, 1'b0}, 8'd1});
    #10us;
    write(7'h13, SA_I2C_CMD, '{{7'h50, 1'b1}, 8'd4});
    #20us;
    transact(1, 7'h13, SA_I2C_DATA, 4);
    check(last_ok && rdq.size() == 4 && rdq[0] == 8'hD1 && rdq[1] == 8'hD2 && rdq[2] == 8'hD3 && rdq[3] == 8'hD4, "I2C data read back through SPAC");
    n_i2c++;
    $display("mechanisms: write %0d read %0d timed %0d global %0d local %0d ms2 %0d sm2 %0d timeout %0d interrupt %0d i2c %0d",
             n_write, n_read, n_timed, n_gbc, n_lbc, n_ms2, n_sm2, n_timeout, n_intr, n_i2c);
    check(n_write > 0 && n_read > 0 && n_timed > 0 && n_gbc > 0 && n_lbc > 0 && n_ms2 > 0 &&
          n_sm2 > 0 && n_timeout > 0 && n_intr > 0 && n_i2c > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
