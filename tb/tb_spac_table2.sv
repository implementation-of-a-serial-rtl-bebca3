// tb_spac_table2: transfer times of the parallel and the I2C interface.
//
// A spac_master drives a spac_slave (both at 40 MHz). The slave has a
// memory on its parallel interface and a memory device on I2C bus 0, and
// its I2C clock is set to 2.5 MHz. For 1, 2, 4 and 15 bytes the testbench
// writes and reads a data block through each interface and measures the
// time on the serial lines, from the start of the first frame of the
// operation to the end of its last frame:
//  - parallel write: one write frame;
//  - parallel read: read request and the slave's answer;
//  - I2C write: the data into the emission FIFO, the command register,
//    then status reads until the I2C transfer is over;
//  - I2C read: the command register, status reads until the transfer is
//    over, then one read of the reception FIFO.
// The parallel times are checked (within 50 ns) against the reference
// figures of the original system 4.5/5.4/7.2/17.1 us (write) and 9.0/10.8/12.6/22.5 us (read),
// which follow from 0.9 us per 9-bit word and one word time between a
// request and its answer. For I2C the testbench checks the data and that
// each extra byte costs 9 SCL periods (3.6 us) on the I2C bus; the total
// I2C times depend on how the status is polled and are printed next to
// the reference figures 18.0/22.5/31.5/81.0 us (write) and
// 27.0/33.3/44.1/103.5 us (read) for comparison.
module tb_spac_table2;
  import spac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_rnw = 0; logic [6:0] cmd_addr = 7'h21, cmd_sub = 0;
  logic [15:0] cmd_len = 0;
  logic wd_valid, wd_ready; logic [7:0] wd_data;
  logic rd_valid; logic [7:0] rd_data; logic done, ok, intr;
  logic ms1, ms2, sm1, sm2;
  logic [6:0] pi_addr; logic [15:0] pi_idx; logic [7:0] pi_wdata, pi_rdata;
  logic pi_wr, pi_rd, line_sel, frame_err;
  logic [1:0] scl_oe, sda_oe, sda_i;
  int checks = 0, failures = 0;

  spac_master u_m (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_sub, .cmd_len,
    .ms_sel(1'b0), .sm_sel(1'b0), .wd_valid, .wd_data, .wd_ready, .rd_valid, .rd_data,
    .done, .ok, .intr, .ms1, .ms2, .sm1, .sm2);

  spac_slave u_s (
    .clk, .rst_n, .slave_addr(7'h21), .bcast_group(4'd1), .intr_en(1'b1),
    .ms1, .ms2, .sm1, .sm2, .pi_addr, .pi_idx, .pi_wdata, .pi_wr, .pi_rd, .pi_rdata,
    .scl_oe, .sda_oe, .sda_i, .line_sel, .frame_err);

  // I2C memory without pointer byte on bus 0
  logic dev_oe;
  wire scl0 = ~scl_oe[0];
  wire sda0 = ~(sda_oe[0] | dev_oe);
  i2c_dev_model #(.ADDR(7'h50), .HAS_PTR(1'b0)) u_dev (.scl(scl0), .sda(sda0), .sda_oe(dev_oe));
  assign sda_i = {~sda_oe[1], sda0};

  always #12.5 clk = ~clk;

  logic [7:0] board [128][16];
  always @(posedge clk) begin
    if (pi_wr) board[pi_addr][pi_idx[3:0]] <= pi_wdata;
    if (pi_rd) pi_rdata <= board[pi_addr][pi_idx[3:0]];
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] wq [$], rdq [$];
  int ndone = 0; logic last_ok = 0;
  assign wd_valid = wq.size() > 0;
  assign wd_data = wq.size() > 0 ? wq[0] : 8'h00;
  always @(posedge clk) if (rst_n) begin
    if (wd_valid && wd_ready) void'(wq.pop_front());
    if (rd_valid) rdq.push_back(rd_data);
    if (done) begin ndone++; last_ok = ok; end
  end

  // line edges: first rising edge and last edge on MS1 or SM1 since arm;
  // the first bit of a frame is a 1 (mid-bit rise) and the last a 0
  // (mid-bit fall), so an operation lasts last - first + 100 ns
  bit armed = 0;
  realtime t_first, t_last;
  logic ms_q = 0, sm_q = 0;
  always @(posedge clk) begin
    ms_q <= ms1; sm_q <= sm1;
    if (armed && (ms1 != ms_q || sm1 != sm_q)) begin
      if (t_first < 0) t_first = $realtime;
      t_last = $realtime;
    end
  end
  function automatic realtime span();
    return t_last - t_first + 100.0;
  endfunction

  // time the selected I2C bus is active (first SCL low to STOP)
  realtime t_scl0, t_scl1;
  bit scl_seen = 0;
  always @(negedge scl0) if (!scl_seen) begin scl_seen = 1; t_scl0 = $realtime; end
  always @(posedge sda0) if (scl0 && scl_seen) t_scl1 = $realtime;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic transact(input logic rnw, input logic [6:0] sa, input logic [15:0] n);
    int nd;
    nd = ndone;
    rdq.delete();
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_rnw = rnw; cmd_sub = sa; cmd_len = n;
    @(negedge clk); cmd_valid = 0;
    while (ndone == nd) @(negedge clk);
  endtask

  task automatic arm();
    #2us;
    t_first = -1.0;
    armed = 1;
  endtask

  task automatic poll_i2c();
    do transact(1, SA_I2C_STAT, 1);
    while (last_ok && rdq.size() == 1 && rdq[0][0]);
  endtask

  realtime t_pw [4], t_pr [4], t_iw [4], t_ir [4], bus_w [4];
  initial begin
    int sizes [4];
    realtime ref_pw [4], ref_pr [4], ref_iw [4], ref_ir [4];
    logic [7:0] d [$];
    int n;
    sizes = '{1, 2, 4, 15};
    ref_pw = '{4500.0, 5400.0, 7200.0, 17100.0};
    ref_pr = '{9000.0, 10800.0, 12600.0, 22500.0};
    ref_iw = '{18000.0, 22500.0, 31500.0, 81000.0};
    ref_ir = '{27000.0, 33300.0, 44100.0, 103500.0};
    foreach (board[a, i]) board[a][i] = 8'h00;
    pi_rdata = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1us;
    wq.delete(); wq.push_back(8'h00);   // I2C bus 0 at 2.5 MHz
    transact(0, SA_I2C_CFG, 1);
    foreach (sizes[k]) begin
      n = sizes[k];
      d.delete();
      for (int i = 0; i < n; i++) d.push_back(8'($urandom));
      // parallel interface
      arm(); wq = d; transact(0, 7'h08, 16'(n)); #2us; armed = 0;
      t_pw[k] = span();
      check(last_ok && board[8][n - 1] == d[n - 1], $sformatf("parallel write of %0d bytes", n));
      arm(); transact(1, 7'h08, 16'(n)); #2us; armed = 0;
      t_pr[k] = span();
      check(last_ok && rdq == d, $sformatf("parallel read of %0d bytes", n));
      check(t_pw[k] > ref_pw[k] - 50.0 && t_pw[k] < ref_pw[k] + 50.0,
            $sformatf("parallel write time %0.1f ns for %0d bytes", t_pw[k], n));
      check(t_pr[k] > ref_pr[k] - 50.0 && t_pr[k] < ref_pr[k] + 50.0,
            $sformatf("parallel read time %0.1f ns for %0d bytes", t_pr[k], n));
      // I2C interface
      scl_seen = 0;
      arm();
      wq = d; transact(0, SA_I2C_DATA, 16'(n));
      wq.delete(); wq.push_back({7'h50, 1'b0}); wq.push_back(8'(n));
      transact(0, SA_I2C_CMD, 2);
      poll_i2c();
      #2us; armed = 0;
      t_iw[k] = span();
      bus_w[k] = t_scl1 - t_scl0;
      check(last_ok && rdq[0][1] == 1'b0 && u_dev.mem[n - 1] == d[n - 1],
            $sformatf("I2C write of %0d bytes", n));
      arm();
      wq.delete(); wq.push_back({7'h50, 1'b1}); wq.push_back(8'(n));
      transact(0, SA_I2C_CMD, 2);
      poll_i2c();
      transact(1, SA_I2C_DATA, 16'(n));
      #2us; armed = 0;
      t_ir[k] = span();
      check(last_ok && rdq == d, $sformatf("I2C read of %0d bytes", n));
    end
    // each I2C byte is 9 SCL periods of 400 ns
    check((bus_w[3] - bus_w[2]) / 11.0 > 3550.0 && (bus_w[3] - bus_w[2]) / 11.0 < 3650.0,
          $sformatf("I2C time per byte %0.1f ns", (bus_w[3] - bus_w[2]) / 11.0));
    $display("bytes | parallel write  read  | I2C write  read  (reference values in brackets, us)");
    foreach (sizes[k])
      $display("%5d | %6.1f (%4.1f) %5.1f (%4.1f) | %6.1f (%5.1f) %6.1f (%5.1f)", sizes[k],
               t_pw[k] / 1000.0, ref_pw[k] / 1000.0, t_pr[k] / 1000.0, ref_pr[k] / 1000.0,
               t_iw[k] / 1000.0, ref_iw[k] / 1000.0, t_ir[k] / 1000.0, ref_ir[k] / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
