// tb_spac_clock_margin: robustness of the link against clock differences.
//
// A spac_master and a spac_slave run on separate clocks. Two sweeps are
// made, each point starting from a reset of both chips:
//  - master clock frequency from 70 % to 140 % of 40 MHz, slave at 40 MHz
//    with a 50 % duty cycle;
//  - slave clock at 40 MHz with its duty cycle from 10 % to 90 %, master
//    at 40 MHz.
// At each point four transactions are made (a write of 4 random bytes and
// its read back, a 1-byte write and its read back) and every transaction
// that does not complete with the right data counts as an error. The
// error counts are printed as a table. The link is required to be
// error-free for frequency offsets up to 10 % and duty cycles from 40 % to
// 60 %; points outside that range are only reported.
module tb_spac_clock_margin;
  import spac_pkg::*;
  logic clk_m = 0, clk_s = 0, rst_n = 0;
  realtime half_m = 12.5, hi_s = 12.5, lo_s = 12.5;

  logic cmd_valid = 0, cmd_ready, cmd_rnw = 0; logic [6:0] cmd_addr = 7'h21, cmd_sub = 0;
  logic [15:0] cmd_len = 0;
  logic wd_valid, wd_ready; logic [7:0] wd_data;
  logic rd_valid; logic [7:0] rd_data; logic done, ok, intr;
  logic ms1, ms2, sm1, sm2;
  logic [6:0] pi_addr; logic [15:0] pi_idx; logic [7:0] pi_wdata, pi_rdata;
  logic pi_wr, pi_rd, line_sel, frame_err;
  logic [1:0] scl_oe, sda_oe;
  int checks = 0, failures = 0;

  spac_master u_m (
    .clk(clk_m), .rst_n, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_sub, .cmd_len,
    .ms_sel(1'b0), .sm_sel(1'b0), .wd_valid, .wd_data, .wd_ready, .rd_valid, .rd_data,
    .done, .ok, .intr, .ms1, .ms2, .sm1, .sm2);

  spac_slave u_s (
    .clk(clk_s), .rst_n, .slave_addr(7'h21), .bcast_group(4'd1), .intr_en(1'b1),
    .ms1, .ms2, .sm1, .sm2, .pi_addr, .pi_idx, .pi_wdata, .pi_wr, .pi_rd, .pi_rdata,
    .scl_oe, .sda_oe, .sda_i(~sda_oe), .line_sel, .frame_err);

  always #(half_m) clk_m = ~clk_m;
  initial forever begin
    #(lo_s) clk_s = 1;
    #(hi_s) clk_s = 0;
  end

  // board memory on the slave side
  logic [7:0] board [128][16];
  always @(posedge clk_s) begin
    if (pi_wr) board[pi_addr][pi_idx[3:0]] <= pi_wdata;
    if (pi_rd) pi_rdata <= board[pi_addr][pi_idx[3:0]];
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // master-side bookkeeping
  logic [7:0] wq [$], rdq [$];
  int ndone = 0; logic last_ok = 0;
  assign wd_valid = wq.size() > 0;
  assign wd_data = wq.size() > 0 ? wq[0] : 8'h00;
  always @(posedge clk_m) if (rst_n) begin
    if (wd_valid && wd_ready) void'(wq.pop_front());
    if (rd_valid) rdq.push_back(rd_data);
    if (done) begin ndone++; last_ok = ok; end
  end

  task automatic transact(input logic rnw, input logic [6:0] sa, input logic [15:0] n);
    int nd;
    nd = ndone;
    rdq.delete();
    @(negedge clk_m);
    while (!cmd_ready) @(negedge clk_m);
    cmd_valid = 1; cmd_rnw = rnw; cmd_sub = sa; cmd_len = n;
    @(negedge clk_m); cmd_valid = 0;
    while (ndone == nd) @(negedge clk_m);
    #2us;
  endtask

  // one measurement point: returns the number of failed transactions (of 4)
  int errs;
  task automatic run_point();
    logic [7:0] d [$];
    logic [7:0] one;
    errs = 0;
    rst_n = 0;
    #200ns;
    rst_n = 1;
    #1us;
    d.delete();
    for (int i = 0; i < 4; i++) d.push_back(8'($urandom));
    wq = d;
    transact(0, 7'h05, 4);
    if (!last_ok || board[5][0] != d[0] || board[5][3] != d[3]) errs++;
    transact(1, 7'h05, 4);
    if (!last_ok || rdq.size() != 4 || rdq[0] != d[0] || rdq[1] != d[1] || rdq[2] != d[2] ||
        rdq[3] != d[3]) errs++;
    one = 8'($urandom);
    wq.delete(); wq.push_back(one);
    transact(0, 7'h06, 1);
    if (!last_ok || board[6][0] != one) errs++;
    transact(1, 7'h06, 1);
    if (!last_ok || rdq.size() != 1 || rdq[0] != one) errs++;
  endtask

  initial begin
    int pct;
    int freq_pts [17];
    int duty_pts [11];
    freq_pts = '{70, 75, 80, 85, 90, 91, 95, 100, 105, 109, 110, 115, 120, 125, 130, 135, 140};
    duty_pts = '{10, 20, 30, 35, 40, 50, 60, 65, 70, 80, 90};
    foreach (board[a, i]) board[a][i] = 8'h00;
    pi_rdata = 8'h00;
    $display("master clock sweep (slave 40 MHz, 50 %% duty):");
    foreach (freq_pts[k]) begin
      pct = freq_pts[k];
      half_m = 12.5 * 100.0 / pct;
      run_point();
      $display("  master %0d %% of 40 MHz: %0d errors of 4", pct, errs);
      if (pct >= 90 && pct <= 110) begin
        checks++;
        if (errs != 0) begin
          failures++;
          $display("FAIL errors at master clock %0d %%", pct);
        end
      end
    end
    half_m = 12.5;
    $display("slave clock duty-cycle sweep (both at 40 MHz):");
    foreach (duty_pts[k]) begin
      pct = duty_pts[k];
      hi_s = 25.0 * pct / 100.0;
      lo_s = 25.0 - hi_s;
      run_point();
      $display("  slave duty %0d %%: %0d errors of 4", pct, errs);
      if (pct >= 40 && pct <= 60) begin
        checks++;
        if (errs != 0) begin
          failures++;
          $display("FAIL errors at slave duty cycle %0d %%", pct);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
