// tb_spac_par_if: writes and reads bytes of a board memory model through
// the parallel interface. Checks the strobes, address, index and data on
// the board side, the read data returned, and the latency: ack one cycle
// after the strobe for a write and RD_WAIT+1 cycles for a read.
module tb_spac_par_if;
  import spac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  acc_req_t req = '0;
  logic ack; logic [7:0] rdata;
  logic [6:0] pi_addr; logic [15:0] pi_idx; logic [7:0] pi_wdata; logic pi_wr, pi_rd;
  logic [7:0] pi_rdata;
  int checks = 0, failures = 0;
  logic [7:0] mem [128][4];
  logic [7:0] ref_mem [128][4];

  spac_par_if dut (.*);

  always #12.5 clk = ~clk;

  // Board model: registers 4 bytes wide, read data valid one cycle after pi_rd.
  always @(posedge clk) begin
    if (pi_wr) mem[pi_addr][pi_idx[1:0]] <= pi_wdata;
    if (pi_rd) pi_rdata <= mem[pi_addr][pi_idx[1:0]];
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(input logic wr, input logic [6:0] sub, input logic [15:0] idx,
                        input logic [7:0] wd, output logic [7:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1; req.wr = wr; req.sub = sub; req.idx = idx; req.wdata = wd;
    @(negedge clk);
    req_valid = 0;
    check(wr ? pi_wr : pi_rd, "strobe");
    check(pi_addr == sub && pi_idx == idx, "address and index");
    if (wr) check(pi_wdata == wd, "write data");
    lat = 0;
    while (!ack) begin @(negedge clk); lat++; end
    rd = rdata;
  endtask

  initial begin
    logic [7:0] rd; int lat;
    foreach (mem[i, j]) begin mem[i][j] = 0; ref_mem[i][j] = 0; end
    pi_rdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      logic [6:0] a;
      logic [1:0] ix;
      logic [7:0] v;
      a = 7'($urandom % 8);
      ix = 2'($urandom);
      v = 8'($urandom);
      if ($urandom % 2) begin
        access(1, a, 16'(ix), v, rd, lat);
        ref_mem[a][ix] = v;
        check(lat == 0, "write latency");
      end else begin
        access(0, a, 16'(ix), 0, rd, lat);
        check(rd == ref_mem[a][ix], "read data");
        check(lat == 2, $sformatf("read latency %0d", lat));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
