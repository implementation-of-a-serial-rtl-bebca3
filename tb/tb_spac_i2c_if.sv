// tb_spac_i2c_if: drives the I2C interface through its internal registers,
// as SPAC accesses would: fill the emission FIFO, set the divider and bus,
// start with the command register, poll the status register until the
// transaction ends, then read the device back through the reception
// FIFO. Checks register read-back, status flags and the data on both
// sides.
module tb_spac_i2c_if;
  import spac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0; acc_req_t req = '0;
  logic ack; logic [7:0] rdata;
  logic [1:0] scl_oe, sda_oe, sda_i, dev_oe, scl, sda;
  int checks = 0, failures = 0;

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | dev_oe);
  assign sda_i = sda;

  spac_i2c_if dut (.*);
  i2c_dev_model #(.ADDR(7'h21)) u_dev0 (.scl(scl[0]), .sda(sda[0]), .sda_oe(dev_oe[0]));
  i2c_dev_model #(.ADDR(7'h21)) u_dev1 (.scl(scl[1]), .sda(sda[1]), .sda_oe(dev_oe[1]));

  always #12.5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic acc(input logic wr, input logic [6:0] sub, input logic [15:0] idx,
                     input logic [7:0] wd, output logic [7:0] rd);
    @(negedge clk);
    req_valid = 1; req.wr = wr; req.sub = sub; req.idx = idx; req.wdata = wd;
    @(negedge clk); req_valid = 0;
    check(ack, "ack after one cycle");
    rd = rdata;
  endtask

  task automatic wait_idle();
    logic [7:0] st;
    do begin repeat (50) @(negedge clk); acc(0, SA_I2C_STAT, 0, 0, st); end while (st[0]);
  endtask

  initial begin
    logic [7:0] rd, st;
    logic [7:0] data [6];
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (data[i]) data[i] = 8'($urandom);
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st == 8'h0C, "status after reset: idle, both FIFOs empty");
    // divider 1 (1.25 MHz), bus 0
    acc(1, SA_I2C_CFG, 0, 8'h01, rd);
    acc(0, SA_I2C_CFG, 0, 0, rd);
    check(rd == 8'h01, "config read-back");
    // pointer $10 and six bytes
    acc(1, SA_I2C_DATA, 0, 8'h10, rd);
    foreach (data[i]) acc(1, SA_I2C_DATA, 16'(i + 1), data[i], rd);
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st[2] == 0, "emission FIFO not empty");
    acc(1, SA_I2C_CMD, 0, {7'h21, 1'b0}, rd);
    acc(1, SA_I2C_CMD, 1, 8'd7, rd);
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st[0], "busy after start");
    wait_idle();
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st[1] == 0 && st[2] == 1, "no nack, emission FIFO drained");
    foreach (data[i]) check(u_dev0.mem[8'h10 + i] == data[i], "device memory");
    // read back: set pointer, then read 6 bytes on bus 0
    acc(1, SA_I2C_DATA, 0, 8'h10, rd);
    acc(1, SA_I2C_CMD, 0, {7'h21, 1'b0}, rd);
    acc(1, SA_I2C_CMD, 1, 8'd1, rd);
    wait_idle();
    acc(1, SA_I2C_CMD, 0, {7'h21, 1'b1}, rd);
    acc(0, SA_I2C_CMD, 0, 0, rd);
    check(rd == {7'h21, 1'b1}, "command read-back");
    acc(1, SA_I2C_CMD, 1, 8'd6, rd);
    wait_idle();
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st[3] == 0, "reception FIFO holds data");
    foreach (data[i]) begin
      acc(0, SA_I2C_DATA, 16'(i), 0, rd);
      check(rd == data[i], "read through reception FIFO");
    end
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st[3] == 1, "reception FIFO empty again");
    // absent device on bus 1
    acc(1, SA_I2C_CFG, 0, 8'h10, rd);
    acc(1, SA_I2C_CMD, 0, {7'h44, 1'b1}, rd);
    acc(1, SA_I2C_CMD, 1, 8'd1, rd);
    wait_idle();
    acc(0, SA_I2C_STAT, 0, 0, st);
    check(st[1] == 1, "nack reported");
    check(u_dev1.nstart == 1, "bus 1 used once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
