// tb_spac_i2c_master: I2C transactions against a behavioural memory device.
// Writes a pointer byte and data bytes (taken from a FIFO model) to a
// device on bus 1, reads them back, checks a transaction to an absent
// address ends with nack, that only the selected bus moves, and the SCL
// period: 16*(div+1) cycles, i.e. 2.5 MHz at div = 0 and 156 kHz at
// div = 15 with the 40 MHz clock. The duration of a transaction must be
// (11 + 9*len) SCL periods (start, address, len bytes, stop).
module tb_spac_i2c_master;
  logic clk = 0, rst_n = 0;
  logic start = 0; logic [7:0] addr_byte = 0; logic [3:0] len = 0, div = 0; logic bus_sel = 0;
  logic [7:0] tx_data; logic tx_empty, tx_pop;
  logic [7:0] rx_data; logic rx_push, busy, nack, done;
  logic [1:0] scl_oe, sda_oe, sda_i;
  logic [1:0] dev_oe;
  logic [1:0] scl, sda;
  int checks = 0, failures = 0;
  logic [7:0] txq [$];
  logic [7:0] rxq [$];

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | dev_oe);
  assign sda_i = sda;
  assign tx_empty = (txq.size() == 0);
  assign tx_data = tx_empty ? 8'h00 : txq[0];

  spac_i2c_master dut (.*);
  i2c_dev_model #(.ADDR(7'h50)) u_dev0 (.scl(scl[0]), .sda(sda[0]), .sda_oe(dev_oe[0]));
  i2c_dev_model #(.ADDR(7'h50)) u_dev1 (.scl(scl[1]), .sda(sda[1]), .sda_oe(dev_oe[1]));

  always #12.5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (tx_pop) void'(txq.pop_front());
    if (rx_push) rxq.push_back(rx_data);
  end

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

  // Runs a transaction and returns its length in cycles.
  task automatic run(input logic [7:0] ab, input logic [3:0] n, input logic [3:0] d,
                     input logic b, output int cycles);
    @(negedge clk);
    start = 1; addr_byte = ab; len = n; div = d; bus_sel = b;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  int sclp_t0, sclp_t1, nrise;
  always @(posedge scl[1]) begin sclp_t0 = sclp_t1; sclp_t1 = $time; nrise++; end

  initial begin
    int cyc; int nb;
    logic [7:0] data [15];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    foreach (data[i]) data[i] = 8'($urandom);
    // write pointer $20 then 4 bytes on bus 1 at 2.5 MHz
    txq = '{8'h20, data[0], data[1], data[2], data[3]};
    run({7'h50, 1'b0}, 5, 0, 1, cyc);
    check(!nack, "write acknowledged");
    check(u_dev1.nwr == 4, "device got 4 bytes");
    for (int i = 0; i < 4; i++) check(u_dev1.mem[8'h20 + i] == data[i], "device memory");
    check(u_dev0.nstart == 0, "other bus idle");
    check(cyc >= (11 + 9 * 5) * 16 - 4 && cyc <= (11 + 9 * 5) * 16 + 4,
          $sformatf("write duration %0d cycles", cyc));
    check(sclp_t1 - sclp_t0 == 400, $sformatf("SCL period %0d ns at div 0", sclp_t1 - sclp_t0));
    // set pointer, then read 4 bytes back
    txq = '{8'h20};
    run({7'h50, 1'b0}, 1, 0, 1, cyc);
    rxq.delete();
    run({7'h50, 1'b1}, 4, 0, 1, cyc);
    check(rxq.size() == 4, "4 bytes read");
    if (rxq.size() == 4) for (int i = 0; i < 4; i++) check(rxq[i] == data[i], "read data");
    // 15 bytes at the slowest clock on bus 0
    txq = '{8'h40};
    for (int i = 0; i < 14; i++) txq.push_back(data[i]);
    nrise = 0;
    run({7'h50, 1'b0}, 15, 15, 0, cyc);
    check(!nack && u_dev0.nwr == 14, "15-byte write at slow clock");
    check(cyc >= (11 + 9 * 15) * 256 - 8 && cyc <= (11 + 9 * 15) * 256 + 8,
          $sformatf("slow write duration %0d cycles", cyc));
    check(nrise == 0, "bus 1 idle while bus 0 used");
    // absent device
    run({7'h33, 1'b1}, 2, 0, 1, cyc);
    check(nack, "absent device not acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
