// tb_spac_fifo: random pushes and pops against a queue model, 16 x 8 bits.
// Checks data order, empty/full flags, the count, that a push when full
// and a pop when empty change nothing, and clear.
module tb_spac_fifo;
  logic clk = 0, rst_n = 0;
  logic clear = 0, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model [$];
  int nfull = 0, nempty_pop = 0;

  spac_fifo #(.WIDTH(8), .DEPTH(16)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == 16), "full");
      check(count == 5'(model.size()), "count");
      if (model.size() > 0) check(dout == model[0], "data");
      // phases: fill up, drain, mix
      push = ((i / 500) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ((i / 500) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      din = 8'($urandom);
      clear = (i == 3500);
      @(posedge clk);
      if (clear) model.delete();
      else begin
        if (pop && model.size() > 0) void'(model.pop_front());
        else if (pop) nempty_pop++;
        if (push && model.size() + (pop && model.size() > 0 ? 1 : 0) < 16 + 0) model.push_back(din);
        else if (push) nfull++;
      end
    end
    check(nfull > 0 && nempty_pop > 0, "full and empty cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
