// tb_sync_fifo: random push/pop traffic against a queue reference model for
// a 128-deep byte FIFO; checks first-word-fall-through data, count, full and
// empty, and that pushes when full (even with a pop in the same cycle) and
// pops when empty are ignored.
module tb_sync_fifo;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic push = 0, pop = 0, full, empty; logic [7:0] wdata = 0, rdata; logic [7:0] count;
  sync_fifo dut (.clk, .rst, .push, .wdata, .pop, .rdata, .full, .empty, .count);
  initial begin #5000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  logic [7:0] q[$];
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int bias; bias = (i / 500) % 2 ? 30 : 70;
      push = ($urandom % 100) < bias; pop = ($urandom % 100) < (100 - bias); wdata = $urandom;
      @(posedge clk); #1;
      begin
        int n; n = q.size();
        if (pop && n > 0) void'(q.pop_front());
        if (push && n < 128) q.push_back(wdata);
      end
      push = 0; pop = 0;
      chk(count == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      chk(full == (q.size() == 128) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) chk(rdata == q[0], "head data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
