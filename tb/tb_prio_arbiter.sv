// tb_prio_arbiter: random request patterns; each grant must go to the
// highest-priority (lowest index) requester at the time of the grant, stay
// one-hot and held until done, and no requester may be starved while it is
// the highest request.
module tb_prio_arbiter;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [4:0] req = 0, gnt; logic done = 0;
  prio_arbiter #(.N(5)) dut (.clk, .rst, .req, .done, .gnt);
  int served[5];
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      logic [4:0] r0; int hold, exp;
      req = $urandom; if (req == 0) req = 5'b10000;
      r0 = req; exp = 0;
      for (int k = 4; k >= 0; k--) if (r0[k]) exp = k;
      @(negedge clk);
      chk(gnt == 5'(1 << exp), $sformatf("grant %b for req %b", gnt, r0));
      hold = $urandom % 5;
      repeat (hold) begin req = $urandom; @(negedge clk); chk(gnt == 5'(1 << exp), "grant held"); end
      served[exp]++;
      req = 0; done = 1; @(negedge clk); done = 0;
      chk(gnt == 0, "released after done");
    end
    chk(served[4] > 0 && served[0] > 0, "all levels exercised");
    tb_done();
  end
endmodule
