// tb_int_ctl: random events, enables and clears against a reference model of
// the three latched interrupt flags; the interrupt line must be low exactly
// when an enabled flag is set, and a clear in the same cycle as a new event
// must leave the flag set.
module tb_int_ctl;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [2:0] src = 0, en = 0, clr = 0, stat; logic int_n;
  int_ctl dut (.clk, .rst, .src, .en, .clr, .stat, .int_n);
  logic [2:0] m;
  initial begin
    repeat (3) @(negedge clk); rst = 0; m = 0;
    @(negedge clk); chk(stat == 0 && int_n, "reset state");
    for (int i = 0; i < 2000; i++) begin
      src = (($urandom % 4) == 0) ? 3'($urandom) : 3'b0;
      clr = (($urandom % 3) == 0) ? 3'($urandom) : 3'b0;
      if (i % 50 == 0) en = $urandom;
      if (i == 7) begin src = 3'b010; clr = 3'b010; end
      @(posedge clk); m = (m & ~clr) | src;
      @(negedge clk);
      chk(stat == m, "flags match model");
      chk(int_n == !(|(m & en)), "interrupt line");
    end
    tb_done();
  end
endmodule
