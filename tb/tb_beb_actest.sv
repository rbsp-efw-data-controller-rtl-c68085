// tb_beb_actest: for several divisors N the half period of the AC-test
// square wave must be N*16 SCLK cycles (f = 524288/N Hz at 16.78 MHz). Each
// output must switch on and off only at a CLK1HZ tick and sit high when off.
module tb_beb_actest;
  localparam int WATCHDOG_NS = 200_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic tick = 0; logic [1:0] act;
  beb_actest dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .tick_1hz(tick), .actest(act));
  task automatic do_tick(); @(negedge clk) tick = 1; @(negedge clk) tick = 0; endtask
  task automatic measure(input int ch, output int hp);
    int t0; t0 = 0;
    @(act[ch]); @(act[ch]); t0 = $time;
    @(act[ch]); hp = ($time - t0) / 10;
  endtask
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    chk(act == 2'b11, "idle high");
    for (int k = 0; k < 6; k++) begin
      int n, hp; int ns[6] = '{1, 2, 3, 50, 333, 4096};
      n = ns[k];
      iow(8'h52, 8'(n - 1)); iow(8'h53, {2'b11, 2'b0, 4'((n - 1) >> 8)});
      ior(8'h53, r); chk(r[3:0] == 4'((n - 1) >> 8), "high byte readback");
      repeat (10) @(negedge clk);
      chk(act == 2'b11, "enable waits for CLK1HZ");
      do_tick();
      measure(0, hp); chk(hp == n * 16, $sformatf("N=%0d half period %0d", n, hp));
      measure(1, hp); chk(hp == n * 16, $sformatf("N=%0d ACTEST2 half period %0d", n, hp));
    end
    iow(8'h53, 8'h40); do_tick(); repeat (2) @(negedge clk);
    chk(act[1] == 1, "ACTEST2 off high");
    iow(8'h53, 8'h00); do_tick(); repeat (2) @(negedge clk);
    chk(act == 2'b11, "both off high");
    tb_done();
  end
endmodule
