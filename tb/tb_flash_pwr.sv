// tb_flash_pwr: each of the eight module power settings is selected in turn;
// exactly the decoded power switch must be on, FLASH_ACTIVE must stay low
// and the array write-protected through the ramp, then one RESET command must
// reach the dies (counted by the NAND model) and FLASH_ACTIVE rise once the
// dies are ready. FLASHWRENB must drive the write protect only while active,
// FLASHMODE must change only while the DMA is idle, and FLASH_ON/OFF = 0
// must switch all modules off.
module tb_flash_pwr;
  localparam int WATCHDOG_NS = 50_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic dma_busy = 0, rb_n, act, mode, wp_n, own, cle, we_n; logic [7:0] pwr_en, ce_n, fio, io_in;
  flash_pwr #(.RAMP_CYCLES(40), .READY_TIMEOUT(200)) dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata,
    .dma_busy, .f_rb_n(rb_n), .pwr_en, .active(act), .mode_dma(mode), .wp_n, .bus_own(own), .f_ce_n(ce_n),
    .f_cle(cle), .f_we_n(we_n), .f_io(fio));
  nand_model fm (.clk, .ce_n(own ? ce_n : 8'hFF), .cle(own & cle), .ale(1'b0), .we_n(own ? we_n : 1'b1),
    .re_n(1'b1), .io_out(fio), .io_in, .rb_n);
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    chk(pwr_en == 0 && !act, "reset: all off");
    ior(8'hA0, r); chk(r == 8'h40, "reset value: DMA mode, off");
    for (int m = 0; m < 8; m++) begin
      int n0, t; n0 = fm.nreset;
      iow(8'hA0, 8'hC8 | 8'(m));
      chk(pwr_en == 8'(1 << m), $sformatf("module %0d powered alone", m));
      chk(!act && !wp_n, "inactive and write-protected during ramp");
      t = 0; while (!act && t < 1000) begin @(negedge clk); t++; if (!act) chk(!wp_n, "protected until active"); end
      chk(act, "FLASH_ACTIVE rises");
      chk(fm.nreset == n0 + 1, "one RESET command");
      chk(wp_n, "FLASHWRENB applied when active");
      ior(8'hA0, r); chk(r[4] && r[2:0] == 3'(m), "status readback");
    end
    iow(8'hA0, 8'h4E); chk(!act, "setting change drops active");
    while (!act) @(negedge clk);
    chk(!wp_n, "write protect when FLASHWRENB = 0");
    dma_busy = 1; iow(8'hA0, 8'h0E); @(negedge clk);
    // the power setting did not change, so the block stays active
    chk(mode == 1, "mode held while DMA busy");
    dma_busy = 0; repeat (2) @(negedge clk); chk(mode == 0, "mode changes when DMA idle");
    iow(8'hA0, 8'h07); repeat (2) @(negedge clk);
    chk(pwr_en == 0 && !act, "FLASH_ON/OFF clear: all off");
    tb_done();
  end
endmodule
