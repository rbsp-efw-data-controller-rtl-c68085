// tb_dcb_regs: reset values (ROMON set, version), dcbCtl bits driving their
// outputs, SDRAM power surviving a system reset but not a power-on reset,
// page registers, LEDs, sticky status flags and their pulse-register clears,
// the pulse-register strobes, the watchdog kick on X5 only, the sample-time
// snapshot and the interrupt path from sources through enables to int_n.
module tb_dcb_regs;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0, rst = 1, por = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic romon, sdp, eewe, lhwd, kick, wdclr, cdiclr, int_n; logic [16:0] pg0, pg1; logic [7:0] led; logic [2:0] scclr;
  logic sdn = 0, dlh = 0, clh = 0, cnul = 0, t1 = 0, t256 = 0, tlmd = 0, fld = 0, wdd = 0;
  logic [23:0] st = 24'hABCDEF; logic sl = 1;
  dcb_regs dut (.clk, .rst, .por, .io_addr, .io_wr, .io_wdata, .io_rdata, .romon, .sdram_pwr(sdp), .eeprom_we(eewe),
    .lh_wd(lhwd), .pg0, .pg1, .led, .wd_kick(kick), .wd_det_clr(wdclr), .cdi_err_clr(cdiclr), .sc_clr(scclr), .int_n,
    .board_id(3'd5), .sdram_active(1'b1), .sdram_null(sdn), .cdi_busy(1'b0), .cdi_err(1'b1), .wd_det(wdd),
    .dma_lh_err(dlh), .cpu_lh_err(clh), .cpu_null(cnul), .tick_1hz(t1), .tick_256hz(t256), .pps_det(1'b1),
    .spin_det(1'b0), .err_det(1'b1), .tlm_done(tlmd), .flash_done(fld), .sample_time(st), .sec_lsb(sl),
    .dmet(16'h1234), .sptm(16'h5678));
  int nkick = 0, nwdclr = 0, ncdi = 0; logic [2:0] scs = 0;
  always @(posedge clk) begin if (kick) nkick++; if (wdclr) nwdclr++; if (cdiclr) ncdi++; scs |= scclr; end
  task automatic pulse(ref logic s); @(negedge clk) s = 1; @(negedge clk) s = 0; endtask
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); por = 0; rst = 0;
    chk(romon && !sdp && !eewe && !lhwd, "reset values");
    ior(8'h1F, r); chk(r == 8'hC5, "version");
    ior(8'h1A, r); chk(r == {1'b0, 3'd5, 1'b1, 1'b0, 1'b0, 1'b1}, "auxStat");
    iow(8'h10, 8'h0E); chk(!romon && sdp && eewe && lhwd, "dcbCtl outputs");
    ior(8'h10, r); chk(r == 8'h0E, "dcbCtl readback");
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    chk(romon && sdp && !lhwd, "watchdog reset keeps SDRAM power, sets ROMON");
    @(negedge clk) begin rst = 1; por = 1; end @(negedge clk) begin rst = 0; por = 0; end
    chk(!sdp, "power-on reset clears SDRAM power");
    for (int i = 0; i < 6; i++) iow(8'h11 + 8'(i), 8'h31 + 8'(i * 17));
    chk(pg0 == {1'b1, 8'h42, 8'h31} && pg1 == {1'b0, 8'h75, 8'h64}, "page registers");
    iow(8'h18, 8'hA5); chk(led == 8'hA5, "LEDs");
    pulse(sdn); pulse(dlh); pulse(clh); pulse(cnul); pulse(t1);
    ior(8'h1B, r); chk(r[6:3] == 4'hF && r[2:0] == 3'b101, "sticky status flags");
    ior(8'h1A, r); chk(r[2], "SDRAM null flag");
    iow(8'h1B, 8'h10); ior(8'h1B, r); chk(r[6:4] == 0 && r[3], "error flags cleared, 1 Hz kept");
    iow(8'h1B, 8'h08); ior(8'h1B, r); chk(!r[3], "1 Hz flag cleared");
    iow(8'h1B, 8'hA7); chk(nwdclr == 1 && ncdi == 1 && scs == 3'b111, "pulse-register strobes");
    iow(8'h1F, 8'h35); iow(8'h1F, 8'hA5); iow(8'h1F, 8'h34); chk(nkick == 2, "watchdog kick on X5 only");
    iow(8'h22, 8'h00); ior(8'h22, r); chk(r == st[16:9], "snapshot low"); ior(8'h23, r); chk(r == {sl, st[23:17]}, "snapshot high");
    ior(8'h20, r); chk(r == 8'h34, "Delta MET latch");
    ior(8'h25, r); chk(r == 8'h56, "spin time latch");
    pulse(fld); @(negedge clk); chk(int_n, "flag latched but disabled");
    ior(8'h1C, r); chk(r == 3'b001, "interrupt status");
    iow(8'h10, 8'h40); chk(!int_n, "enabled FLASH interrupt");
    iow(8'h1C, 8'h01); chk(int_n, "interrupt cleared");
    iow(8'h10, 8'h30); pulse(tlmd); chk(!int_n, "TLM interrupt"); iow(8'h1C, 8'h02);
    pulse(t256); chk(!int_n, "timer interrupt"); iow(8'h1C, 8'h04); chk(int_n, "all clear");
    tb_done();
  end
endmodule
