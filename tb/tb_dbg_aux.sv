// tb_dbg_aux: presses of the NMI switch with bounce shorter than the debounce
// time must give exactly one NMI pulse each, DEB_CYCLES after the level
// settles; bounces alone must give none. The alternate-boot select must move
// PROM cycles from the on-board chip select to ALTBOOTCS with the read/write
// strobes, and LASTROBE must follow the MBUS strobes.
module tb_dbg_aux;
  localparam int WATCHDOG_NS = 10_000_000;
  localparam int DEB = 50;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic sw_n = 1, nmi, sel_n = 1, rom_cs = 0, rd = 0, wr = 0, rom_on; logic [2:0] alt, ls;
  dbg_aux #(.DEB_CYCLES(DEB)) dut (.clk, .rst, .nmi_sw_n(sw_n), .nmi, .alt_boot_sel_n(sel_n), .rom_cs,
    .mb_rd(rd), .mb_wr(wr), .rom_cs_onboard(rom_on), .alt_boot(alt), .lastrobe(ls));
  int nnmi = 0; always @(posedge clk) if (nmi) nnmi++;
  task automatic bounce(input int n);
    for (int i = 0; i < n; i++) begin
      sw_n = ~sw_n;
      if (i < n - 1) repeat (1 + $urandom % (DEB / 2)) @(negedge clk);
    end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int k = 0; k < 20; k++) begin
      int t, n0; n0 = nnmi;
      bounce(2 * ($urandom % 4) + 1);          // odd count: ends pressed
      t = 0; while (nnmi == n0 && t < 3 * DEB) begin @(negedge clk); t++; end
      chk(nnmi == n0 + 1, "one NMI per press");
      chk(t >= DEB - 1 && t <= DEB + 3, $sformatf("NMI after the debounce time (%0d)", t));
      bounce(2 * ($urandom % 4) + 1);          // release
      repeat (3 * DEB) @(negedge clk);
      chk(nnmi == n0 + 1, "no NMI on release");
    end
    begin int n0; n0 = nnmi; sw_n = 0; repeat (DEB / 2) @(negedge clk); sw_n = 1; repeat (3 * DEB) @(negedge clk);
      chk(nnmi == n0, "short press rejected"); end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); {sel_n, rom_cs, rd, wr} = 4'(i);
      #1;
      chk(rom_on == (rom_cs && sel_n), "on-board PROM select");
      chk(alt == {rom_cs && !sel_n, rom_cs && !sel_n && wr, rom_cs && !sel_n && rd}, "alternate boot lines");
      chk(ls == {1'b0, wr, rd}, "analyser strobes");
    end
    tb_done();
  end
endmodule
