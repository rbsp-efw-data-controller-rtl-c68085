// tb_sdram_ctl: the controller is powered with a short power-up wait and
// driven against the behavioural SDRAM model. Requests before the
// initialization ends must come back as null cycles. Random byte and
// longword reads and writes over all four dies and banks must match a
// reference memory, with no protocol violation and refreshes at the set
// interval. Switching power off must drop active and give null cycles again.
module tb_sdram_ctl;
  localparam int WATCHDOG_NS = 100_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic pwr = 0, act, req = 0, we = 0, s4 = 0, ack, nul; logic [27:0] ad = 0; logic [31:0] wd = 0, rd;
  logic pe, cke, ras, cas, wen, oe; logic [3:0] csn; logic [1:0] ba; logic [12:0] a; logic [7:0] dqo, dqi;
  sdram_ctl #(.PWR_WAIT(200)) dut (.clk, .rst, .pwr_on(pwr), .active(act), .op_req(req), .op_we(we),
    .op_size4(s4), .op_addr(ad), .op_wdata(wd), .op_ack(ack), .op_null(nul), .op_rdata(rd),
    .sd_pwr_en(pe), .sd_cke(cke), .sd_cs_n(csn), .sd_ras_n(ras), .sd_cas_n(cas), .sd_we_n(wen),
    .sd_ba(ba), .sd_a(a), .sd_dq_out(dqo), .sd_dq_oe(oe), .sd_dq_in(dqi));
  sdram_model mdl (.clk, .cke, .cs_n(rst ? 4'hF : csn), .ras_n(ras), .cas_n(cas), .we_n(wen), .ba, .a, .dq_out(dqo), .dq_oe(oe), .dq_in(dqi));
  logic [7:0] refm [logic [27:0]];
  function automatic logic [7:0] rb(input logic [27:0] x);
    return refm.exists(x) ? refm[x] : (x[7:0] ^ x[15:8] ^ x[23:16] ^ 8'h5A);
  endfunction
  task automatic op(input logic w, input logic l, input logic [27:0] x, input logic [31:0] d, output logic [31:0] q, output logic n);
    @(negedge clk); req = 1; we = w; s4 = l; ad = x; wd = d;
    @(posedge clk); while (!ack) @(posedge clk);
    q = rd; n = nul; @(negedge clk); req = 0;
  endtask
  logic [31:0] q; logic n; int t0, r0;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    op(0, 1, 28'h100, 0, q, n); chk(n, "null cycle while powered off");
    pwr = 1; repeat (5) @(negedge clk);
    chk(pe && !act, "powered, not yet active");
    op(0, 0, 28'h100, 0, q, n); chk(n, "null cycle during power-up wait");
    while (!act) @(negedge clk);
    t0 = $time; r0 = mdl.nref;
    for (int i = 0; i < 600; i++) begin
      logic [27:0] x; logic w, l; logic [31:0] d, e;
      x = $urandom; x[25:13] = 13'($urandom % 4); x[10:0] = 11'($urandom % 64);
      w = $urandom; l = $urandom; d = $urandom;
      if (l) x[1:0] = 0;
      op(w, l, x, d, q, n);
      chk(!n, "no null cycle when active");
      if (w) begin
        if (l) for (int b = 0; b < 4; b++) refm[x + 28'(b)] = d[31 - 8 * b -: 8];
        else refm[x] = d[7:0];
      end else begin
        e = l ? {rb(x), rb(x + 1), rb(x + 2), rb(x + 3)} : {24'b0, rb(x)};
        chk(q == e, $sformatf("read %h: %h expected %h", x, q, e));
      end
    end
    begin
      int cyc, nr; cyc = ($time - t0) / 10; nr = mdl.nref - r0;
      chk(nr >= cyc / 130 - 2 && nr <= cyc / 130 + 2, $sformatf("refresh count %0d for %0d cycles", nr, cyc));
    end
    chk(mdl.viol == 0, $sformatf("%0d protocol violations", mdl.viol));
    pwr = 0; repeat (3) @(negedge clk);
    chk(!act && !pe && !cke, "power off");
    op(1, 0, 28'h5, 1, q, n); chk(n, "null cycle after power off");
    tb_done();
  end
endmodule
