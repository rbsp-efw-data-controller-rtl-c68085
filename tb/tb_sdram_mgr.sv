// tb_sdram_mgr: the SDRAM manager with the SDRAM controller and the
// behavioural SDRAM model (short power-up wait, 64-longword scrub region).
// With ECC on, four clients issue random longword and byte traffic at once;
// all reads must match a reference. Bit errors are then injected straight
// into the model: a single flipped bit must be corrected on read and counted,
// a double flip counted as multi-bit. Client access to the check-byte region
// must fail and set ScrubCSErrDet. The scrubber must go round its region
// and set ECCSTATE (before that every check byte is recomputed), and then
// write a corrected longword back to memory. With the
// power off every access must end in err with an SDRAM null-cycle pulse.
module tb_sdram_mgr;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 400_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic pwr = 0, snull, act;
  mem_req_t creq[4]; mem_rsp_t crsp[4];
  logic oreq, owe, os4, oack, onul; logic [27:0] oad; logic [31:0] owd, ord;
  logic pe, cke, ras, cas, wen, oe; logic [3:0] csn; logic [1:0] ba; logic [12:0] a; logic [7:0] dqo, dqi;
  sdram_mgr #(.SCRUB_LW(64)) dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .pwr_on(pwr),
    .creq, .crsp, .sdram_null(snull), .op_req(oreq), .op_we(owe), .op_size4(os4), .op_addr(oad),
    .op_wdata(owd), .op_ack(oack), .op_null(onul), .op_rdata(ord));
  sdram_ctl #(.PWR_WAIT(50)) ctl (.clk, .rst, .pwr_on(pwr), .active(act), .op_req(oreq), .op_we(owe),
    .op_size4(os4), .op_addr(oad), .op_wdata(owd), .op_ack(oack), .op_null(onul), .op_rdata(ord),
    .sd_pwr_en(pe), .sd_cke(cke), .sd_cs_n(csn), .sd_ras_n(ras), .sd_cas_n(cas), .sd_we_n(wen),
    .sd_ba(ba), .sd_a(a), .sd_dq_out(dqo), .sd_dq_oe(oe), .sd_dq_in(dqi));
  sdram_model mdl (.clk, .cke, .cs_n(rst ? 4'hF : csn), .ras_n(ras), .cas_n(cas), .we_n(wen), .ba, .a, .dq_out(dqo), .dq_oe(oe), .dq_in(dqi));
  int nnull = 0; always @(posedge clk) if (snull && !rst) nnull++;
  logic [7:0] refm [logic [27:0]];
  function automatic logic [7:0] rb(input logic [27:0] x);
    return refm.exists(x) ? refm[x] : (x[7:0] ^ x[15:8] ^ x[23:16] ^ 8'h5A);
  endfunction
  task automatic op(input int c, input logic w, input logic l, input logic [27:0] x, input logic [31:0] d,
                    output logic [31:0] q, output logic e);
    @(negedge clk); creq[c] = '{req: 1, we: w, size4: l, addr: {1'b1, x}, wdata: d};
    @(posedge clk); while (!crsp[c].ack) @(posedge clk);
    q = crsp[c].rdata; e = crsp[c].err; @(negedge clk); creq[c].req = 0;
  endtask
  task automatic client(input int c, input int n);
    for (int i = 0; i < n; i++) begin
      logic [27:0] x; logic w, l, e; logic [31:0] d, q, ex;
      x = 28'h0001000 * 28'(c) + 28'($urandom % 1024); w = $urandom; l = $urandom; d = $urandom;
      if (c == 0) x[27:26] = 2'b10;   // one client on another die
      if (l) x[1:0] = 0;
      op(c, w, l, x, d, q, e);
      chk(!e, "no error");
      if (w) begin
        if (l) for (int b = 0; b < 4; b++) refm[x + 28'(b)] = d[31 - 8 * b -: 8]; else refm[x] = d[7:0];
      end else begin
        ex = l ? {rb(x), rb(x + 1), rb(x + 2), rb(x + 3)} : {24'b0, rb(x)};
        chk(q == ex, $sformatf("client %0d read %h: %h expected %h", c, x, q, ex));
      end
    end
  endtask
  logic [31:0] q; logic e; logic [7:0] r;
  initial begin
    for (int c = 0; c < 4; c++) creq[c] = '0;
    repeat (3) @(negedge clk); rst = 0;
    op(2, 0, 1, 28'h40, 0, q, e); chk(e && nnull == 1, "null cycle while off");
    pwr = 1; while (!act) @(negedge clk);
    iow(8'h30, 8'h0D);       // ECC on, on-demand scrubbing only for now
    fork client(0, 150); client(1, 150); client(2, 150); client(3, 150); join
    // check-byte region is off limits
    op(3, 0, 1, 28'hC000010, 0, q, e); chk(e, "check region access fails");
    ior(8'h30, r); chk(r[6], "ScrubCSErrDet");
    iow(8'h31, 8'h00); ior(8'h30, r); chk(!r[6], "ScrubCSErrDet cleared");
    // scrubber at the fastest period: two passes over the 64-longword region
    iow(8'h30, 8'h01);
    for (int i = 0; i < 64; i++) op(0, 1, 1, 28'(4 * i), 32'h1000 + 32'(i), q, e);
    repeat (64 * 140) @(negedge clk);
    ior(8'h30, r); chk(r[7], "ECCSTATE after one pass");
    iow(8'h30, 8'h0D);       // on demand again: no pass restarts during the counts
    // single and double bit errors on a validated longword
    op(2, 1, 1, 28'h2000, 32'hCAFEF00D, q, e);
    op(2, 0, 1, 28'h2000, 0, q, e); chk(q == 32'hCAFEF00D, "write/read back");
    chk(mdl.mem[28'hC000000 + (28'h2000 >> 2)][7], "check byte validated by the read");
    mdl.mem[28'h2001] ^= 8'h10;
    op(2, 0, 1, 28'h2000, 0, q, e); chk(q == 32'hCAFEF00D && !e, "single-bit error corrected");
    ior(8'h31, r); chk(r == 1, "single-bit count");
    mdl.mem[28'h2001] ^= 8'h10;   // reads correct only the returned data
    mdl.mem[28'h2003] ^= 8'h03;
    op(1, 0, 1, 28'h2000, 0, q, e);
    ior(8'h32, r); chk(r == 1, "multi-bit count");
    mdl.mem[28'h0000010 + 1] ^= 8'h04;
    iow(8'h30, 8'h01);
    repeat (64 * 140) @(negedge clk);
    chk({mdl.mem[28'h10], mdl.mem[28'h11], mdl.mem[28'h12], mdl.mem[28'h13]} == 32'h1004, "scrubber wrote the corrected longword");
    iow(8'h30, 8'h00);
    chk(mdl.viol == 0, "no SDRAM protocol violations");
    pwr = 0; repeat (3) @(negedge clk);
    begin int n0; n0 = nnull; op(1, 0, 1, 28'h0, 0, q, e); chk(e && nnull == n0 + 1, "null cycle after power off"); end
    tb_done();
  end
endmodule
