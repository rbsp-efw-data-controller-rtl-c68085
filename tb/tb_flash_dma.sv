// tb_flash_dma: the FLASH DMA against the NAND model and a behavioural
// memory with random latency. Three pages are written from SRAM with ECC on;
// the NAND model must hold the data, the ECC tag 0x42, the twelve check
// bytes (compared with a reference code) and their XOR parity. The pages are
// read back into another SRAM area and into SDRAM (address bit 28) with
// throttling on and must match. A flipped data bit in the FLASH must be
// corrected in memory and counted; two flipped bits counted as
// uncorrectable. A program failure must set its flag and halt the transfer,
// a stuck busy line must time out, a register write during a transfer must
// set the interface error, and a diagnostic CPU cycle must reach the bus.
module tb_flash_dma;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 500_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic mode = 1, cpu_req = 0, cpu_we = 0, cpu_ack, busy, done; logic [5:0] cpu_addr = 0; logic [7:0] cpu_wdata = 0, cpu_rdata;
  mem_req_t mreq; mem_rsp_t mrsp;
  logic [7:0] ce_n, io_o, io_i; logic cle, ale, we_n, re_n, oe, rb_n;
  flash_dma #(.TIMEOUT(500)) dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .mode_dma(mode), .active(1'b1),
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ack, .cpu_rdata, .mreq, .mrsp,
    .f_ce_n(ce_n), .f_cle(cle), .f_ale(ale), .f_we_n(we_n), .f_re_n(re_n), .f_io_out(io_o), .f_io_oe(oe),
    .f_io_in(io_i), .f_rb_n(rb_n), .busy, .done);
  nand_model fm (.clk, .ce_n(rst ? 8'hFF : ce_n), .cle, .ale, .we_n, .re_n, .io_out(io_o), .io_in(io_i), .rb_n);
  logic [7:0] mem [logic [28:0]];
  int lat = 0, nsd = 0;
  always @(posedge clk) begin
    mrsp.ack <= 0;
    if (mreq.req && !mrsp.ack && !rst) begin
      if (lat <= 0) begin
        chk(mreq.size4 && mreq.addr[1:0] == 0, "aligned longword access");
        if (mreq.addr[28]) nsd++;
        if (mreq.we) for (int b = 0; b < 4; b++) mem[mreq.addr + 29'(b)] = mreq.wdata[31 - 8 * b -: 8];
        else for (int b = 0; b < 4; b++) mrsp.rdata[31 - 8 * b -: 8] <= mem.exists(mreq.addr + 29'(b)) ? mem[mreq.addr + 29'(b)] : 8'h00;
        mrsp.ack <= 1; lat = $urandom % 4;
      end else lat--;
    end
  end
  function automatic logic [23:0] ref_ecc(input logic [32:0] base);
    logic [8:0] l1, l0; logic [2:0] c1, c0; logic [7:0] v;
    l1 = 0; l0 = 0; c1 = 0; c0 = 0;
    for (int a = 0; a < 512; a++) begin
      v = fm.mem.exists(base + 33'(a)) ? fm.mem[base + 33'(a)] : 8'hFF;
      for (int b = 0; b < 8; b++) if (v[b]) begin
        for (int k = 0; k < 9; k++) if (a[k]) l1[k] ^= 1; else l0[k] ^= 1;
        for (int k = 0; k < 3; k++) if (b[k]) c1[k] ^= 1; else c0[k] ^= 1;
      end
    end
    return {l1, l0, c1, c0};
  endfunction
  logic [7:0] r;
  task automatic setup(input logic [7:0] ctl, input int sp, input int ep, input logic [11:0] ba, input int cs, input logic [15:0] mpg);
    iow(8'hA2, ctl); iow(8'hA3, 8'(sp)); iow(8'hA4, 8'(ep)); iow(8'hA5, ba[7:0]);
    iow(8'hA6, {1'b0, 3'(cs), ba[11:8]}); iow(8'hA8, mpg[7:0]); iow(8'hA9, mpg[15:8]);
  endtask
  task automatic run();
    iow(8'hA7, 8'h01);
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask
  function automatic logic [32:0] fa(input int cs, input logic [11:0] ba, input int pa, input int col);
    return {3'(cs), ba, 6'(pa), 12'(col)};
  endfunction
  initial begin
    mrsp = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3 * 2048; i++) mem[29'h10000 + 29'(i)] = $urandom;
    // write pages 2..4 of block 0x123, die 3
    setup(8'h09, 2, 4, 12'h123, 3, 16'h0010); run();
    ior(8'hA7, r); chk(r[3:0] == 0, "write: no errors");
    chk(fm.nprog == 3, "three programs");
    for (int p = 0; p < 3; p++) begin
      logic [7:0] par; int bad; bad = 0; par = 0;
      for (int i = 0; i < 2048; i++) if (fm.mem[fa(3, 12'h123, 2 + p, i)] != mem[29'h10000 + 29'(2048 * p + i)]) bad++;
      chk(bad == 0, $sformatf("page %0d data in FLASH (%0d bad)", p, bad));
      chk(fm.mem[fa(3, 12'h123, 2 + p, 12'h830)] == 8'h42, "ECC tag");
      for (int g = 0; g < 4; g++) begin
        logic [23:0] e; e = ref_ecc(fa(3, 12'h123, 2 + p, 512 * g));
        chk({fm.mem[fa(3, 12'h123, 2 + p, 12'h831 + 3 * g)], fm.mem[fa(3, 12'h123, 2 + p, 12'h832 + 3 * g)],
             fm.mem[fa(3, 12'h123, 2 + p, 12'h833 + 3 * g)]} == e, $sformatf("page %0d segment %0d check bytes", p, g));
        par ^= e[23:16] ^ e[15:8] ^ e[7:0];
      end
      chk(fm.mem[fa(3, 12'h123, 2 + p, 12'h83D)] == par, "check-byte parity");
    end
    // read back into SRAM 0x18000 and SDRAM (throttled)
    setup(8'h01, 2, 4, 12'h123, 3, 16'h0018); run();
    begin int bad; bad = 0; for (int i = 0; i < 3 * 2048; i++) if (mem[29'h18000 + 29'(i)] != mem[29'h10000 + 29'(i)]) bad++;
      chk(bad == 0, $sformatf("read back to SRAM (%0d bad)", bad)); end
    setup(8'h25, 2, 4, 12'h123, 3, 16'h0345); run();
    begin int bad; bad = 0; for (int i = 0; i < 3 * 2048; i++) if (mem[29'h10345000 + 29'(i)] != mem[29'h10000 + 29'(i)]) bad++;
      chk(bad == 0 && nsd > 0, $sformatf("read back to SDRAM (%0d bad)", bad)); end
    // single-bit error in the FLASH, corrected in memory
    iow(8'hC0, 8'h00);
    fm.mem[fa(3, 12'h123, 3, 700)] ^= 8'h20;
    setup(8'h01, 3, 3, 12'h123, 3, 16'h0018); run();
    chk(mem[29'h18000 + 29'(700)] == mem[29'h10000 + 29'(2048 + 700)], "single-bit error corrected in memory");
    ior(8'hC0, r); chk(r == 1, "correctable count");
    fm.mem[fa(3, 12'h123, 3, 700)] ^= 8'h20;
    fm.mem[fa(3, 12'h123, 3, 1500)] ^= 8'h11;
    setup(8'h01, 3, 3, 12'h123, 3, 16'h0018); run();
    ior(8'hC1, r); chk(r == 1, "uncorrectable count");
    // program failure halts
    fm.fail_next = 1; begin int n0; n0 = fm.nprog;
      setup(8'h09, 10, 12, 12'h040, 1, 16'h0010); run();
      ior(8'hA7, r); chk(r[3], "programming failure flag");
      chk(fm.nprog == n0 + 1, "transfer halted after the failing page"); end
    iow(8'hA7, 8'h08);
    // timeout
    fm.stuck_busy = 1; setup(8'h01, 0, 0, 12'h001, 0, 16'h0018); run(); fm.stuck_busy = 0;
    ior(8'hA7, r); chk(r[2], "timeout flag");
    iow(8'hA7, 8'h04);
    // interface error: register write while busy
    setup(8'h00, 0, 1, 12'h001, 0, 16'h0018);
    iow(8'hA7, 8'h01); repeat (5) @(negedge clk); iow(8'hA3, 8'h05);
    while (!done) @(negedge clk);
    ior(8'hA7, r); chk(r[1], "interface error"); ior(8'hA3, r); chk(r == 0, "write while busy ignored");
    // diagnostic cycle: CLE write of FFh to die 5
    mode = 0; begin int n0; n0 = fm.nreset;
      @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = 6'b010101; cpu_wdata = 8'hFF;
      @(posedge clk); while (!cpu_ack) @(posedge clk); @(negedge clk); cpu_req = 0;
      chk(fm.nreset == n0 + 1, "diagnostic command cycle"); end
    tb_done();
  end
endmodule
