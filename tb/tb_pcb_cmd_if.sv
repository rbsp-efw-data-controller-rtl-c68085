// tb_pcb_cmd_if: random bytes are written to 0x2C and started with 0x2D. The
// shifted byte is captured on the falling edges of pcb_clk (data changes on
// the rising edge) and must match, MSB first, with eight clocks at 16 SCLK
// per period followed by one strobe period. Busy writes set the error flag.
module tb_pcb_cmd_if;
  localparam int WATCHDOG_NS = 20_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic pcb_cmd, pcb_clk, pcb_stb, busy;
  pcb_cmd_if dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .pcb_cmd, .pcb_clk, .pcb_stb, .busy);
  logic [7:0] sh; int nbits = 0, nstb = 0; realtime lastrise = 0, per = 0;
  always @(negedge pcb_clk) if (!pcb_stb) begin sh = {sh[6:0], pcb_cmd}; nbits++; end
  always @(posedge pcb_clk) begin if (lastrise > 0) per = $realtime - lastrise; lastrise = $realtime; end
  always @(posedge pcb_stb) nstb++;
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 30; i++) begin
      logic [7:0] b; int s0; b = $urandom; nbits = 0; s0 = nstb; lastrise = 0;
      iow(8'h2C, b); iow(8'h2D, 8'h01);
      ior(8'h2D, r); chk(r[0], "busy flag");
      if (i % 5 == 4) begin iow(8'h2C, 8'h00); ior(8'h2D, r); chk(r[1], "error on busy write"); iow(8'h2D, 8'h02); ior(8'h2D, r); chk(!r[1], "error cleared"); end
      while (busy) @(negedge clk);
      chk(nbits == 8, $sformatf("eight bits (%0d)", nbits));
      chk(sh == b, $sformatf("byte %02x got %02x", b, sh));
      chk(nstb == s0 + 1, "one strobe");
      chk(per == 160.0, "clock period 16 SCLK");
      chk(!pcb_clk && !pcb_stb, "idle low");
    end
    tb_done();
  end
endmodule
