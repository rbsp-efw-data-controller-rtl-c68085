// tb_cdi_tx: random 24-bit commands are loaded through 0x28-0x2A and started
// by 0x2B. A behavioural receiver samples cdi_out every two clocks and checks
// start bit, MSB-first command, odd parity and stop bit. Writes while busy
// must set the error flag and must not change the command being sent.
module tb_cdi_tx;
  localparam int WATCHDOG_NS = 20_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic err_clr = 0, cdi_out, busy, err;
  cdi_tx dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .err_clr, .cdi_out, .busy, .err);
  // receiver: wait for a falling edge, sample at bit centres
  logic [23:0] got; logic gpar, gstop; int nframes = 0;
  initial forever begin
    @(negedge cdi_out);
    @(posedge clk); // centre of start bit (2 clocks per bit)
    for (int i = 23; i >= 0; i--) begin repeat (2) @(posedge clk); got[i] = cdi_out; end
    repeat (2) @(posedge clk); gpar = cdi_out;
    repeat (2) @(posedge clk); gstop = cdi_out;
    nframes++;
  end
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    chk(cdi_out == 1 && !busy, "idle");
    for (int i = 0; i < 40; i++) begin
      logic [23:0] c; int n0;
      c = $urandom; n0 = nframes;
      iow(8'h28, c[7:0]); iow(8'h29, c[15:8]); iow(8'h2A, c[23:16]);
      ior(8'h29, r); chk(r == c[15:8], "data readback");
      iow(8'h2B, 8'h01);
      chk(busy, "busy after start");
      if (i % 4 == 3) begin
        iow(8'h28, 8'hFF); chk(err, "write while busy sets error");
        @(negedge clk) err_clr = 1; @(negedge clk) err_clr = 0;
        chk(!err, "error cleared");
      end
      while (busy) @(negedge clk);
      repeat (6) @(negedge clk);
      chk(nframes == n0 + 1, "one frame");
      chk(got == c, $sformatf("command %06x got %06x", c, got));
      chk(gpar == ~^c && gstop == 1, "parity and stop");
    end
    tb_done();
  end
endmodule
