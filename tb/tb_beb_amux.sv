// tb_beb_amux: every select/address combination is written to 0x51; the
// enables must drop to zero during the guardband, then show the decoded
// one-hot (or none) value, and the address must appear inverted. At most one
// enable may be active at any time.
module tb_beb_amux;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic [2:0] enb, adr_n;
  beb_amux dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .amux_enb(enb), .amux_adr_n(adr_n));
  always @(posedge clk) if (!rst) chk($countones(enb) <= 1, "at most one enable");
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    chk(enb == 0, "reset: none enabled");
    for (int i = 0; i < 64; i++) begin
      logic [1:0] s; logic [2:0] a; logic [2:0] exp;
      s = $urandom; a = $urandom;
      if (i == 40) begin s = 2'b01; end
      exp = (s == 0) ? 3'b000 : (s == 1) ? 3'b001 : (s == 2) ? 3'b010 : 3'b100;
      iow(8'h51, {2'b0, s, 1'b0, a});
      if (enb != 0 || i == 0) ;
      repeat (20) @(negedge clk);
      chk(enb == exp, $sformatf("select %0d enable %b", s, enb));
      chk(adr_n == ~a, "address inverted");
      ior(8'h51, r); chk(r == {2'b0, s, 1'b0, a}, "readback");
    end
    // guardband: change select and look right after the write
    iow(8'h51, 8'h10); repeat (20) @(negedge clk);
    iow(8'h51, 8'h20); chk(enb == 0, "enables off in guardband");
    repeat (20) @(negedge clk); chk(enb == 3'b010, "new enable after guardband");
    tb_done();
  end
endmodule
