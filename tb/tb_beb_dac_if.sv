// tb_beb_dac_if: loads random values into the ten DAC data registers and
// starts a transfer. A behavioural model of the five daisy-chained DACs
// (after the BEB's inverting buffers) shifts data on the rising edge of the
// true clock while chip select is low; the last 90 bits seen must be five
// 18-bit words {address, value} for registers 0..4, register 0 first. A load
// command must give one LDAC pulse with no clocks; a write while busy must
// set the error flag.
module tb_beb_dac_if;
  localparam int WATCHDOG_NS = 50_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic clk_n, cmd_n, cs_n, ldac_n, busy;
  beb_dac_if dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .dac_clk_n(clk_n),
    .dac_cmd_n(cmd_n), .dac_cs_n(cs_n), .dac_ldac_n(ldac_n), .busy);
  logic [89:0] chain; int nclk = 0, nld = 0;
  always @(posedge (~clk_n)) if (!cs_n) begin chain = {chain[88:0], ~cmd_n}; nclk++; end
  always @(posedge (~ldac_n)) nld++;
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    chk(clk_n && cmd_n && cs_n && ldac_n, "idle high");
    for (int t = 0; t < 8; t++) begin
      logic [15:0] v[5]; logic [1:0] a; int l0;
      for (int i = 0; i < 5; i++) begin
        v[i] = $urandom; iow(8'h54 + 8'(2 * i), v[i][7:0]); iow(8'h55 + 8'(2 * i), v[i][15:8]);
      end
      ior(8'h57, r); chk(r == v[1][15:8], "data register readback");
      a = $urandom; nclk = 0; l0 = nld;
      iow(8'h50, {2'b01, 4'b0, a});
      if (t == 3) begin iow(8'h54, 8'h00); ior(8'h50, r); chk(r[7] && r[6], "busy and error on busy write"); iow(8'h50, 8'h80); end
      while (busy) @(negedge clk);
      chk(nclk == 90, $sformatf("90 clocks (%0d)", nclk));
      for (int i = 0; i < 5; i++) chk(chain[89 - 18 * i -: 18] == {a, v[i]}, $sformatf("DAC word %0d", i));
      chk(nld == l0, "no LDAC on transfer");
      nclk = 0;
      iow(8'h50, 8'h20 | 8'(a));
      while (busy) @(negedge clk);
      chk(nld == l0 + 1 && nclk == 0, "load gives one LDAC pulse, no clocks");
      ior(8'h50, r); chk(r[7] == 0 && r[1:0] == a, "status after load");
    end
    tb_done();
  end
endmodule
