// tb_hk_adc_ctl: writes mux address and shutdown bit to 0x26 and checks the
// outputs and readback; a write to 0x27 must give one start-of-conversion
// pulse of SOC_CYCLES clocks; buffer enables must follow the byte address of
// an ADC read.
module tb_hk_adc_ctl;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic adc_rd = 0, adc_byte = 0; logic [2:0] adr; logic awake, soc; logic [1:0] oe;
  hk_adc_ctl dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .adc_rd, .adc_byte,
    .amux_adr(adr), .adc_awake(awake), .adc_soc(soc), .adc_oe(oe));
  int socw = 0, socn = 0; logic sq = 0;
  always @(posedge clk) begin if (soc) socw++; if (soc && !sq) socn++; sq <= soc; end
  logic [7:0] r;
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    chk(!awake && !soc && oe == 0, "reset: nap, idle");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v; v = $urandom;
      iow(8'h26, v);
      chk(adr == v[2:0] && awake == v[7], "mux address and shutdown");
      ior(8'h26, r); chk(r == {v[7], 4'b0, v[2:0]}, "readback");
      socw = 0; socn = 0;
      iow(8'h27, 8'h00); repeat (10) @(negedge clk);
      chk(socn == 1 && socw == 4, $sformatf("one SOC pulse of 4 (%0d)", socw));
    end
    adc_rd = 1; adc_byte = 0; #1 chk(oe == 2'b01, "low byte buffer");
    adc_byte = 1; #1 chk(oe == 2'b10, "high byte buffer");
    adc_rd = 0; #1 chk(oe == 2'b00, "buffers off");
    tb_done();
  end
endmodule
