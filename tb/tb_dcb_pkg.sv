// tb_dcb_pkg: checks the shared constants: the baud-rate divisors against
// SCLK / rate (within 1 %), the memory-map bases against each other, and
// the widths and field order of the memory request and response bundles.
module tb_dcb_pkg;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 1_000_000;
  logic clk = 0; always #5 clk = ~clk;
  `include "tb_util.svh"
  mem_req_t q; mem_rsp_t p;
  function automatic bit close(input logic [11:0] div, input int rate);
    real e; e = (real'(SCLK_HZ) / real'(rate)) / real'(div) - 1.0;
    return e < 0.01 && e > -0.01;
  endfunction
  initial begin
    chk(SCLK_HZ == 2 ** 24, "SCLK is 2^24 Hz");
    chk(close(DIV_38400, 38400), "38400 divisor");
    chk(close(DIV_57600, 57600), "57600 divisor");
    chk(close(DIV_115200, 115200), "115200 divisor");
    chk(close(DIV_230400, 230400), "230400 divisor");
    chk(DIV_38400 == 437 && DIV_57600 == 291 && DIV_115200 == 146 && DIV_230400 == 73, "divisors are SCLK / rate rounded");
    chk(BASE_SRAM == 0 && BASE_EEPROM == 29'h20000 && BASE_ADC == 29'h40000, "low bases");
    chk(BASE_ROM == 29'h80000 && BASE_FLASH == 29'hC0000 && BASE_SDRAM == 29'h10000000, "high bases");
    chk($bits(mem_req_t) == 64 && $bits(mem_rsp_t) == 34, "bundle widths");
    q = '0; q.req = 1; chk(q[63] == 1, "req is the top bit");
    q = '0; q.wdata = 32'h80000000; chk(q[31] == 1, "wdata at the bottom");
    p = '0; p.ack = 1; chk(p[33] == 1, "ack is the top bit");
    tb_done();
  end
endmodule
