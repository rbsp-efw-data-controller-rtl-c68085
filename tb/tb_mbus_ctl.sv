// tb_mbus_ctl: four DMA clients issue random longword and byte reads and
// writes to a behavioural 128 KB SRAM on the MBUS while a CPU issues byte
// accesses. Every read must return the reference memory contents, every
// write must land exactly once (byte 0 of a longword at the lowest address),
// DMA writes below 0x8000 must be refused with err and dma_lh_err, and DMA
// addresses beyond the SRAM must end with err. The bus must never carry a
// DMA cycle while the CPU is waiting for more than a bounded time.
module tb_mbus_ctl;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 50_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic cpu_req = 0, cpu_we = 0, cpu_ack; logic [16:0] cpu_addr = 0; logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic [3:0] cpu_cs = 0; logic [1:0] cpu_ws = 0;
  mem_req_t dreq[4]; mem_rsp_t drsp[4]; logic lh;
  logic [16:0] mb_addr; logic [7:0] mb_wdata, mb_rdata; logic mb_we, cs_ram, cs_nv, cs_rom, cs_adc; logic [3:0] ct;
  mbus_ctl dut (.clk, .rst, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_cs, .cpu_ws, .cpu_ack, .cpu_rdata,
    .dreq, .drsp, .dma_lh_err(lh), .mb_addr, .mb_wdata, .mb_rdata, .mb_we, .mb_cs_ram(cs_ram),
    .mb_cs_nvram(cs_nv), .mb_cs_rom(cs_rom), .mb_cs_adc(cs_adc), .cyc_type(ct));
  logic [7:0] sram [131072];
  logic [7:0] ref_m [131072];
  assign mb_rdata = (cs_ram | cs_nv | cs_rom | cs_adc) ? sram[mb_addr] : 8'hZZ;
  int nwr = 0, nlh = 0;
  always @(posedge clk) if (cs_ram && mb_we) begin sram[mb_addr] <= mb_wdata; nwr++; end
  always @(posedge clk) if (lh && !rst) nlh++;
  initial for (int i = 0; i < 131072; i++) begin sram[i] = 8'(i * 7 + 3); ref_m[i] = 8'(i * 7 + 3); end
  int ops[4], errs = 0, lh_exp = 0;
  task automatic client(input int c);
    for (int n = 0; n < 150; n++) begin
      logic [28:0] ad; logic we, s4; logic [31:0] wd, exp; int kind;
      kind = $urandom % 20;
      s4 = $urandom; we = $urandom; wd = $urandom;
      ad = 29'(32'h8000 + 4 * c * 4096 + ($urandom % 4096));
      if (s4) ad[1:0] = 0;
      if (kind == 0) begin ad = 29'($urandom % 32768) & ~29'd3; we = 1; end
      if (kind == 1) begin ad = 29'h20000 + 29'($urandom % 1000) * 4; end
      repeat ($urandom % 4) @(negedge clk);
      dreq[c] = '{req: 1, we: we, size4: s4, addr: ad, wdata: wd};
      @(posedge clk); while (!drsp[c].ack) @(posedge clk);
      @(negedge clk); dreq[c].req = 0;
      if (kind == 0 || kind == 1) begin
        chk(drsp[c].err, "protected or out-of-range access ends with err");
        if (kind == 0) lh_exp++;
      end else begin
        chk(!drsp[c].err, "normal access no err");
        if (we) begin
          if (s4) for (int b = 0; b < 4; b++) ref_m[ad + b] = wd[31 - 8 * b -: 8];
          else ref_m[ad] = wd[7:0];
        end else begin
          exp = s4 ? {ref_m[ad], ref_m[ad + 1], ref_m[ad + 2], ref_m[ad + 3]} : {24'b0, ref_m[ad]};
          chk(drsp[c].rdata == exp, $sformatf("client %0d read %h: %h expected %h", c, ad, drsp[c].rdata, exp));
        end
      end
      ops[c]++;
    end
  endtask
  task automatic cpu();
    for (int n = 0; n < 200; n++) begin
      logic [16:0] ad; logic we; logic [7:0] wd; int t;
      ad = 17'h1C000 + 17'($urandom % 4096); we = $urandom; wd = $urandom;
      @(negedge clk); cpu_req = 1; cpu_we = we; cpu_addr = ad; cpu_wdata = wd; cpu_cs = 4'b0001; cpu_ws = 2'($urandom % 4);
      t = 0; @(posedge clk); while (!cpu_ack) begin @(posedge clk); t++; end
      chk(t < 20, "CPU waits a bounded time");
      if (we) ref_m[ad] = wd; else chk(cpu_rdata == ref_m[ad], "CPU read");
      @(negedge clk); cpu_req = 0;
    end
  endtask
  initial begin
    for (int c = 0; c < 4; c++) dreq[c] = '0;
    repeat (3) @(negedge clk); rst = 0;
    fork client(0); client(1); client(2); client(3); cpu(); join
    repeat (10) @(negedge clk);
    for (int i = 0; i < 131072; i++) if (sram[i] != ref_m[i]) begin errs++; end
    chk(errs == 0, $sformatf("memory matches reference (%0d bytes differ)", errs));
    chk(nlh == lh_exp, $sformatf("dma_lh_err pulses %0d expected %0d", nlh, lh_exp));
    tb_done();
  end
endmodule
