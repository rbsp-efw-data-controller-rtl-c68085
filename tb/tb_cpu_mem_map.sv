// tb_cpu_mem_map: random CPU addresses, page registers and control bits are
// decoded and compared with an independent reference of the memory map:
// ROMON overlay of the low 32K, the two 4K page windows, SRAM/EEPROM/ADC/
// ROM/FLASH/SDRAM regions, null cycles, low-half write protect, EEPROM write
// enable and wait states.
module tb_cpu_mem_map;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [15:0] a; logic mreq, wr, romon, lh_wd, eewe, sda; logic [16:0] pg0, pg1;
  logic [28:0] lin; logic cs_sram, cs_ee, cs_rom, cs_adc, cs_fl, cs_sd, nul, sdn, lhe; logic [1:0] ws;
  cpu_mem_map dut (.cpu_addr(a), .mreq, .wr, .romon, .lh_wd, .eeprom_we(eewe), .pg0, .pg1,
    .sdram_active(sda), .lin_addr(lin), .cs_sram, .cs_eeprom(cs_ee), .cs_rom, .cs_adc,
    .cs_flash(cs_fl), .cs_sdram(cs_sd), .null_cyc(nul), .sdram_null(sdn), .lh_err(lhe), .wait_states(ws));
  int hits[8];
  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [28:0] el; logic [6:0] ecs; // {sdram, flash, adc, rom, ee, sram, null}
      int r;
      a = $urandom; mreq = 1; wr = $urandom; romon = $urandom; lh_wd = $urandom; eewe = $urandom; sda = $urandom;
      pg0 = $urandom; pg1 = $urandom;
      r = $urandom % 8;   // steer pages to interesting regions
      case (r)
        0: pg0 = 17'h10000 | 17'($urandom);
        1: pg0 = 17'h00020 | 17'($urandom % 32);
        2: pg0 = 17'h00040 | 17'($urandom % 64);
        3: pg0 = 17'h00080 | 17'($urandom % 64);
        4: pg0 = 17'h000C0 | 17'($urandom % 64);
        5: pg0 = 17'h00100 | 17'($urandom % 4096);
        6: pg0 = 17'($urandom % 32);
        default: ;
      endcase
      if (a[15:12] == 4'hF) pg1 = pg0;
      if (a[15:13] == 3'b111) el = {(a[12] ? pg1 : pg0), a[11:0]};
      else if (romon && !a[15]) el = 29'h80000 + 29'(a[14:0]);
      else el = 29'(a);
      #1;
      chk(lin == el, $sformatf("linear address %h for %h", lin, a));
      ecs = 0;
      if (el[28]) ecs = sda ? 7'b1000000 : 7'b0000001;
      else if (el >= 29'h100000) ecs = 7'b0000001;
      else if (el < 29'h20000) ecs = (wr && lh_wd && el < 29'h8000) ? 7'b0 : 7'b0000010;
      else if (el < 29'h40000) ecs = (wr && !eewe) ? 7'b0 : 7'b0000100;
      else if (el < 29'h80000) ecs = 7'b0010000;
      else if (el < 29'hC0000) ecs = wr ? 7'b0 : 7'b0001000;
      else ecs = 7'b0100000;
      chk({cs_sd, cs_fl, cs_adc, cs_rom, cs_ee, cs_sram, nul} == ecs,
          $sformatf("selects %b expected %b for linear %h", {cs_sd, cs_fl, cs_adc, cs_rom, cs_ee, cs_sram, nul}, ecs, el));
      chk(lhe == (wr && lh_wd && el < 29'h8000), "low-half error");
      chk(sdn == (el[28] && !sda), "SDRAM null");
      chk(ws == ((!el[28] && el >= 29'h20000 && el < 29'h100000) ? 2'd3 : 2'd0), "wait states");
      for (int k = 0; k < 7; k++) if (ecs[k]) hits[k]++;
    end
    a = 16'h1234; mreq = 0; #1 chk(!(cs_sram | cs_ee | cs_rom | cs_adc | cs_fl | cs_sd | nul), "no select without mreq");
    for (int k = 0; k < 7; k++) chk(hits[k] > 50, $sformatf("region %0d exercised", k));
    tb_done();
  end
endmodule
