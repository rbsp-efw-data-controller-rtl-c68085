// tb_dcb_top: end-to-end test of the whole FPGA at shortened SDRAM power-up,
// scrub-region and FLASH ramp lengths. A bus-functional CPU drives I/O and
// memory cycles; behavioural models stand for the MBUS memories (SRAM,
// EEPROM, boot ROM, ADC), the SDRAM module and the eight FLASH dies; the
// spacecraft command line, the DFB telemetry line and the debug port are
// driven by serial models and the telemetry and debug outputs are decoded.
// Each mechanism is counted; one that never happened counts as a failure:
// boot ROM at reset, SRAM through the CPU, low-half write protect, null
// cycle, SDRAM power-up and CPU access, ECC scrub pass with a single-bit
// error found and repaired, command DMA, telemetry frame with interrupt,
// 1PPS detection, DFB DMA with buffer swap, CDI and PCB serial commands,
// BEB DAC load, BEB multiplexer, housekeeping ADC read, debug UART loopback,
// FLASH power-up, FLASH DMA write and read-back.
module tb_dcb_top;
  localparam int WATCHDOG_NS = 60_000_000;
  logic clk = 0; always #5 clk = ~clk;
  `include "tb_util.svh"
  localparam int D = 146;   // 115200 Bd at SCLK

  logic por = 1, cpu_start = 0, cpu_io = 0, cpu_we = 0, cpu_ack, cpu_int_n, sys_rst;
  logic [15:0] cpu_addr = 0; logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic sc_cmd_rxd = 1, sc_tlm_txd, sc_pps = 0, dfb_clk, dfb_1hz, dfb_cdi; logic [1:0] dfb_tlm = 2'b11;
  logic pcb_cmd, pcb_clk, pcb_stb, conv_clk;
  logic [2:0] beb_amux_enb, beb_amux_adr_n; logic [1:0] beb_actest;
  logic beb_dac_clk_n, beb_dac_cmd_n, beb_dac_cs_n, beb_dac_ldac_n;
  logic [2:0] hk_amux_adr; logic hk_adc_awake, hk_adc_soc; logic [1:0] hk_adc_oe;
  logic [16:0] mb_addr; logic [7:0] mb_wdata, mb_rdata; logic mb_we, mb_cs_ram, mb_cs_nvram, mb_cs_rom;
  logic [3:0] mb_cyc_type;
  logic sd_pwr_en, sd_cke, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe; logic [3:0] sd_cs_n; logic [1:0] sd_ba;
  logic [12:0] sd_a; logic [7:0] sd_dq_out, sd_dq_in;
  logic [7:0] f_pwr_en, f_ce_n, f_io_out, f_io_in; logic f_wp_n, f_cle, f_ale, f_we_n, f_re_n, f_io_oe, f_rb_n;
  logic dbg_txd; logic [7:0] dbg_led;
  logic dbg_nmi_sw_n = 1, dbg_alt_boot_sel_n = 1, cpu_nmi; logic [2:0] dbg_alt_boot, dbg_lastrobe;
  int n_nmi = 0, n_alt = 0, n_strobe = 0;
  always @(posedge clk) if (!por) begin
    if (cpu_nmi) n_nmi++;
    if (dbg_alt_boot == 3'b101) n_alt++;
    if (dbg_lastrobe[0]) n_strobe++;
  end

  dcb_top #(.SDRAM_PWR_WAIT(200), .SCRUB_LW(64), .FLASH_RAMP(40)) dut (.*, .wd_jumper(1'b1),
    .board_id(3'd2), .dbg_rxd(dbg_txd));

  // ---------------- memory models ----------------
  logic [7:0] sram [131072];
  logic [7:0] nvram [131072];
  int n_rom = 0, n_adc = 0;
  always_comb
    if (mb_cs_rom) mb_rdata = mb_addr[7:0] ^ 8'h3C;
    else if (mb_cs_nvram) mb_rdata = nvram[mb_addr];
    else if (mb_cs_ram) mb_rdata = sram[mb_addr];
    else mb_rdata = 8'h00;
  always @(posedge clk) begin
    if (mb_we && mb_cs_ram) sram[mb_addr] <= mb_wdata;
    if (mb_we && mb_cs_nvram) nvram[mb_addr] <= mb_wdata;
    if (mb_cs_rom && !mb_we) n_rom++;
    if (hk_adc_oe != 0) n_adc++;
  end
  sdram_model sdm (.clk, .cke(sd_cke), .cs_n(por ? 4'hF : sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq_out(sd_dq_out), .dq_oe(sd_dq_oe), .dq_in(sd_dq_in));
  nand_model fm (.clk, .ce_n(por ? 8'hFF : f_ce_n), .cle(f_cle), .ale(f_ale), .we_n(f_we_n), .re_n(f_re_n),
    .io_out(f_io_out), .io_in(f_io_in), .rb_n(f_rb_n));

  // ---------------- event counters ----------------
  int n_int = 0, n_pcb_clk = 0, n_pcb_stb = 0, n_cdi_edges = 0, n_ldac = 0, n_soc = 0;
  logic pcb_clk_q = 0, cdi_q = 1, int_q = 1, ldac_q = 1;
  logic [7:0] pcb_sh = 0;
  logic int_q_n; always_comb int_q_n = !cpu_int_n;
  int n_fdone = 0; always @(posedge clk) if (dut.flash_done) n_fdone++;
  always @(posedge clk) begin
    pcb_clk_q <= pcb_clk; cdi_q <= dfb_cdi; int_q <= cpu_int_n; ldac_q <= beb_dac_ldac_n;
    if (pcb_clk && !pcb_clk_q) begin n_pcb_clk++; pcb_sh <= {pcb_sh[6:0], pcb_cmd}; end
    if (pcb_stb) n_pcb_stb++;
    if (dfb_cdi != cdi_q) n_cdi_edges++;
    if (!cpu_int_n && int_q) n_int++;
    if (!beb_dac_ldac_n && ldac_q) n_ldac++;
    if (hk_adc_soc) n_soc++;
  end

  // telemetry receiver (odd parity)
  logic [7:0] rx [$]; int perr = 0;
  initial forever begin
    logic [7:0] b;
    @(negedge sc_tlm_txd); repeat (D / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (D) @(posedge clk); b[i] = sc_tlm_txd; end
    repeat (D) @(posedge clk); if (sc_tlm_txd != ~^b) perr++;
    repeat (D) @(posedge clk);
    rx.push_back(b);
  end

  // ---------------- CPU bus ----------------
  task automatic cyc(input bit io, input bit we, input logic [15:0] a, input logic [7:0] d, output logic [7:0] q);
    int t; t = 0;
    @(negedge clk); cpu_io = io; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_start = 1;
    @(negedge clk); cpu_start = 0;
    while (!cpu_ack && t < 5000) begin @(negedge clk); t++; end
    chk(t < 5000, $sformatf("CPU cycle to %04x acknowledged", a));
    q = cpu_rdata;
  endtask
  logic [7:0] r, dummy;
  task automatic iow(input logic [7:0] a, input logic [7:0] d); cyc(1, 1, {8'h00, a}, d, dummy); endtask
  task automatic ior(input logic [7:0] a, output logic [7:0] d); cyc(1, 0, {8'h00, a}, 8'h00, d); endtask
  task automatic mw(input logic [15:0] a, input logic [7:0] d); cyc(0, 1, a, d, dummy); endtask
  task automatic mr(input logic [15:0] a, output logic [7:0] d); cyc(0, 0, a, 8'h00, d); endtask
  task automatic page0(input logic [16:0] p); iow(8'h11, p[7:0]); iow(8'h12, p[15:8]); iow(8'h13, {7'b0, p[16]}); endtask
  task automatic page1(input logic [16:0] p); iow(8'h14, p[7:0]); iow(8'h15, p[15:8]); iow(8'h16, {7'b0, p[16]}); endtask
  task automatic wait_for(ref logic s, input int n, input string m);
    int t; t = 0; while (!s && t < n) begin @(negedge clk); t++; end
    chk(s, m);
  endtask

  // serial drivers
  task automatic sc_send(input logic [7:0] b);
    sc_cmd_rxd = 0; repeat (D) @(negedge clk);
    for (int i = 0; i < 8; i++) begin sc_cmd_rxd = b[i]; repeat (D) @(negedge clk); end
    sc_cmd_rxd = ~^b; repeat (D) @(negedge clk);
    sc_cmd_rxd = 1; repeat (2 * D) @(negedge clk);
  endtask
  task automatic dfb_send(input logic [23:0] w);
    dfb_tlm[0] = 0; repeat (2) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin dfb_tlm[0] = w[i]; repeat (2) @(negedge clk); end
    dfb_tlm[0] = ~^w; repeat (2) @(negedge clk);
    dfb_tlm[0] = 1; repeat (6) @(negedge clk);
  endtask

  // ---------------- mechanisms ----------------
  typedef enum int {M_ROM, M_SRAM, M_LH, M_NULL, M_SDRAM, M_ECC, M_CMD, M_TLM, M_INT, M_PPS, M_DFB,
                    M_SWAP, M_CDI, M_PCB, M_DAC, M_AMUX, M_ADC, M_DBG, M_FPWR, M_FWR, M_FRD, M_NMI, M_ALTB, M_N} mech_t;
  int seen [M_N];
  string mname [M_N] = '{"boot ROM", "SRAM", "low-half protect", "null cycle", "SDRAM access", "ECC repair",
    "command DMA", "telemetry frame", "interrupt", "1PPS", "DFB DMA", "buffer swap", "CDI", "PCB command",
    "DAC load", "BEB mux", "HK ADC", "debug UART", "FLASH power", "FLASH write", "FLASH read", "NMI button", "alternate boot"};

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 131072; i++) begin sram[i] = 0; nvram[i] = 0; end
    repeat (5) @(negedge clk); por = 0;
    repeat (3) @(negedge clk);
    chk(!sys_rst, "out of reset");

    // boot ROM at CPU 0 while ROMON, then SRAM
    mr(16'h0012, r); chk(r == (8'h12 ^ 8'h3C) && n_rom > 0, "boot ROM read"); if (n_rom > 0) seen[M_ROM]++;
    begin int n0, a0; n0 = n_rom; a0 = n_alt; dbg_alt_boot_sel_n = 0;
      mr(16'h0012, r); chk(n_rom == n0 && n_alt > a0, "alternate boot PROM takes the ROM cycle");
      chk(n_strobe > 0, "analyser read strobe seen");
      if (n_rom == n0 && n_alt > a0) seen[M_ALTB]++; dbg_alt_boot_sel_n = 1; end
    ior(8'h1F, r); chk(r == 8'hC5, "version register");
    ior(8'h1A, r); chk(r[6:4] == 3'd2, "board ID");
    iow(8'h10, 8'h00);                                        // ROMON off
    mw(16'h8123, 8'h5A); mw(16'h0456, 8'hA7);
    chk(sram[17'h08123] == 8'h5A && sram[17'h00456] == 8'hA7, "CPU writes reach SRAM");
    mr(16'h8123, r); chk(r == 8'h5A, "CPU reads SRAM"); if (r == 8'h5A) seen[M_SRAM]++;

    // low-half write protect
    iow(8'h10, 8'h0C); mw(16'h0457, 8'h11);
    chk(sram[17'h00457] == 8'h00, "protected write not performed");
    ior(8'h1B, r); chk(r[5], "CPU low-half error flag"); if (r[5]) seen[M_LH]++;
    iow(8'h10, 8'h00);

    // null cycle: page 1 onto the unused part of the map
    page1(17'h00100); mr(16'hF010, r);
    ior(8'h1B, r); chk(r[4], "null-cycle flag"); if (r[4]) seen[M_NULL]++;
    iow(8'h1B, 8'h10); ior(8'h1B, r); chk(r[6:4] == 0, "flags cleared");

    // SDRAM: power, wait for active, access through page 0
    iow(8'h10, 8'h02);
    begin int t; t = 0; do begin ior(8'h1A, r); t++; end while (!r[3] && t < 200); end
    chk(r[3], "SDRAM active");
    page0(17'h10000);
    for (int i = 0; i < 16; i++) mw(16'hE000 + 16'(i), 8'(i * 13 + 1));
    begin int bad; bad = 0;
      for (int i = 0; i < 16; i++) begin mr(16'hE000 + 16'(i), r); if (r != 8'(i * 13 + 1)) bad++; end
      chk(bad == 0, "CPU SDRAM read-back"); if (bad == 0) seen[M_SDRAM]++;
      chk(sdm.mem[28'h0000005] == 8'(5 * 13 + 1), "byte in the SDRAM model"); end

    // ECC: enable, period 128 cycles; wait for a full pass, flip one bit
    iow(8'h30, 8'h01);
    begin int t; t = 0; do begin repeat (50) @(negedge clk); ior(8'h30, r); t++; end while (!r[7] && t < 1000); end
    chk(r[7], "ECCSTATE after a scrub pass");
    sdm.mem[28'h0000006] = sdm.mem[28'h0000006] ^ 8'h10;
    begin int t; t = 0; do begin repeat (20) @(negedge clk); ior(8'h31, r); t++; end while (r == 0 && t < 2000); end
    chk(r != 0, "single-bit error counted");
    repeat (300) @(negedge clk);
    chk(sdm.mem[28'h0000006] == 8'(6 * 13 + 1), "scrubber wrote the corrected longword back");
    if (r != 0 && sdm.mem[28'h0000006] == 8'(6 * 13 + 1)) seen[M_ECC]++;
    mr(16'hE006, r); chk(r == 8'(6 * 13 + 1), "CPU reads corrected data");

    // command DMA: bytes over the S/C line into SRAM page 0x25
    iow(8'h61, 8'h25); iow(8'h60, 8'h01); iow(8'h60, 8'h11);
    for (int i = 0; i < 4; i++) sc_send(8'hC0 + 8'(i));
    repeat (20) @(negedge clk);
    begin int bad; bad = 0; for (int i = 0; i < 4; i++) if (sram[{7'h25, 10'(i)}] != 8'hC0 + 8'(i)) bad++;
      chk(bad == 0, "command bytes in SRAM"); if (bad == 0) seen[M_CMD]++; end

    // telemetry frame from SRAM 0x16000 (3 longwords), TLM interrupt enabled
    begin logic [7:0] exp [$]; logic [15:0] cs; int ml, n0;
      for (int i = 0; i < 12; i++) sram[17'h16000 + 17'(i)] = 8'(i * 7 + 3);
      iow(8'h10, 8'h20); n0 = n_int; rx.delete(); iow(8'h40, 8'h01);
      iow(8'h41, 8'h16); iow(8'h42, 8'h00); iow(8'h43, 8'd2); iow(8'h44, 8'd0);
      iow(8'h40, 8'h03);
      ml = 16;
      exp = '{8'hFE, 8'hFA, 8'h30, 8'hC8, 8'h00, 8'(ml), 8'h00, 8'h00};
      for (int i = 0; i < 12; i++) exp.push_back(8'(i * 7 + 3));
      cs = 0; for (int i = 4; i < exp.size(); i += 2) cs ^= {exp[i], exp[i + 1]};
      exp.push_back(cs[15:8]); exp.push_back(cs[7:0]);
      wait_for(int_q_n, 30 * 11 * D, "TLM interrupt");
      repeat (12 * D) @(negedge clk);
      begin int bad; bad = 0;
        for (int i = 0; i < exp.size() && i < rx.size(); i++) if (rx[i] != exp[i]) bad++;
        chk(rx.size() == exp.size() && bad == 0 && perr == 0, $sformatf("telemetry frame (%0d bytes, %0d bad)", rx.size(), bad));
        if (rx.size() == exp.size() && bad == 0) seen[M_TLM]++; end
      if (n_int > n0) seen[M_INT]++;
      ior(8'h1C, r); chk(r[1], "TLM interrupt status");
      iow(8'h1C, 8'h02); chk(cpu_int_n, "interrupt cleared"); iow(8'h10, 8'h00);
    end

    // 1PPS: a pulse of ~1300 cycles
    @(negedge clk) sc_pps = 1; repeat (1300) @(negedge clk); sc_pps = 0; repeat (20) @(negedge clk);
    ior(8'h1B, r); chk(r[0] && !r[2], "1PPS detected, no error"); if (r[0]) seen[M_PPS]++;

    // DFB DMA: channel 0 into SRAM page 0x14, next page 0x15, swap on 128 Hz
    iow(8'h66, 8'h00); iow(8'h68, 8'h14); iow(8'h69, 8'h00);
    iow(8'h70, 8'h00); iow(8'h71, 8'h00); iow(8'h72, 8'h01); iow(8'h73, 8'h00); iow(8'h74, 8'h00); iow(8'h75, 8'h00);
    iow(8'h66, 8'h01);
    iow(8'h66, 8'h01); iow(8'h68, 8'h15); iow(8'h69, 8'h00);
    dfb_send({8'h40, 16'h1234}); dfb_send({8'h40, 16'h5678}); dfb_send({8'h47, 16'h9ABC});
    dfb_send({8'h40, 16'hDEF0});
    repeat (40) @(negedge clk);
    chk({sram[17'h14010], sram[17'h14011], sram[17'h14012], sram[17'h14013]} == 32'h12345678, "DFB longword in SRAM");
    if ({sram[17'h14010], sram[17'h14011]} == 16'h1234) seen[M_DFB]++;
    begin int t; t = 0; do begin repeat (1000) @(negedge clk); ior(8'h76, r); t++; end while (!r[0] && t < 300); end
    chk(r[0], "channel 0 swapped");
    chk({sram[17'h14014], sram[17'h14015], sram[17'h14016], sram[17'h14017]} == 32'hDEF00000, "odd word padded");
    if (r[0]) seen[M_SWAP]++;

    // CDI word and PCB byte
    iow(8'h28, 8'h34); iow(8'h29, 8'h12); iow(8'h2A, 8'hA5); iow(8'h2B, 8'h01);
    repeat (200) @(negedge clk);
    chk(n_cdi_edges > 4, "CDI word shifted out"); if (n_cdi_edges > 4) seen[M_CDI]++;
    ior(8'h1A, r); chk(!r[1] && !r[0], "CDI idle, no error");
    iow(8'h2C, 8'h96); iow(8'h2D, 8'h01); repeat (400) @(negedge clk);
    chk(n_pcb_clk >= 8 && n_pcb_stb > 0, $sformatf("PCB: %0d clocks and a strobe", n_pcb_clk));
    if (n_pcb_clk >= 8 && n_pcb_stb > 0) seen[M_PCB]++;

    // BEB DAC transfer with load, BEB multiplexer, housekeeping ADC
    iow(8'h54, 8'h00); iow(8'h55, 8'h80); iow(8'h50, 8'h40); repeat (3000) @(negedge clk);
    iow(8'h50, 8'h20); repeat (200) @(negedge clk);
    chk(n_ldac > 0, "DAC load pulse"); if (n_ldac > 0) seen[M_DAC]++;
    iow(8'h51, 8'h13); repeat (300) @(negedge clk);
    chk(beb_amux_enb != 0, "BEB mux enabled"); if (beb_amux_enb != 0) seen[M_AMUX]++;
    iow(8'h26, 8'h05); iow(8'h27, 8'h00); page1(17'h00040); mr(16'hF001, r);
    chk(hk_amux_adr == 3'd5 && n_soc > 0 && n_adc > 0, "HK ADC conversion and read");
    if (n_soc > 0 && n_adc > 0) seen[M_ADC]++;

    // debug UART loopback
    iow(8'h90, 8'h09); iow(8'h95, 8'h6B); iow(8'h95, 8'h2E);
    repeat (26 * D) @(negedge clk);
    ior(8'h93, r); chk(r == 2, "debug UART: two bytes back");
    ior(8'h92, r); chk(r == 8'h6B, "debug byte 0"); ior(8'h92, dummy); chk(dummy == 8'h2E, "debug byte 1");
    if (r == 8'h6B && dummy == 8'h2E) seen[M_DBG]++;

    // FLASH: power module 1 with write enable, DMA a page out of SRAM and back
    iow(8'hA0, 8'hC9);
    begin int t; t = 0; do begin ior(8'hA0, r); t++; end while (!r[4] && t < 500); end
    chk(r[4] && f_pwr_en == 8'h02, "FLASH module 1 active"); if (r[4]) seen[M_FPWR]++;
    for (int i = 0; i < 2048; i++) sram[17'h10000 + 17'(i)] = 8'($urandom);
    iow(8'hA2, 8'h09); iow(8'hA3, 8'd3); iow(8'hA4, 8'd3); iow(8'hA5, 8'h21); iow(8'hA6, 8'h10);
    iow(8'hA8, 8'h10); iow(8'hA9, 8'h00); iow(8'hA7, 8'h01);
    begin int t, n0; n0 = n_fdone; t = 0; while (n_fdone == n0 && t < 400000) begin @(negedge clk); t++; end chk(n_fdone > n0, "FLASH done"); end
    ior(8'hA7, r); chk(r[3:0] == 0, "FLASH write: no errors");
    begin int bad; bad = 0;
      for (int i = 0; i < 2048; i++) if (fm.mem[{3'd1, 12'h021, 6'd3, 12'(i)}] != sram[17'h10000 + 17'(i)]) bad++;
      chk(bad == 0 && fm.nprog == 1, $sformatf("FLASH page programmed (%0d bad)", bad));
      if (bad == 0) seen[M_FWR]++; end
    iow(8'hA2, 8'h01); iow(8'hA8, 8'h18); iow(8'hA7, 8'h01);
    begin int t, n0; n0 = n_fdone; t = 0; while (n_fdone == n0 && t < 400000) begin @(negedge clk); t++; end chk(n_fdone > n0, "FLASH done"); end
    begin int bad; bad = 0;
      for (int i = 0; i < 2048; i++) if (sram[17'h18000 + 17'(i)] != sram[17'h10000 + 17'(i)]) bad++;
      chk(bad == 0, $sformatf("FLASH page read back with ECC (%0d bad)", bad));
      if (bad == 0) seen[M_FRD]++; end
    ior(8'hC0, r); chk(r == 0, "no ECC corrections on a clean page");

    // NMI button: a press held past the debounce time gives one NMI
    begin int n0; n0 = n_nmi; dbg_nmi_sw_n = 0; repeat (100) @(negedge clk); dbg_nmi_sw_n = 1;
      repeat (270000) @(negedge clk); chk(n_nmi == n0, "short press ignored");
      dbg_nmi_sw_n = 0; repeat (270000) @(negedge clk); chk(n_nmi == n0 + 1, "held press gives one NMI");
      dbg_nmi_sw_n = 1; repeat (270000) @(negedge clk); chk(n_nmi == n0 + 1, "release gives no NMI");
      if (n_nmi == n0 + 1) seen[M_NMI]++; end

    chk(sdm.viol == 0, "SDRAM timing rules kept");
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-18s %0d", mname[m], seen[m]);
      chk(seen[m] > 0, {"mechanism happened: ", mname[m]});
    end
    tb_done();
  end
endmodule
