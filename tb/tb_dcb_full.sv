// tb_dcb_full: the whole FPGA at its default parameters through a power-on
// sequence lasting a little over four seconds of SCLK time: boot ROM access,
// SDRAM power-up with the full half-second wait, CPU access to SDRAM, the
// ECC scrubber started at its fastest period, FLASH module power-up with
// its full 1 ms ramp, the AC-test outputs started on a 1 Hz tick, and then
// the watchdog left unkicked with its jumper removed: after three 1 Hz
// ticks it must reset the board (ROMON back to 1, SDRAM power kept) and
// leave the watchdog-reset flag set. A bus-functional CPU drives I/O and
// memory cycles; behavioural models stand for the MBUS memories (SRAM,
// EEPROM, boot ROM, ADC), the SDRAM module and the eight FLASH dies; the
// spacecraft command line, the DFB telemetry line and the debug port are
// driven by serial models and the telemetry and debug outputs are decoded.
module tb_dcb_full;
  localparam int WATCHDOG_NS = 1_000_000_000;
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

  logic wd_jumper = 1;
  dcb_top dut (.*,
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

  int n_rst = 0, n_1hz = 0, n_act = 0; logic [1:0] act_q = 0;
  always @(posedge clk) begin
    if (dfb_1hz) n_1hz++;
    act_q <= beb_actest; if (beb_actest != act_q) n_act++;
  end
  initial begin
    for (int i = 0; i < 131072; i++) begin sram[i] = 0; nvram[i] = 0; end
    repeat (5) @(negedge clk); por = 0;
    repeat (3) @(negedge clk);
    mr(16'h0033, r); chk(r == (8'h33 ^ 8'h3C) && n_rom > 0, "boot ROM read");
    iow(8'h10, 8'h02);                                        // ROMON off, SDRAM power on
    ior(8'h1A, r); chk(!r[3], "SDRAM not active during its power-up wait");
    begin int t; t = 0; do begin repeat (10000) @(negedge clk); ior(8'h1A, r); t++; end while (!r[3] && t < 1000); 
      chk(r[3], "SDRAM active");
      chk(t * 10000 >= 8_000_000, $sformatf("SDRAM power-up wait about 0.5 s (%0d cycles)", t * 10000)); end
    page0(17'h1F000);                                         // top of the data area
    for (int i = 0; i < 8; i++) mw(16'hE100 + 16'(i), 8'(i * 29 + 7));
    begin int bad; bad = 0;
      for (int i = 0; i < 8; i++) begin mr(16'hE100 + 16'(i), r); if (r != 8'(i * 29 + 7)) bad++; end
      chk(bad == 0, "CPU SDRAM read-back"); end
    iow(8'h30, 8'h01);                                        // ECC on, 7.63 us scrub period
    iow(8'hA0, 8'hCB);                                        // FLASH module 3
    begin int t; t = 0; do begin repeat (100) @(negedge clk); ior(8'hA0, r); t++; end while (!r[4] && t < 1000);
      chk(r[4] && f_pwr_en == 8'h08, "FLASH module 3 active");
      chk(t * 100 >= 16000, $sformatf("FLASH ramp about 1 ms (%0d cycles)", t * 100)); end
    iow(8'h52, 8'h07); iow(8'h53, 8'hC0);                      // AC test, both outputs
    while (n_1hz < 1) @(negedge clk);
    repeat (5000) @(negedge clk);
    chk(n_act > 10, "AC-test outputs toggling after the 1 Hz tick");
    ior(8'h34, r); ior(8'h35, dummy); chk({dummy, r} != 0, "scrubber advancing");
    iow(8'h1F, 8'h05);                                         // kick, then stop kicking
    @(negedge clk) wd_jumper = 0;
    begin int t; t = 0; while (!sys_rst && t < 4 * 16_777_216) begin @(negedge clk); t++; end
      chk(sys_rst, "watchdog reset"); end
    chk(n_1hz >= 3, "three 1 Hz ticks before the watchdog reset");
    while (sys_rst) @(negedge clk);
    repeat (3) @(negedge clk);
    ior(8'h1B, r); chk(r[7], "watchdog-reset flag survives the reset");
    ior(8'h10, r); chk(r[0] && r[1], "after reset: ROMON set, SDRAM power kept");
    iow(8'h1B, 8'h80); ior(8'h1B, r); chk(!r[7], "watchdog-reset flag cleared");
    chk(sdm.viol == 0, "SDRAM timing rules kept");
    tb_done();
  end
endmodule
