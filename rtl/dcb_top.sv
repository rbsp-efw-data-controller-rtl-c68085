// dcb_top: the Data Controller Board FPGA of the RBSP EFW instrument.
// It joins the CPU (a Z80 core outside this RTL, reached through a simple
// request/acknowledge bus) to its memories and to the instrument and
// spacecraft interfaces:
//   - CPU memory space: cpu_mem_map pages the 64 KB Z80 space onto the 29-bit
//     linear map; SRAM/EEPROM/ROM/ADC cycles go to mbus_ctl, SDRAM cycles to
//     sdram_mgr, FLASH cycles to flash_dma's diagnostic port.
//   - CPU I/O space: every register block decodes the 8-bit I/O address;
//     their read data are ORed.
//   - DMA: DFB, S/C command, S/C telemetry and FLASH engines; a request with
//     address bit 28 set goes to the SDRAM manager, otherwise to the MBUS.
//   - Timekeeping, watchdog reset, interrupts, S/C 1PPS/spin pulse sorting,
//     DFB command and telemetry links, PCB and BEB controls, housekeeping ADC,
//     and the debug-connector hooks (NMI button, alternate boot PROM).
// CPU bus: cpu_start is a one-cycle strobe with cpu_io/cpu_we/cpu_addr/
// cpu_wdata held until cpu_ack (one cycle); cpu_rdata is valid with cpu_ack.
// I/O cycles take two cycles; memory cycles take what their target needs.
// This bus shape stands in for the Z80 core's bus and is this design's.
// All logic runs on clk (SCLK, 16.78 MHz); por is the power-on reset.
module dcb_top #(
  parameter int unsigned SDRAM_PWR_WAIT = 8388608,
  parameter int unsigned SCRUB_LW       = 50331648,
  parameter int unsigned FLASH_RAMP     = 16777
) (
  input  logic        clk,
  input  logic        por,
  input  logic        wd_jumper,        // installed: watchdog disabled
  input  logic [2:0]  board_id,
  // CPU bus
  input  logic        cpu_start,
  input  logic        cpu_io,
  input  logic        cpu_we,
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic        cpu_ack,
  output logic [7:0]  cpu_rdata,
  output logic        cpu_int_n,
  output logic        sys_rst,
  // spacecraft
  input  logic        sc_cmd_rxd,
  output logic        sc_tlm_txd,
  input  logic        sc_pps,           // 1PPS / spin pulse, high while active
  // DFB
  output logic        dfb_clk,
  output logic        dfb_1hz,
  output logic        dfb_cdi,
  input  logic [1:0]  dfb_tlm,
  // PCB
  output logic        pcb_cmd,
  output logic        pcb_clk,
  output logic        pcb_stb,
  output logic        conv_clk,
  // BEB
  output logic [2:0]  beb_amux_enb,
  output logic [2:0]  beb_amux_adr_n,
  output logic [1:0]  beb_actest,
  output logic        beb_dac_clk_n,
  output logic        beb_dac_cmd_n,
  output logic        beb_dac_cs_n,
  output logic        beb_dac_ldac_n,
  // housekeeping ADC
  output logic [2:0]  hk_amux_adr,
  output logic        hk_adc_awake,
  output logic        hk_adc_soc,
  output logic [1:0]  hk_adc_oe,
  // MBUS
  output logic [16:0] mb_addr,
  output logic [7:0]  mb_wdata,
  input  logic [7:0]  mb_rdata,
  output logic        mb_we,
  output logic        mb_cs_ram,
  output logic        mb_cs_nvram,
  output logic        mb_cs_rom,
  output logic [3:0]  mb_cyc_type,
  // SDRAM
  output logic        sd_pwr_en,
  output logic        sd_cke,
  output logic [3:0]  sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_a,
  output logic [7:0]  sd_dq_out,
  output logic        sd_dq_oe,
  input  logic [7:0]  sd_dq_in,
  // FLASH
  output logic [7:0]  f_pwr_en,
  output logic        f_wp_n,
  output logic [7:0]  f_ce_n,
  output logic        f_cle,
  output logic        f_ale,
  output logic        f_we_n,
  output logic        f_re_n,
  output logic [7:0]  f_io_out,
  output logic        f_io_oe,
  input  logic [7:0]  f_io_in,
  input  logic        f_rb_n,
  // debug
  input  logic        dbg_rxd,
  output logic        dbg_txd,
  output logic [7:0]  dbg_led,
  input  logic        dbg_nmi_sw_n,     // debug-board NMI push-button
  output logic        cpu_nmi,          // one-cycle NMI request to the CPU
  input  logic        dbg_alt_boot_sel_n, // jumper on the debug board, pulled up
  output logic [2:0]  dbg_alt_boot,     // {ALTBOOTCS, ALTBOOTWRITE, ALTBOOTREAD}
  output logic [2:0]  dbg_lastrobe      // logic-analyser strobes
);
  import dcb_pkg::*;

  // ---------------- clocks, reset ----------------
  logic [23:0] sample_time;
  logic sec_lsb, tick_1hz, tick_256hz, tick_128hz, tick_64hz, shift_en, clk8m;
  logic wd_rst, wd_det, wd_kick, wd_det_clr;

  timebase u_tb (.clk, .rst(por), .sample_time, .sec_lsb, .tick_1hz, .tick_256hz,
    .tick_128hz, .tick_64hz, .shift_en, .clk8m, .conv_clk);
  watchdog u_wd (.clk, .por, .tick_1hz, .kick(wd_kick), .wd_disable(wd_jumper),
    .wd_det_clr, .wd_rst, .wd_det, .sys_rst);

  logic rst;
  assign rst     = sys_rst;
  assign dfb_clk = clk8m;
  assign dfb_1hz = tick_1hz;

  // ---------------- CPU bus ----------------
  typedef enum logic [1:0] {C_IDLE, C_IO, C_MEM} cstate_t;
  cstate_t    cst;
  logic [7:0] io_addr, io_wdata, io_rdata;
  logic       io_wr;
  logic [7:0] rd_regs, rd_dbg, rd_cdi, rd_pcb, rd_dac, rd_amux, rd_act, rd_adc,
              rd_cmd, rd_tlm, rd_dfb, rd_ecc, rd_fpwr, rd_fdma;

  assign io_addr  = cpu_addr[7:0];
  assign io_wdata = cpu_wdata;
  assign io_wr    = (cst == C_IO) && cpu_we;
  assign io_rdata = rd_regs | rd_dbg | rd_cdi | rd_pcb | rd_dac | rd_amux | rd_act | rd_adc |
                    rd_cmd | rd_tlm | rd_dfb | rd_ecc | rd_fpwr | rd_fdma;

  // memory decode
  logic romon, sdram_pwr, eeprom_we, lh_wd;
  logic [16:0] pg0, pg1;
  logic [28:0] lin;
  logic cs_sram, cs_eeprom, cs_rom, cs_adc, cs_flash, cs_sdram, null_cyc, sd_null_cpu, lh_err;
  logic [1:0] ws;
  logic sdram_active;
  logic mem_act;

  assign mem_act = (cst == C_MEM);
  cpu_mem_map u_map (.cpu_addr, .mreq(mem_act), .wr(cpu_we), .romon, .lh_wd, .eeprom_we,
    .pg0, .pg1, .sdram_active, .lin_addr(lin), .cs_sram, .cs_eeprom, .cs_rom, .cs_adc,
    .cs_flash, .cs_sdram, .null_cyc, .sdram_null(sd_null_cpu), .lh_err, .wait_states(ws));

  logic mb_cpu_ack, fl_cpu_ack;
  logic [7:0] mb_cpu_rdata, fl_cpu_rdata;
  mem_req_t mreq_dfb, mreq_cmd, mreq_tlm, mreq_fsh, mreq_cpu_sd;
  mem_rsp_t mrsp_dfb, mrsp_cmd, mrsp_tlm, mrsp_fsh;
  mem_req_t mb_req [4];
  mem_rsp_t mb_rsp [4];
  mem_req_t sd_req [4];
  mem_rsp_t sd_rsp [4];
  logic cpu_mem_done, cpu_null_p, cpu_lh_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      cst <= C_IDLE; cpu_ack <= 1'b0; cpu_rdata <= '0; cpu_null_p <= 1'b0; cpu_lh_p <= 1'b0;
    end else begin
      cpu_ack <= 1'b0; cpu_null_p <= 1'b0; cpu_lh_p <= 1'b0;
      case (cst)
        C_IDLE: if (cpu_start) cst <= cpu_io ? C_IO : C_MEM;
        C_IO: begin cpu_ack <= 1'b1; cpu_rdata <= io_rdata; cst <= C_IDLE; end
        C_MEM: if (cpu_mem_done) begin
          cpu_ack    <= 1'b1;
          cpu_rdata  <= cs_flash ? fl_cpu_rdata : cs_sdram ? sd_rsp[2].rdata[7:0] : mb_cpu_rdata;
          cpu_null_p <= null_cyc;
          cpu_lh_p   <= lh_err;
          cst <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end
  assign cpu_mem_done = cs_flash ? fl_cpu_ack : cs_sdram ? sd_rsp[2].ack : mb_cpu_ack;
  assign mreq_cpu_sd  = '{req: mem_act && cs_sdram && !sd_rsp[2].ack, we: cpu_we, size4: 1'b0,
                          addr: lin, wdata: {24'b0, cpu_wdata}};

  // ---------------- DMA routing ----------------
  function automatic mem_req_t gate(input mem_req_t q, input logic en);
    mem_req_t o;
    o = q; o.req = q.req && en;
    return o;
  endfunction
  assign mb_req[0] = gate(mreq_dfb, !mreq_dfb.addr[28]);
  assign mb_req[1] = mreq_cmd;
  assign mb_req[2] = gate(mreq_tlm, !mreq_tlm.addr[28]);
  assign mb_req[3] = gate(mreq_fsh, !mreq_fsh.addr[28]);
  assign sd_req[0] = gate(mreq_dfb, mreq_dfb.addr[28]);
  assign sd_req[1] = gate(mreq_tlm, mreq_tlm.addr[28]);
  assign sd_req[2] = mreq_cpu_sd;
  assign sd_req[3] = gate(mreq_fsh, mreq_fsh.addr[28]);
  assign mrsp_dfb = mb_rsp[0] | sd_rsp[0];
  assign mrsp_cmd = mb_rsp[1];
  assign mrsp_tlm = mb_rsp[2] | sd_rsp[1];
  assign mrsp_fsh = mb_rsp[3] | sd_rsp[3];

  logic dma_lh_err;
  logic mb_cs_adc;
  // debug connector: NMI button, alternate boot PROM, analyser strobes
  logic rom_cs;
  dbg_aux u_dbgx (.clk, .rst, .nmi_sw_n(dbg_nmi_sw_n), .nmi(cpu_nmi),
    .alt_boot_sel_n(dbg_alt_boot_sel_n), .rom_cs,
    .mb_rd((mb_cs_ram || mb_cs_nvram || rom_cs) && !mb_we),
    .mb_wr((mb_cs_ram || mb_cs_nvram || rom_cs) && mb_we),
    .rom_cs_onboard(mb_cs_rom), .alt_boot(dbg_alt_boot), .lastrobe(dbg_lastrobe));

  mbus_ctl u_mbus (.clk, .rst,
    .cpu_req(mem_act && !cs_sdram && !cs_flash && !mb_cpu_ack), .cpu_we, .cpu_addr(lin[16:0]),
    .cpu_wdata, .cpu_cs({cs_adc, cs_rom, cs_eeprom, cs_sram}), .cpu_ws(ws),
    .cpu_ack(mb_cpu_ack), .cpu_rdata(mb_cpu_rdata),
    .dreq(mb_req), .drsp(mb_rsp), .dma_lh_err,
    .mb_addr, .mb_wdata, .mb_rdata, .mb_we, .mb_cs_ram, .mb_cs_nvram, .mb_cs_rom(rom_cs), .mb_cs_adc,
    .cyc_type(mb_cyc_type));

  // ---------------- SDRAM ----------------
  logic op_req, op_we, op_size4, op_ack, op_null;
  logic [27:0] op_addr;
  logic [31:0] op_wdata, op_rdata;
  logic sdram_null;
  sdram_mgr #(.SCRUB_LW(SCRUB_LW)) u_sdm (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_ecc),
    .pwr_on(sdram_pwr), .creq(sd_req), .crsp(sd_rsp), .sdram_null,
    .op_req, .op_we, .op_size4, .op_addr, .op_wdata, .op_ack, .op_null, .op_rdata);
  sdram_ctl #(.PWR_WAIT(SDRAM_PWR_WAIT)) u_sdc (.clk, .rst, .pwr_on(sdram_pwr), .active(sdram_active),
    .op_req, .op_we, .op_size4, .op_addr, .op_wdata, .op_ack, .op_null, .op_rdata,
    .sd_pwr_en, .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in);

  // ---------------- registers, interrupts ----------------
  logic cdi_busy, cdi_err, cdi_err_clr;
  logic [2:0] sc_clr;
  logic pps_det, spin_det, err_det, pps_evt;
  logic [15:0] dmet, sptm;
  logic tlm_done, flash_done;

  dcb_regs u_regs (.clk, .rst, .por, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_regs),
    .romon, .sdram_pwr, .eeprom_we, .lh_wd, .pg0, .pg1, .led(dbg_led), .wd_kick, .wd_det_clr,
    .cdi_err_clr, .sc_clr, .int_n(cpu_int_n), .board_id, .sdram_active,
    .sdram_null(sdram_null | (cpu_null_p && sd_null_cpu)), .cdi_busy, .cdi_err, .wd_det,
    .dma_lh_err, .cpu_lh_err(cpu_lh_p), .cpu_null(cpu_null_p), .tick_1hz, .tick_256hz,
    .pps_det, .spin_det, .err_det, .tlm_done, .flash_done, .sample_time, .sec_lsb, .dmet, .sptm);

  // ---------------- spacecraft interface ----------------
  logic pps_f, cmd_f;
  glitch_filter #(.MIN_CYCLES(4), .RST_VAL(1'b0)) u_gf_pps (.clk, .rst, .din(sc_pps), .dout(pps_f));
  glitch_filter #(.MIN_CYCLES(4), .RST_VAL(1'b1)) u_gf_cmd (.clk, .rst, .din(sc_cmd_rxd), .dout(cmd_f));
  sc_pulse_sorter u_sps (.clk, .rst, .pulse_in(pps_f), .sample_time, .sec_lsb, .clr(sc_clr),
    .pps_det, .spin_det, .err_det, .pps_evt, .dmet, .sptm);
  cmd_dma u_cmd (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_cmd), .rxd(cmd_f),
    .mreq(mreq_cmd), .mrsp(mrsp_cmd));
  tlm_dma u_tlm (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_tlm), .pps_evt,
    .txd(sc_tlm_txd), .done(tlm_done), .mreq(mreq_tlm), .mrsp(mrsp_tlm));

  // ---------------- DFB ----------------
  logic [7:0] w_id; logic [15:0] w_data; logic w_valid; logic [3:0] dfb_err; logic dfb_err_clr;
  cdi_tx u_cdi (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_cdi), .err_clr(cdi_err_clr),
    .cdi_out(dfb_cdi), .busy(cdi_busy), .err(cdi_err));
  dfb_rx_merge u_dfbrx (.clk, .rst, .rxd(dfb_tlm), .clr(dfb_err_clr), .id(w_id), .data(w_data),
    .valid(w_valid), .err(dfb_err));
  dfb_dma u_dfb (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_dfb), .w_id, .w_data,
    .w_valid, .if_err(dfb_err), .if_err_clr(dfb_err_clr), .tick_128hz, .tick_1hz,
    .mreq(mreq_dfb), .mrsp(mrsp_dfb));

  // ---------------- PCB, BEB, housekeeping ----------------
  logic pcb_busy, dac_busy;
  pcb_cmd_if u_pcb (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_pcb),
    .pcb_cmd, .pcb_clk, .pcb_stb, .busy(pcb_busy));
  beb_dac_if u_dac (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_dac),
    .dac_clk_n(beb_dac_clk_n), .dac_cmd_n(beb_dac_cmd_n), .dac_cs_n(beb_dac_cs_n),
    .dac_ldac_n(beb_dac_ldac_n), .busy(dac_busy));
  beb_amux u_amux (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_amux),
    .amux_enb(beb_amux_enb), .amux_adr_n(beb_amux_adr_n));
  beb_actest u_act (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_act), .tick_1hz,
    .actest(beb_actest));
  hk_adc_ctl u_adc (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_adc),
    .adc_rd(mb_cs_adc && !mb_we), .adc_byte(mb_addr[0]), .amux_adr(hk_amux_adr),
    .adc_awake(hk_adc_awake), .adc_soc(hk_adc_soc), .adc_oe(hk_adc_oe));

  // ---------------- FLASH ----------------
  logic f_active, f_mode_dma, f_busy, p_own, p_cle, p_we_n;
  logic [7:0] p_ce_n, p_io, d_ce_n, d_io;
  logic d_cle, d_ale, d_we_n, d_re_n, d_oe;
  flash_pwr #(.RAMP_CYCLES(FLASH_RAMP)) u_fpwr (.clk, .rst, .io_addr, .io_wr, .io_wdata,
    .io_rdata(rd_fpwr), .dma_busy(f_busy), .f_rb_n, .pwr_en(f_pwr_en), .active(f_active),
    .mode_dma(f_mode_dma), .wp_n(f_wp_n), .bus_own(p_own), .f_ce_n(p_ce_n), .f_cle(p_cle),
    .f_we_n(p_we_n), .f_io(p_io));
  flash_dma u_fdma (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata(rd_fdma),
    .mode_dma(f_mode_dma), .active(f_active),
    .cpu_req(mem_act && cs_flash && !fl_cpu_ack), .cpu_we, .cpu_addr(lin[5:0]), .cpu_wdata,
    .cpu_ack(fl_cpu_ack), .cpu_rdata(fl_cpu_rdata), .mreq(mreq_fsh), .mrsp(mrsp_fsh),
    .f_ce_n(d_ce_n), .f_cle(d_cle), .f_ale(d_ale), .f_we_n(d_we_n), .f_re_n(d_re_n),
    .f_io_out(d_io), .f_io_oe(d_oe), .f_io_in, .f_rb_n, .busy(f_busy), .done(flash_done));
  assign f_ce_n   = p_own ? p_ce_n : d_ce_n;
  assign f_cle    = p_own ? p_cle : d_cle;
  assign f_ale    = p_own ? 1'b0 : d_ale;
  assign f_we_n   = p_own ? p_we_n : d_we_n;
  assign f_re_n   = p_own ? 1'b1 : d_re_n;
  assign f_io_out = p_own ? p_io : d_io;
  assign f_io_oe  = p_own ? 1'b1 : d_oe;

  // ---------------- debug UART ----------------
  debug_uart u_dbg (.clk, .rst, .io_addr, .io_wr, .io_rd(cst == C_IO && !cpu_we), .io_wdata,
    .io_rdata(rd_dbg), .rxd(dbg_rxd), .txd(dbg_txd));
endmodule
