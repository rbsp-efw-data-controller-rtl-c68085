// dcb_regs: the DCB control and status registers in Z80 I/O space.
//   0x10 dcbCtl: bits 6:4 interrupt enables (FLASH DMA, TLM, timer), bit 3
//        low-half write disable, bit 2 EEPROM write enable, bit 1 SDRAM power
//        (cleared only by power-on reset, not by the watchdog), bit 0 ROMON
//        (1 after any reset)
//   0x11-0x16 page registers 0 and 1: bits [19:12], [27:20], [28]
//   0x18 diagnostic LEDs
//   0x1A auxStat: board ID, SDRAM_Active, SDRAM null cycle, CDI busy/error
//   0x1B statReg (read) / pulse register (write 1 to clear): watchdog reset,
//        DMA and CPU low-half write errors, CPU null cycle, CLK1HZ, S/C pulse
//        error, spin pulse, 1PPS
//   0x1C interrupt status / clear (through int_ctl)
//   0x1F FPGA version (read) / watchdog clear (write of X5)
//   0x20-0x25 time latches: Delta MET, sample-time snapshot taken by a write
//        to 0x22, spin-pulse time; each {sec, count[23:17]}, count[16:9]
// Register layout follows the specification; the version value is this
// design's. io_rdata is combinational and zero outside these addresses.
module dcb_regs #(
  parameter logic [7:0] VERSION = 8'hC5
) (
  input  logic        clk,
  input  logic        rst,        // system reset (power-on or watchdog)
  input  logic        por,        // power-on reset only
  input  logic [7:0]  io_addr,
  input  logic        io_wr,
  input  logic [7:0]  io_wdata,
  output logic [7:0]  io_rdata,
  // controls
  output logic        romon,
  output logic        sdram_pwr,
  output logic        eeprom_we,
  output logic        lh_wd,
  output logic [16:0] pg0,
  output logic [16:0] pg1,
  output logic [7:0]  led,
  output logic        wd_kick,
  output logic        wd_det_clr,
  output logic        cdi_err_clr,
  output logic [2:0]  sc_clr,     // {err, spin, pps}
  output logic        int_n,
  // status inputs
  input  logic [2:0]  board_id,
  input  logic        sdram_active,
  input  logic        sdram_null,   // pulse
  input  logic        cdi_busy,
  input  logic        cdi_err,
  input  logic        wd_det,
  input  logic        dma_lh_err,   // pulse
  input  logic        cpu_lh_err,   // pulse
  input  logic        cpu_null,     // pulse
  input  logic        tick_1hz,
  input  logic        tick_256hz,
  input  logic        pps_det,
  input  logic        spin_det,
  input  logic        err_det,
  input  logic        tlm_done,
  input  logic        flash_done,
  input  logic [23:0] sample_time,
  input  logic        sec_lsb,
  input  logic [15:0] dmet,
  input  logic [15:0] sptm
);
  logic [7:0]  ctl;
  logic [7:0]  pg [6];
  logic        f_sdnull, f_dmalh, f_cpulh, f_null, f_1hz;
  logic [15:0] ctr;
  logic [2:0]  istat;
  logic        pul;

  assign pul = io_wr && io_addr == 8'h1B;

  always_ff @(posedge clk) begin
    if (por) sdram_pwr <= 1'b0;
    else if (io_wr && io_addr == 8'h10) sdram_pwr <= io_wdata[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctl <= 8'h01; led <= '0; ctr <= '0;
      for (int i = 0; i < 6; i++) pg[i] <= '0;
      f_sdnull <= 1'b0; f_dmalh <= 1'b0; f_cpulh <= 1'b0; f_null <= 1'b0; f_1hz <= 1'b0;
    end else begin
      if (io_wr && io_addr == 8'h10) ctl <= {1'b0, io_wdata[6:2], 1'b0, io_wdata[0]};
      if (io_wr && io_addr >= 8'h11 && io_addr <= 8'h16) pg[3'(io_addr - 8'h11)] <= io_wdata;
      if (io_wr && io_addr == 8'h18) led <= io_wdata;
      if (io_wr && io_addr == 8'h22) ctr <= {sec_lsb, sample_time[23:9]};
      if (pul && io_wdata[4]) begin f_sdnull <= 1'b0; f_dmalh <= 1'b0; f_cpulh <= 1'b0; f_null <= 1'b0; end
      if (pul && io_wdata[3]) f_1hz <= 1'b0;
      if (sdram_null) f_sdnull <= 1'b1;
      if (dma_lh_err) f_dmalh <= 1'b1;
      if (cpu_lh_err) f_cpulh <= 1'b1;
      if (cpu_null)   f_null <= 1'b1;
      if (tick_1hz)   f_1hz <= 1'b1;
    end
  end

  assign romon     = ctl[0];
  assign eeprom_we = ctl[2];
  assign lh_wd     = ctl[3];
  assign pg0       = {pg[2][0], pg[1], pg[0]};
  assign pg1       = {pg[5][0], pg[4], pg[3]};
  assign wd_kick   = io_wr && io_addr == 8'h1F && io_wdata[3:0] == 4'h5;
  assign wd_det_clr  = pul && io_wdata[7];
  assign cdi_err_clr = pul && io_wdata[5];
  assign sc_clr      = pul ? io_wdata[2:0] : 3'b000;

  int_ctl u_int (.clk, .rst, .src({tick_256hz, tlm_done, flash_done}), .en({ctl[4], ctl[5], ctl[6]}), .clr((io_wr && io_addr == 8'h1C) ? io_wdata[2:0] : 3'b000),
    .stat(istat), .int_n);

  always_comb begin
    case (io_addr)
      8'h10:   io_rdata = {ctl[7:2], sdram_pwr, ctl[0]};
      8'h11:   io_rdata = pg[0];
      8'h12:   io_rdata = pg[1];
      8'h13:   io_rdata = {7'b0, pg[2][0]};
      8'h14:   io_rdata = pg[3];
      8'h15:   io_rdata = pg[4];
      8'h16:   io_rdata = {7'b0, pg[5][0]};
      8'h18:   io_rdata = led;
      8'h1A:   io_rdata = {1'b0, board_id, sdram_active, f_sdnull, cdi_busy, cdi_err};
      8'h1B:   io_rdata = {wd_det, f_dmalh, f_cpulh, f_null, f_1hz, err_det, spin_det, pps_det};
      8'h1C:   io_rdata = {5'b0, istat};
      8'h1F:   io_rdata = VERSION;
      8'h20:   io_rdata = dmet[7:0];
      8'h21:   io_rdata = dmet[15:8];
      8'h22:   io_rdata = ctr[7:0];
      8'h23:   io_rdata = ctr[15:8];
      8'h24:   io_rdata = sptm[7:0];
      8'h25:   io_rdata = sptm[15:8];
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
