// flash_pwr: power sequencing of the eight FLASH modules (register 0xA0).
// FLASHPWR[2:0] is decoded 3-to-8 to one module power switch, enabled only
// while FLASH_ON/OFF (bit 3) is set; reset default is off. Any change of the
// power setting drops FLASH_ACTIVE and write-protects the array; after
// RAMP_CYCLES (about 1 ms switch ramp) the block owns the FLASH bus and sends
// a RESET command (0xFF) to all eight dies at once (all chip enables, CLE,
// one write-enable pulse), then waits for ready (R/B# high, or at most
// READY_TIMEOUT cycles) and raises FLASH_ACTIVE. While active, the write
// protect follows FLASHWRENB (bit 7). FLASHMODE (bit 6, 1 = DMA, the reset
// default) takes effect only when the module is active and the FLASH DMA is
// idle. Register layout and the sequence are the specification's; the exact
// bus timing (one-cycle setup, two-cycle write pulse) is this design's.
module flash_pwr #(
  parameter int unsigned RAMP_CYCLES   = 16777,
  parameter int unsigned READY_TIMEOUT = 67109
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  input  logic       dma_busy,
  input  logic       f_rb_n,
  output logic [7:0] pwr_en,
  output logic       active,
  output logic       mode_dma,     // effective FLASHMODE
  output logic       wp_n,
  output logic       bus_own,      // drives the FLASH bus below
  output logic [7:0] f_ce_n,
  output logic       f_cle,
  output logic       f_we_n,
  output logic [7:0] f_io
);
  typedef enum logic [2:0] {OFF, RAMP, CMD_SETUP, CMD_WE, CMD_HOLD, WAIT_RDY, ACTIVE} state_t;
  state_t      st;
  logic [7:0]  ctl;         // {wrenb, mode, -, -, on, pwr[2:0]}
  logic [26:0] cnt;

  assign pwr_en = ctl[3] ? (8'd1 << ctl[2:0]) : 8'd0;
  assign active = (st == ACTIVE);
  assign wp_n   = active && ctl[7];
  assign bus_own = (st == CMD_SETUP) || (st == CMD_WE) || (st == CMD_HOLD);
  assign f_ce_n = bus_own ? 8'h00 : 8'hFF;
  assign f_cle  = bus_own;
  assign f_we_n = (st != CMD_WE);
  assign f_io   = 8'hFF;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= OFF; ctl <= 8'h40; cnt <= '0; mode_dma <= 1'b1;
    end else begin
      if (io_wr && io_addr == 8'hA0) begin
        ctl <= {io_wdata[7:6], 2'b00, io_wdata[3:0]};
        if (io_wdata[3:0] != ctl[3:0]) begin
          st  <= io_wdata[3] ? RAMP : OFF;
          cnt <= '0;
        end
      end else begin
        case (st)
          RAMP:      if (cnt == 27'(RAMP_CYCLES - 1)) begin st <= CMD_SETUP; cnt <= '0; end
                     else cnt <= cnt + 27'd1;
          CMD_SETUP: st <= CMD_WE;
          CMD_WE:    if (cnt == 27'd1) begin st <= CMD_HOLD; cnt <= '0; end
                     else cnt <= cnt + 27'd1;
          CMD_HOLD:  st <= WAIT_RDY;
          WAIT_RDY:  if (cnt >= 27'd4 && (f_rb_n || cnt == 27'(READY_TIMEOUT))) begin
                       st <= ACTIVE; cnt <= '0;
                     end else cnt <= cnt + 27'd1;
          default: ;
        endcase
      end
      if (active && !dma_busy) mode_dma <= ctl[6];
    end
  end

  assign io_rdata = (io_addr == 8'hA0) ? {ctl[7:6], 1'b0, active, ctl[3:0]} : 8'h00;
endmodule
