// watchdog: the DCB reset logic. The board reset is the OR of the power-on
// reset and a watchdog pulse. The watchdog counts CLK1HZ ticks; a CPU write of
// X5 to register 0x1F (kick) clears the count. When TIMEOUT_TICKS ticks pass
// without a kick, wd_rst is driven high for PULSE_CYCLES SCLK cycles (50 cycles
// = 3 us at 16.78 MHz) and the sticky watchdog-reset-detect flag is set; it
// survives the watchdog reset and is cleared only by power-on reset or by the
// pulse-register bit (wd_det_clr). The jumper input wd_disable holds the
// counter at zero. Times are the specification's; the tick-counting detail is
// this design's own (a kick resets the count to zero).
module watchdog #(
  parameter int unsigned TIMEOUT_TICKS = 3,
  parameter int unsigned PULSE_CYCLES  = 50
) (
  input  logic clk,
  input  logic por,        // power-on reset, active high
  input  logic tick_1hz,
  input  logic kick,       // one-cycle strobe: write of X5 to 0x1F
  input  logic wd_disable, // jumper installed
  input  logic wd_det_clr,
  output logic wd_rst,
  output logic wd_det,
  output logic sys_rst
);
  logic [1:0] ticks;
  logic [7:0] pulse_cnt;

  always_ff @(posedge clk) begin
    if (por) begin
      ticks     <= '0;
      pulse_cnt <= '0;
      wd_rst    <= 1'b0;
      wd_det    <= 1'b0;
    end else begin
      if (wd_det_clr) wd_det <= 1'b0;
      if (wd_rst) begin
        ticks <= '0;
        if (pulse_cnt == 8'(PULSE_CYCLES - 1)) begin
          wd_rst    <= 1'b0;
          pulse_cnt <= '0;
        end else pulse_cnt <= pulse_cnt + 8'd1;
      end else if (kick || wd_disable) begin
        ticks <= '0;
      end else if (tick_1hz) begin
        if (ticks == 2'(TIMEOUT_TICKS - 1)) begin
          ticks  <= '0;
          wd_rst <= 1'b1;
          wd_det <= 1'b1;
        end else ticks <= ticks + 2'd1;
      end
    end
  end

  assign sys_rst = por | wd_rst;
endmodule
