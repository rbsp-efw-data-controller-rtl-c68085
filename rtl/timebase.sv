// timebase: the DCB Sample Time counter and the clocks derived from SCLK.
// A CNT_W-bit counter advances on every SCLK cycle; with SCLK = 2^24 Hz and
// CNT_W = 24 it rolls over once per second, giving CLK1HZ (the rollover also
// toggles sec_lsb, the "Seconds (rollover)" bit of the time latches).
// 256 Hz, 128 Hz and 64 Hz ticks are the carries out of counter bits 15, 16
// and 17. CLK8M is SCLK/2 (counter bit 0 inverted, high on even counts).
// shift_en pulses once per 16 SCLK (1.048 MHz) for the PCB/BEB shift clocks.
// conv_clk is the power-converter sync clock: SCLK/21, high 11 of 21 cycles
// (798.9 kHz, 52.4 % high) - divisor and split are derived from the stated
// frequency and duty cycle. All tick outputs are one SCLK cycle wide,
// registered, in the cycle after the counter reaches the boundary.
module timebase #(
  parameter int unsigned CNT_W    = 24,
  parameter int unsigned CONV_DIV = 21,
  parameter int unsigned CONV_HI  = 11
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] sample_time,
  output logic             sec_lsb,
  output logic             tick_1hz,
  output logic             tick_256hz,
  output logic             tick_128hz,
  output logic             tick_64hz,
  output logic             shift_en,
  output logic             clk8m,
  output logic             conv_clk
);
  logic [CNT_W-1:0] nxt;
  logic [4:0]       conv_cnt;

  assign nxt = sample_time + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_time <= '0;
      sec_lsb     <= 1'b0;
      tick_1hz    <= 1'b0;
      tick_256hz  <= 1'b0;
      tick_128hz  <= 1'b0;
      tick_64hz   <= 1'b0;
      shift_en    <= 1'b0;
      conv_cnt    <= '0;
      conv_clk    <= 1'b0;
    end else begin
      sample_time <= nxt;
      tick_1hz    <= (nxt == '0);
      tick_256hz  <= (nxt[CNT_W-9:0] == '0);
      tick_128hz  <= (nxt[CNT_W-8:0] == '0);
      tick_64hz   <= (nxt[CNT_W-7:0] == '0);
      shift_en    <= (nxt[3:0] == 4'd0);
      if (nxt == '0) sec_lsb <= ~sec_lsb;
      conv_cnt    <= (conv_cnt == 5'(CONV_DIV - 1)) ? 5'd0 : conv_cnt + 5'd1;
      conv_clk    <= (conv_cnt < 5'(CONV_HI - 1)) || (conv_cnt == 5'(CONV_DIV - 1));
    end
  end

  assign clk8m = ~sample_time[0];
endmodule
