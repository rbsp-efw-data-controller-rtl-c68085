// beb_actest: the two BEB AC-test stimulus outputs. A 12-bit field
// (0x52 bits 7:0, 0x53 bits 3:0) holds N-1, and both outputs share one
// square wave of f = 524288/N Hz: the wave toggles every N*HALF_UNIT SCLK
// cycles (HALF_UNIT = 16 gives a period step of 2^-19 s). Enables (0x53 bit 6
// for ACTEST1, bit 7 for ACTEST2) take effect at the next CLK1HZ tick. An
// inactive output is held high at the pin (the BEB's inverting buffer turns
// that into a low). actest[0] is ACTEST1, actest[1] is ACTEST2. Formula,
// gating and idle level are the specification's.
module beb_actest #(
  parameter int unsigned HALF_UNIT = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  input  logic       tick_1hz,
  output logic [1:0] actest
);
  logic [7:0]  lo, hi;
  logic [1:0]  gate;
  logic [16:0] cnt;
  logic [16:0] half;
  logic        wave;

  assign half = 17'(({5'b0, hi[3:0], lo} + 17'd1) * 17'(HALF_UNIT));

  always_ff @(posedge clk) begin
    if (rst) begin
      lo <= '0; hi <= '0; gate <= '0; cnt <= '0; wave <= 1'b0;
    end else begin
      if (io_wr && io_addr == 8'h52) lo <= io_wdata;
      if (io_wr && io_addr == 8'h53) hi <= io_wdata;
      if (tick_1hz) gate <= hi[7:6];
      if (cnt >= half - 17'd1) begin
        cnt  <= '0;
        wave <= ~wave;
      end else cnt <= cnt + 17'd1;
    end
  end

  assign actest[0] = gate[0] ? wave : 1'b1;
  assign actest[1] = gate[1] ? wave : 1'b1;

  always_comb begin
    case (io_addr)
      8'h52:   io_rdata = lo;
      8'h53:   io_rdata = hi;
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
