// hk_adc_ctl: control of the housekeeping ADC (LTC1604) and its 8-input
// analog multiplexer. ADCctl (0x26) holds the mux address (bits 2:0) and the
// shutdown control (bit 7; 0 at reset keeps the ADC in nap mode, 1 wakes it).
// Any write to ADC_CONV (0x27) drives the start-of-conversion line for
// SOC_CYCLES SCLK cycles. The converted 16-bit value is read by the CPU through
// the memory map (0x40000 low byte, 0x40001 high byte); adc_oe[1:0] enable the
// low/high data-bus buffers during such a read. Register layout is the
// specification's; the SOC pulse width is this design's choice.
module hk_adc_ctl #(
  parameter int unsigned SOC_CYCLES = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  input  logic       adc_rd,      // CPU memory read in the ADC-data region
  input  logic       adc_byte,    // address bit 0 of that read
  output logic [2:0] amux_adr,
  output logic       adc_awake,   // 1 = out of nap mode
  output logic       adc_soc,
  output logic [1:0] adc_oe
);
  logic [7:0] ctl;
  logic [$clog2(SOC_CYCLES+1)-1:0] soc_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctl <= '0; soc_cnt <= '0;
    end else begin
      if (io_wr && io_addr == 8'h26) ctl <= {io_wdata[7], 4'b0, io_wdata[2:0]};
      if (io_wr && io_addr == 8'h27) soc_cnt <= ($bits(soc_cnt))'(SOC_CYCLES);
      else if (soc_cnt != '0) soc_cnt <= soc_cnt - 1'b1;
    end
  end

  assign amux_adr  = ctl[2:0];
  assign adc_awake = ctl[7];
  assign adc_soc   = (soc_cnt != '0);
  assign adc_oe    = adc_rd ? (adc_byte ? 2'b10 : 2'b01) : 2'b00;
  assign io_rdata  = (io_addr == 8'h26) ? ctl : 8'h00;
endmodule
