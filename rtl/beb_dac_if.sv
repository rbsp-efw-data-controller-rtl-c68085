// beb_dac_if: loads the five AD5544 quad DACs on the Boom Electronics Board.
// The DACs sit in a daisy chain, so one transfer (DACXMIT, 0x50 bit 6) shifts
// 90 bits: for register 0 first and register 4 last, the 2-bit DAC register
// address (0x50 bits 1:0) then the 16-bit value from 0x54..0x5D, MSB first.
// dac_cs is active for the whole shift and the shift clock runs at
// SCLK/(2*HALF_PERIOD) = 1.048 MHz only during it (about 86 us); data changes
// on the falling edge and is stable at the rising edge. DACLOAD (bit 5)
// produces one shift-clock period of LDAC, which moves the holding registers
// to the outputs; DACXMIT and DACLOAD written together shift without loading.
// A command or data-register write while busy is ignored and sets the sticky
// error flag (0x50 bit 7, cleared by writing 1 to bit 7). The BEB receives
// clock, data and LDAC through inverting buffers, so those outputs are driven
// inverted (the _n outputs idle high); chip select is active low. Sizes,
// order, rate and inversions are the specification's; the 18-bit word layout
// is the AD5544 serial format and the idle levels are this design's choice.
module beb_dac_if #(
  parameter int unsigned HALF_PERIOD = 8,
  parameter int unsigned NDAC        = 5
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  output logic       dac_clk_n,
  output logic       dac_cmd_n,
  output logic       dac_cs_n,
  output logic       dac_ldac_n,
  output logic       busy
);
  localparam int unsigned NBITS = 18 * NDAC;
  logic [15:0] dreg [NDAC];
  logic [1:0]  radr;
  logic        err;
  logic [NBITS-1:0] sh;
  logic [6:0]  left;
  logic [$clog2(HALF_PERIOD)-1:0] cnt;
  logic        sclk, ldac, loading;
  logic        wr_ctl, wr_dat;
  logic [NBITS-1:0] frame;

  assign wr_ctl = io_wr && io_addr == 8'h50;
  assign wr_dat = io_wr && io_addr >= 8'h54 && io_addr < 8'(8'h54 + 2 * NDAC);

  always_comb
    for (int i = 0; i < NDAC; i++)
      frame[NBITS-1-18*i -: 18] = {(wr_ctl ? io_wdata[1:0] : radr), dreg[i]};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NDAC; i++) dreg[i] <= '0;
      radr <= '0; err <= 1'b0; sh <= '0; left <= '0; cnt <= '0;
      busy <= 1'b0; sclk <= 1'b0; ldac <= 1'b0; loading <= 1'b0;
    end else begin
      if (wr_ctl && io_wdata[7]) err <= 1'b0;
      if ((wr_ctl && (io_wdata[6] || io_wdata[5])) || wr_dat) begin
        if (busy) err <= 1'b1;
        else if (wr_dat) begin
          if (io_addr[0]) dreg[3'((io_addr - 8'h54) >> 1)][15:8] <= io_wdata;
          else            dreg[3'((io_addr - 8'h54) >> 1)][7:0]  <= io_wdata;
        end else begin
          radr <= io_wdata[1:0];
          busy <= 1'b1;
          cnt  <= '0;
          sclk <= 1'b0;
          if (io_wdata[6]) begin
            sh      <= frame;
            left    <= 7'(NBITS);
            loading <= 1'b0;
          end else begin
            loading <= 1'b1;
            ldac    <= 1'b1;
            left    <= 7'd1;
          end
        end
      end else if (busy) begin
        if (cnt == ($bits(cnt))'(HALF_PERIOD - 1)) begin
          cnt <= '0;
          if (loading) begin
            if (sclk) begin busy <= 1'b0; ldac <= 1'b0; sclk <= 1'b0; end
            else sclk <= 1'b1;
          end else if (!sclk) sclk <= 1'b1;
          else begin
            sclk <= 1'b0;
            sh   <= {sh[NBITS-2:0], 1'b0};
            left <= left - 7'd1;
            if (left == 7'd1) busy <= 1'b0;
          end
        end else cnt <= cnt + 1'b1;
      end
    end
  end

  // The load pulse drives LDAC only; the shift clock runs only while shifting.
  assign dac_clk_n  = ~(sclk & busy & ~loading);
  assign dac_cmd_n  = ~(sh[NBITS-1] & busy & ~loading);
  assign dac_cs_n   = ~(busy & ~loading);
  assign dac_ldac_n = ~ldac;

  always_comb begin
    io_rdata = 8'h00;
    if (io_addr == 8'h50) io_rdata = {err, busy, 4'b0, radr};
    else if (io_addr >= 8'h54 && io_addr < 8'(8'h54 + 2 * NDAC))
      io_rdata = io_addr[0] ? dreg[3'((io_addr - 8'h54) >> 1)][15:8] : dreg[3'((io_addr - 8'h54) >> 1)][7:0];
  end
endmodule
