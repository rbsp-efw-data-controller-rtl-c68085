// cdi_tx: the DFB Command Interface (CDI). The CPU loads a 24-bit command
// through CDIDatLo (0x28, bits 7:0), CDIDatHi (0x29, bits 15:8) and CDIID
// (0x2A, bits 23:16) and writes CDIStart (0x2B). The word is then shifted out
// as one start bit, 24 command bits, an odd-parity bit and a stop bit, one bit
// per CLK8M period (CLKS_PER_BIT SCLK cycles). busy (CMDBUSY) is high while it
// shifts. A write to any CDI register while busy is ignored and sets the
// sticky err flag (CMDAVERRDET), cleared by err_clr (pulse register bit 5).
// Frame and register behaviour follow the specification; the bit order
// (MSB first) and idle-high line are this design's choice.
module cdi_tx #(
  parameter int unsigned CLKS_PER_BIT = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  input  logic       err_clr,
  output logic       cdi_out,
  output logic       busy,
  output logic       err
);
  logic [23:0] cmd;
  logic        start, tx_busy, tx_done;
  logic        hit;
  logic        start_q;

  assign hit   = io_wr && io_addr inside {8'h28, 8'h29, 8'h2A, 8'h2B};
  assign start = io_wr && io_addr == 8'h2B && !busy;
  assign busy  = tx_busy | start_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd <= '0; err <= 1'b0; start_q <= 1'b0;
    end else begin
      start_q <= start;
      if (err_clr) err <= 1'b0;
      if (hit && busy) err <= 1'b1;
      else if (io_wr && !busy) begin
        if (io_addr == 8'h28) cmd[7:0]   <= io_wdata;
        if (io_addr == 8'h29) cmd[15:8]  <= io_wdata;
        if (io_addr == 8'h2A) cmd[23:16] <= io_wdata;
      end
    end
  end

  uart_tx #(.DATA_BITS(24), .DIV_W(4), .MSB_FIRST(1'b1)) u_tx (.clk, .rst,
    .start(start), .data(cmd), .div(4'(CLKS_PER_BIT)), .txd(cdi_out), .busy(tx_busy), .done(tx_done));

  always_comb begin
    case (io_addr)
      8'h28:   io_rdata = cmd[7:0];
      8'h29:   io_rdata = cmd[15:8];
      8'h2A:   io_rdata = cmd[23:16];
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
