// dfb_rx_merge: reception of the two DFB telemetry lines. Each line has its
// own receiver for 24-bit words (start bit, 24 bits MSB first, odd parity,
// stop bit, one bit per CLK8M period = CLKS_PER_BIT SCLK cycles). A word is
// an 8-bit Data-ID followed by 16 data bits. Words of both lines are merged
// into one stream in arrival order; if both complete in the same cycle, line
// 0 goes first and line 1 a cycle later. Words with parity or framing errors
// are passed on; the errors are latched in err = {parity[1:0], framing[1:0]}
// until clr (DFB control register bit 3). No reframing is attempted. Word
// format and error handling follow the specification; bit order and the
// same-cycle tie rule are this design's choice.
module dfb_rx_merge #(
  parameter int unsigned CLKS_PER_BIT = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  rxd,
  input  logic        clr,
  output logic [7:0]  id,
  output logic [15:0] data,
  output logic        valid,
  output logic [3:0]  err
);
  logic [23:0] w [2];
  logic [1:0]  v, pe, fe, bz;
  logic        hold_v;
  logic [23:0] hold_w;

  for (genvar g = 0; g < 2; g++) begin : g_rx
    uart_rx #(.DATA_BITS(24), .DIV_W(4), .MSB_FIRST(1'b1)) u_rx (.clk, .rst, .rxd(rxd[g]),
      .div(4'(CLKS_PER_BIT)), .data(w[g]), .valid(v[g]), .par_err(pe[g]), .frm_err(fe[g]), .busy(bz[g]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      id <= '0; data <= '0; valid <= 1'b0; hold_v <= 1'b0; hold_w <= '0; err <= '0;
    end else begin
      err <= (clr ? 4'b0 : err) | {pe, fe};
      valid <= 1'b0;
      if (v[0]) begin
        {id, data} <= w[0]; valid <= 1'b1;
        if (v[1]) begin hold_v <= 1'b1; hold_w <= w[1]; end
      end else if (hold_v) begin
        {id, data} <= hold_w; valid <= 1'b1; hold_v <= v[1]; hold_w <= w[1];
      end else if (v[1]) begin
        {id, data} <= w[1]; valid <= 1'b1;
      end
    end
  end
endmodule
