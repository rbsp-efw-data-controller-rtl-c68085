// cmd_dma: the spacecraft command interface. Bytes from the S/C command UART
// (115.2 kbaud, 8 data bits, odd parity, one stop bit; the line is deglitched
// outside) are written one by one into a 1 KB SRAM buffer at SRAM address
// {SCmdPAddr[16:10], index[9:0]}. Registers: 0x60 control/status (bit 0
// enable; bit 4 write = arm the next buffer: index back to 0; bit 7 write =
// clear the latched errors, read back in bits 7:4 as framing, parity,
// overflow, timeout), 0x61 page, 0x62/0x63 the running index. A byte with a
// parity or stop-bit error is still stored. Overflow: more than BUF_BYTES
// bytes since the last arm; further bytes are dropped. Timeout: a byte still
// waiting for the memory when the next byte's start bit arrives (it is
// replaced). The ITF content is not parsed. Behaviour is the
// specification's; the request/ack memory port is this design's. While
// disabled the receiver and index are held in reset.
module cmd_dma #(
  parameter int unsigned BUF_BYTES = 1024,
  parameter logic [11:0] DIV       = 12'd146
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        io_addr,
  input  logic              io_wr,
  input  logic [7:0]        io_wdata,
  output logic [7:0]        io_rdata,
  input  logic              rxd,
  output dcb_pkg::mem_req_t mreq,
  input  dcb_pkg::mem_rsp_t mrsp
);
  import dcb_pkg::*;
  logic       en, urst;
  logic [6:0] page;
  logic [10:0] idx;
  logic [3:0] errs;     // {framing, parity, overflow, timeout}
  logic [7:0] rx_data;
  logic       rx_valid, rx_perr, rx_ferr, rx_busy, rx_busy_q;

  assign urst = rst | ~en;

  uart_rx #(.DATA_BITS(8)) u_rx (.clk, .rst(urst), .rxd, .div(DIV), .data(rx_data),
    .valid(rx_valid), .par_err(rx_perr), .frm_err(rx_ferr), .busy(rx_busy));

  always_ff @(posedge clk) begin
    if (rst) begin
      en <= 1'b0; page <= '0; errs <= '0;
    end else begin
      if (io_wr && io_addr == 8'h60) begin
        en <= io_wdata[0];
        if (io_wdata[7]) errs <= '0;
      end
      if (io_wr && io_addr == 8'h61) page <= io_wdata[6:0];
      if (rx_ferr) errs[3] <= 1'b1;
      if (rx_perr) errs[2] <= 1'b1;
      if (rx_valid && idx == 11'(BUF_BYTES)) errs[1] <= 1'b1;
      if (rx_busy && !rx_busy_q && mreq.req) errs[0] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (urst) begin
      idx <= '0; mreq <= '0; rx_busy_q <= 1'b0;
    end else begin
      rx_busy_q <= rx_busy;
      if (mrsp.ack) mreq.req <= 1'b0;
      if (io_wr && io_addr == 8'h60 && io_wdata[4]) idx <= '0;
      else if (rx_valid && idx != 11'(BUF_BYTES)) begin
        mreq.req   <= 1'b1;
        mreq.we    <= 1'b1;
        mreq.size4 <= 1'b0;
        mreq.addr  <= {12'b0, page, idx[9:0]};
        mreq.wdata <= {24'b0, rx_data};
        idx        <= idx + 11'd1;
      end
    end
  end

  always_comb begin
    case (io_addr)
      8'h60:   io_rdata = {errs, 3'b0, en};
      8'h61:   io_rdata = {1'b0, page};
      8'h62:   io_rdata = idx[7:0];
      8'h63:   io_rdata = {6'b0, idx[9:8]};
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
