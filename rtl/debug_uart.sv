// debug_uart: the RS232 debug port in Z80 I/O space (registers 0x90-0x96).
// A receiver and a transmitter (8 data bits, odd parity, one stop bit) are
// decoupled from the CPU by a 128-byte FIFO in each direction. 0x90 holds the
// enable (bit 0; while clear the UARTs and FIFOs are held in reset) and the
// rate select (bits 3:2: 38400, 57600, 115200 (default), 230400 baud).
// Reading 0x92 pops the receive FIFO, writing 0x95 pushes the transmit FIFO;
// 0x91/0x94 return FIFO state and sticky error flags (receive parity,
// framing, overflow, read-when-empty; transmit write-when-full), cleared by
// writing 1 to bit 0. 0x93/0x96 give the fill counts. The register map is the
// specification's. io_rd/io_wr are one-cycle strobes; io_rdata is
// combinational and zero for addresses outside this block.
module debug_uart #(
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic       io_rd,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  input  logic       rxd,
  output logic       txd
);
  import dcb_pkg::*;
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic       enable;
  logic [1:0] rate;
  logic [11:0] div;
  logic       urst;
  logic [7:0] rx_data, in_head, out_head;
  logic       rx_valid, rx_perr, rx_ferr, rx_busy;
  logic       in_full, in_empty, out_full, out_empty;
  logic [CW-1:0] in_cnt, out_cnt;
  logic       tx_busy, tx_done, tx_start;
  logic       e_par, e_frm, e_ovf, e_emp, e_ofull;
  logic       rd_in, wr_out;

  assign urst = rst | ~enable;
  always_comb begin
    case (rate)
      2'd0:    div = DIV_38400;
      2'd1:    div = DIV_57600;
      2'd2:    div = DIV_115200;
      default: div = DIV_230400;
    endcase
  end

  assign rd_in  = io_rd && io_addr == 8'h92;
  assign wr_out = io_wr && io_addr == 8'h95;

  uart_rx #(.DATA_BITS(8)) u_rx (.clk, .rst(urst), .rxd, .div, .data(rx_data),
    .valid(rx_valid), .par_err(rx_perr), .frm_err(rx_ferr), .busy(rx_busy));

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_in (.clk, .rst(urst), .push(rx_valid),
    .wdata(rx_data), .pop(rd_in), .rdata(in_head), .full(in_full), .empty(in_empty), .count(in_cnt));

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_out (.clk, .rst(urst), .push(wr_out),
    .wdata(io_wdata), .pop(tx_start), .rdata(out_head), .full(out_full), .empty(out_empty), .count(out_cnt));

  assign tx_start = !tx_busy && !out_empty && !tx_done;

  uart_tx #(.DATA_BITS(8)) u_tx (.clk, .rst(urst), .start(tx_start), .data(out_head), .div,
    .txd, .busy(tx_busy), .done(tx_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      enable <= 1'b0; rate <= 2'd2;
    end else if (io_wr && io_addr == 8'h90) begin
      enable <= io_wdata[0]; rate <= io_wdata[3:2];
    end
  end

  always_ff @(posedge clk) begin
    if (urst) begin
      e_par <= 1'b0; e_frm <= 1'b0; e_ovf <= 1'b0; e_emp <= 1'b0; e_ofull <= 1'b0;
    end else begin
      if (io_wr && io_addr == 8'h91 && io_wdata[0]) begin
        e_par <= 1'b0; e_frm <= 1'b0; e_ovf <= 1'b0; e_emp <= 1'b0;
      end
      if (io_wr && io_addr == 8'h94 && io_wdata[0]) e_ofull <= 1'b0;
      if (rx_perr) e_par <= 1'b1;
      if (rx_ferr) e_frm <= 1'b1;
      if (rx_valid && in_full) e_ovf <= 1'b1;
      if (rd_in && in_empty) e_emp <= 1'b1;
      if (wr_out && out_full) e_ofull <= 1'b1;
    end
  end

  always_comb begin
    case (io_addr)
      8'h90:   io_rdata = {4'b0, rate, 1'b0, enable};
      8'h91:   io_rdata = {in_full, in_empty, 1'b0, ~rx_busy, e_par, e_frm, e_ovf, e_emp};
      8'h92:   io_rdata = in_head;
      8'h93:   io_rdata = 8'(in_cnt);
      8'h94:   io_rdata = {out_full, out_empty, 5'b0, e_ofull};
      8'h96:   io_rdata = 8'(out_cnt);
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
