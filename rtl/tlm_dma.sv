// tlm_dma: the spacecraft telemetry DMA. One queued buffer of TLMLen+1
// longwords, starting on the 4 KB page TLMPage[28:12], is read from memory
// and sent over the TLM UART (115.2 kbaud, 8 data bits, odd parity, one stop
// bit) wrapped in an Instrument Transfer Frame:
//   bytes 0-3  sync FE FA 30 C8
//   byte  4    {Aliveness, PowerDownRequest, 0, MessageLength[12:8]}
//   byte  5    MessageLength[7:0], MessageLength = 4*(TLMLen+1) + 4
//   bytes 6-7  first-packet-header index, always 0
//   data       the longwords, bytes in memory order
//   last two   checksum: XOR of all 16-bit words from byte 4 on, MSB first
// Registers 0x40-0x4B: 0x40 control (bit 0 enable - clear holds the block in
// reset and stops a frame at once; bit 1 start, pulse; bit 2 clear errors,
// pulse; bits 4/5 the two ITF flags; bit 6 page bit 28), 0x41/0x42 page,
// 0x43/0x44 length (0x44 reads the state in bits 6:4), 0x48-0x4B the current
// address. Errors: BQERR - start while a frame is in progress (ignored);
// BCERR - the S/C 1PPS arrived during a frame. done pulses at the end of a
// frame for the TLM interrupt. The frame layout and registers follow the
// specification; the checksum is read as a 16-bit word XOR (bytes 4,6,...
// into the high byte) and the memory port is this design's.
module tlm_dma #(
  parameter logic [11:0] DIV = 12'd146
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        io_addr,
  input  logic              io_wr,
  input  logic [7:0]        io_wdata,
  output logic [7:0]        io_rdata,
  input  logic              pps_evt,
  output logic              txd,
  output logic              done,
  output dcb_pkg::mem_req_t mreq,
  input  dcb_pkg::mem_rsp_t mrsp
);
  import dcb_pkg::*;
  typedef enum logic [2:0] {IDLE = 3'd0, HDR = 3'd1, FETCH = 3'd2, DATA = 3'd3, CSUM = 3'd4} state_t;

  logic        en, urst;
  logic [2:0]  flags;          // {p28, alive, pdreq}
  logic [15:0] page;
  logic [9:0]  len;
  logic        bcerr, bqerr;
  state_t      st;
  logic [9:0]  lw;             // longword index in the buffer
  logic [2:0]  bi;             // byte index within header / longword / checksum
  logic [31:0] word;
  logic [15:0] csum;
  logic [12:0] mlen;
  logic [7:0]  tx_byte, hdr_byte;
  logic        tx_start, tx_busy, tx_done, sending;
  logic        pos_odd;        // odd ITF byte position
  logic [28:0] cur_addr;

  assign urst     = rst | ~en;
  assign mlen     = {1'b0, len, 2'b00} + 13'd8;
  assign cur_addr = {flags[2], page, lw, 2'b00};

  always_comb begin
    case (bi)
      3'd0: hdr_byte = 8'hFE;
      3'd1: hdr_byte = 8'hFA;
      3'd2: hdr_byte = 8'h30;
      3'd3: hdr_byte = 8'hC8;
      3'd4: hdr_byte = {flags[1], flags[0], 1'b0, mlen[12:8]};
      3'd5: hdr_byte = mlen[7:0];
      default: hdr_byte = 8'h00;
    endcase
    case (st)
      HDR:     tx_byte = hdr_byte;
      DATA:    tx_byte = word[31 - 8*bi[1:0] -: 8];
      CSUM:    tx_byte = bi[0] ? csum[7:0] : csum[15:8];
      default: tx_byte = 8'h00;
    endcase
  end

  assign tx_start = !sending && (st == HDR || st == DATA || st == CSUM);

  uart_tx #(.DATA_BITS(8)) u_tx (.clk, .rst(urst), .start(tx_start), .data(tx_byte), .div(DIV),
    .txd, .busy(tx_busy), .done(tx_done));

  // configuration registers and error flags
  always_ff @(posedge clk) begin
    if (rst) begin
      en <= 1'b0; flags <= '0; page <= '0; len <= '0; bcerr <= 1'b0; bqerr <= 1'b0;
    end else begin
      if (io_wr && io_addr == 8'h40) begin
        en    <= io_wdata[0];
        flags <= io_wdata[6:4];
        if (io_wdata[2]) begin bcerr <= 1'b0; bqerr <= 1'b0; end
        if (io_wdata[1] && en && st != IDLE) bqerr <= 1'b1;
      end
      if (io_wr && io_addr == 8'h41) page[7:0]  <= io_wdata;
      if (io_wr && io_addr == 8'h42) page[15:8] <= io_wdata;
      if (io_wr && io_addr == 8'h43) len[7:0]   <= io_wdata;
      if (io_wr && io_addr == 8'h44) len[9:8]   <= io_wdata[1:0];
      if (pps_evt && en && st != IDLE) bcerr <= 1'b1;
    end
  end

  // frame sequencer
  always_ff @(posedge clk) begin
    if (urst) begin
      st <= IDLE; lw <= '0; bi <= '0; word <= '0; csum <= '0; sending <= 1'b0;
      done <= 1'b0; mreq <= '0; pos_odd <= 1'b0;
    end else begin
      done <= 1'b0;
      if (tx_start) begin
        sending <= 1'b1;
        if (!(st == HDR && bi < 3'd4) && st != CSUM) begin
          if (pos_odd) csum[7:0] <= csum[7:0] ^ tx_byte;
          else         csum[15:8] <= csum[15:8] ^ tx_byte;
        end
        pos_odd <= ~pos_odd;
      end
      case (st)
        IDLE: if (io_wr && io_addr == 8'h40 && io_wdata[1]) begin
          st <= HDR; bi <= '0; lw <= '0; csum <= '0; pos_odd <= 1'b0;
        end
        HDR: if (tx_done) begin
          sending <= 1'b0;
          if (bi == 3'd7) begin
            st <= FETCH; bi <= '0;
            mreq <= '{req: 1'b1, we: 1'b0, size4: 1'b1, addr: cur_addr, wdata: '0};
          end else bi <= bi + 3'd1;
        end
        FETCH: if (mrsp.ack) begin
          mreq.req <= 1'b0;
          word     <= mrsp.rdata;
          st       <= DATA;
        end
        DATA: if (tx_done) begin
          sending <= 1'b0;
          if (bi == 3'd3) begin
            bi <= '0;
            if (lw == len) st <= CSUM;
            else begin
              lw   <= lw + 10'd1;
              st   <= FETCH;
              mreq <= '{req: 1'b1, we: 1'b0, size4: 1'b1,
                        addr: {flags[2], page, lw + 10'd1, 2'b00}, wdata: '0};
            end
          end else bi <= bi + 3'd1;
        end
        CSUM: if (tx_done) begin
          sending <= 1'b0;
          if (bi == 3'd1) begin st <= IDLE; done <= 1'b1; bi <= '0; end
          else bi <= bi + 3'd1;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    case (io_addr)
      8'h40:   io_rdata = {1'b0, flags, 1'b0, bcerr, bqerr, en};
      8'h41:   io_rdata = page[7:0];
      8'h42:   io_rdata = page[15:8];
      8'h43:   io_rdata = len[7:0];
      8'h44:   io_rdata = {1'b0, st, 2'b0, len[9:8]};
      8'h48:   io_rdata = {cur_addr[7:2], 2'b00};
      8'h49:   io_rdata = cur_addr[15:8];
      8'h4A:   io_rdata = cur_addr[23:16];
      8'h4B:   io_rdata = {3'b0, cur_addr[28:24]};
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
