// dfb_dma: the 16-channel DFB DMA. Words {Data-ID, 16-bit data} with IDs
// 0x40..0x4F go to channel ID-0x40; other IDs are dropped. Each channel packs
// two words into a longword (first word in the high half) and writes it to
// {page[16:0], index[9:0], 2'b00}, page bit 16 being the channel's PageAdr28
// select (SRAM or SDRAM). Buffers are 4 KB; the index starts at 4, behind a
// 16-byte header the CPU writes. Each channel is double-buffered: the CPU
// loads the next page while the current one fills. When the channel's swap
// enable is set, the next termination tick (128 Hz, or 1 Hz if its BTERM
// bit is set) closes the buffer: a pending half longword is padded with 16
// zero bits and written (Odd), then the last-buffer status word
// {BufSwap, Timeout, Overflow, Odd, Index[9:0], 00} is captured, the next page
// becomes current, the index returns to 4 and the swap-status bit is set.
// Overflow: after the longword at index 1023 is written, further words are
// dropped until the swap and the index stays at 1023. Timeout: a longword is
// completed while the channel's previous one has not reached memory yet (it
// is lost). Each channel holds one pending longword; the memory port serves
// the lowest-numbered pending channel. Registers 0x66-0x7B as in the
// specification; DFB_CTL bit 0 = 0 holds the DMA state (not the settings) in
// reset. Where the specification says both that a full buffer wraps and that
// an overflow inhibits writes, this design follows the overflow rule.
module dfb_dma #(
  parameter int unsigned NCH    = 16,
  parameter int unsigned HDR_LW = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        io_addr,
  input  logic              io_wr,
  input  logic [7:0]        io_wdata,
  output logic [7:0]        io_rdata,
  input  logic [7:0]        w_id,
  input  logic [15:0]       w_data,
  input  logic              w_valid,
  input  logic [3:0]        if_err,     // from the receivers, read at 0x67
  output logic              if_err_clr,
  input  logic              tick_128hz,
  input  logic              tick_1hz,
  output dcb_pkg::mem_req_t mreq,
  input  dcb_pkg::mem_rsp_t mrsp
);
  import dcb_pkg::*;
  localparam int unsigned CW = $clog2(NCH);

  // settings
  logic          en;
  logic [3:0]    ptr;
  logic [15:0]   next_pg [NCH];
  logic [NCH-1:0] p28, swap_en, bterm;
  // overview flags
  logic [NCH-1:0] swap_stat, oflow_flag, memto_flag;
  // channel state
  logic [16:0]   cur_pg   [NCH];
  logic [9:0]    idx      [NCH];
  logic [15:0]   half     [NCH];
  logic [NCH-1:0] half_v, oflow_cur, to_cur, odd_cur, swap_req, pend;
  logic [31:0]   pend_d   [NCH];
  logic [28:0]   pend_a   [NCH];
  logic [15:0]   lbstat   [NCH];
  // memory side
  logic          busy;
  logic [CW-1:0] bch, pick;
  logic          any;
  logic          dsel;
  logic [CW-1:0] wch;
  logic [28:0]   ptr_addr;

  assign dsel = w_valid && w_id[7:4] == 4'h4;
  assign wch  = CW'(w_id[3:0]);
  assign if_err_clr = io_wr && io_addr == 8'h66 && io_wdata[3];

  always_comb begin
    pick = '0; any = 1'b0;
    for (int i = NCH - 1; i >= 0; i--) if (pend[i]) begin pick = CW'(i); any = 1'b1; end
  end

  // settings registers (kept while the DMA is disabled)
  always_ff @(posedge clk) begin
    if (rst) begin
      en <= 1'b0; ptr <= '0; p28 <= '0; swap_en <= '0; bterm <= '0;
      for (int i = 0; i < NCH; i++) next_pg[i] <= '0;
    end else if (io_wr) begin
      case (io_addr)
        8'h66: begin ptr <= io_wdata[7:4]; en <= io_wdata[0]; end
        8'h68: next_pg[ptr][7:0]  <= io_wdata;
        8'h69: next_pg[ptr][15:8] <= io_wdata;
        8'h70: p28[7:0]      <= io_wdata;
        8'h71: p28[15:8]     <= io_wdata;
        8'h72: swap_en[7:0]  <= io_wdata;
        8'h73: swap_en[15:8] <= io_wdata;
        8'h74: bterm[7:0]    <= io_wdata;
        8'h75: bterm[15:8]   <= io_wdata;
        default: ;
      endcase
    end
  end

  // channel engines
  always_ff @(posedge clk) begin
    if (rst || !en) begin
      for (int i = 0; i < NCH; i++) begin
        cur_pg[i] <= {p28[i], next_pg[i]};
        idx[i] <= 10'(HDR_LW); half[i] <= '0; pend_d[i] <= '0; pend_a[i] <= '0;
        lbstat[i] <= '0;
      end
      half_v <= '0; oflow_cur <= '0; to_cur <= '0; odd_cur <= '0; swap_req <= '0; pend <= '0;
      swap_stat <= '0; oflow_flag <= '0; memto_flag <= '0;
      busy <= 1'b0; bch <= '0; mreq <= '0;
    end else begin
      if (io_wr && io_addr == 8'h66 && io_wdata[2]) begin oflow_flag <= '0; memto_flag <= '0; end
      if (io_wr && io_addr == 8'h66 && io_wdata[1]) swap_stat <= '0;

      // memory port
      if (busy && mrsp.ack) begin
        busy <= 1'b0; mreq.req <= 1'b0; pend[bch] <= 1'b0;
      end else if (!busy && any) begin
        busy <= 1'b1; bch <= pick;
        mreq <= '{req: 1'b1, we: 1'b1, size4: 1'b1, addr: pend_a[pick], wdata: pend_d[pick]};
      end

      for (int i = 0; i < NCH; i++) begin
        if (swap_en[i] && (bterm[i] ? tick_1hz : tick_128hz)) swap_req[i] <= 1'b1;
        if (dsel && wch == CW'(i)) begin
          if (!oflow_cur[i]) begin
            if (!half_v[i]) begin
              half[i] <= w_data; half_v[i] <= 1'b1;
            end else begin
              half_v[i] <= 1'b0;
              if (pend[i] && !(busy && mrsp.ack && bch == CW'(i))) begin
                to_cur[i] <= 1'b1; memto_flag[i] <= 1'b1;
              end
              pend[i]   <= 1'b1;
              pend_d[i] <= {half[i], w_data};
              pend_a[i] <= {cur_pg[i], idx[i], 2'b00};
              if (idx[i] == 10'h3FF) begin
                oflow_cur[i] <= 1'b1; oflow_flag[i] <= 1'b1;
              end else idx[i] <= idx[i] + 10'd1;
            end
          end
        end else if (swap_req[i] && !(swap_en[i] && (bterm[i] ? tick_1hz : tick_128hz))) begin
          if (half_v[i]) begin
            // pad the odd word once the channel's slot is free
            if (!pend[i] || (busy && mrsp.ack && bch == CW'(i))) begin
              half_v[i]  <= 1'b0;
              odd_cur[i] <= 1'b1;
              pend[i]    <= 1'b1;
              pend_d[i]  <= {half[i], 16'h0000};
              pend_a[i]  <= {cur_pg[i], idx[i], 2'b00};
              if (idx[i] == 10'h3FF) begin
                oflow_cur[i] <= 1'b1; oflow_flag[i] <= 1'b1;
              end else idx[i] <= idx[i] + 10'd1;
            end
          end else if (!pend[i] || (busy && mrsp.ack && bch == CW'(i))) begin
            lbstat[i]    <= {1'b1, to_cur[i], oflow_cur[i], odd_cur[i], idx[i], 2'b00};
            cur_pg[i]    <= {p28[i], next_pg[i]};
            idx[i]       <= 10'(HDR_LW);
            oflow_cur[i] <= 1'b0; to_cur[i] <= 1'b0; odd_cur[i] <= 1'b0;
            swap_req[i]  <= 1'b0;
            swap_stat[i] <= 1'b1;
          end
        end
      end
      // the BufSwap bit of the last-status word clears with the swap status
      if (io_wr && io_addr == 8'h66 && io_wdata[1])
        for (int i = 0; i < NCH; i++) lbstat[i][15] <= 1'b0;
    end
  end

  assign ptr_addr = {cur_pg[ptr], idx[ptr], 2'b00};

  always_comb begin
    case (io_addr)
      8'h66:   io_rdata = {ptr, 3'b0, en};
      8'h67:   io_rdata = {4'b0, if_err};
      8'h68:   io_rdata = next_pg[ptr][7:0];
      8'h69:   io_rdata = next_pg[ptr][15:8];
      8'h6A:   io_rdata = {ptr_addr[7:2], 2'b00};
      8'h6B:   io_rdata = ptr_addr[15:8];
      8'h6C:   io_rdata = ptr_addr[23:16];
      8'h6D:   io_rdata = {3'b0, ptr_addr[28:24]};
      8'h6E:   io_rdata = lbstat[ptr][7:0];
      8'h6F:   io_rdata = lbstat[ptr][15:8];
      8'h70:   io_rdata = p28[7:0];
      8'h71:   io_rdata = p28[15:8];
      8'h72:   io_rdata = swap_en[7:0];
      8'h73:   io_rdata = swap_en[15:8];
      8'h74:   io_rdata = bterm[7:0];
      8'h75:   io_rdata = bterm[15:8];
      8'h76:   io_rdata = swap_stat[7:0];
      8'h77:   io_rdata = swap_stat[15:8];
      8'h78:   io_rdata = oflow_flag[7:0];
      8'h79:   io_rdata = oflow_flag[15:8];
      8'h7A:   io_rdata = memto_flag[7:0];
      8'h7B:   io_rdata = memto_flag[15:8];
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
