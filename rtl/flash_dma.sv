// flash_dma: the FLASH DMA (PAGEXFER) and the CPU's memory-mapped diagnostic
// access to the FLASH I/O lines.
// A transfer moves pages FSH_SRT_PA..FSH_END_PA of one block (FSH_BA) of one
// die (FSH_CS) between FLASH and SRAM or SDRAM (FDMAMPage[28]) starting at
// memory page FDMAMPage[27:12] (plus 2 KB if FDMAMPage[11]); memory advances
// 2 KB per FLASH page. If END < START it runs to page 0x3F. Sequence: RESET
// (0xFF) and wait ready; per page, read: 00h, 5 address bytes, 30h, wait
// ready, read 2048 data bytes + spare bytes 0x800..0x83D; write: 80h, 5
// address bytes, 2048 data bytes, spare (0xFF up to 0x82F, ECC tag 0x42 at
// 0x830, 12 check bytes 0x831..0x83C, their XOR parity at 0x83D), 10h, wait
// ready, 70h and read the status byte (bit 0 = program failure).
// ECC: four flash_ecc segments of 512 bytes. On read with ECC enabled (0xA2
// bit 0), a valid tag and good check-byte parity, a single data-bit error is
// corrected in memory by a read-modify-write of its longword; correctable and
// uncorrectable errors are counted (8-bit, saturating, 0xC0/0xC1, cleared by
// writing 0xC0). Errors: ready not seen within TIMEOUT cycles (4 ms) sets the
// timeout flag, a failed program sets the programming-failure flag; each halts
// the transfer unless its override bit (0xA2 bits 6/7) is set. A register
// write or start during a transfer sets the interface-error flag and is
// ignored. done pulses when a transfer ends (FLASH interrupt). Throttle (0xA2
// bit 5) waits THROTTLE cycles (700 ns) after every memory access.
// Diagnostic mode (mode_dma = 0): a CPU access to the FLASH region becomes
// one bus cycle, address bits 2:0 the chip enable, bit 4 CLE, bit 5 ALE.
// Bus cycle: one setup cycle, two cycles with WE#/RE# low, one hold cycle.
// Registers, sequence, limits and ECC layout follow the specification; the
// parity byte position (0x83D) and the bus timing are this design's reading.
module flash_dma #(
  parameter int unsigned TIMEOUT  = 67109,
  parameter int unsigned THROTTLE = 12,
  parameter int unsigned PAGE_BYTES = 2048
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        io_addr,
  input  logic              io_wr,
  input  logic [7:0]        io_wdata,
  output logic [7:0]        io_rdata,
  input  logic              mode_dma,
  input  logic              active,
  // CPU diagnostic access
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [5:0]        cpu_addr,
  input  logic [7:0]        cpu_wdata,
  output logic              cpu_ack,
  output logic [7:0]        cpu_rdata,
  // memory
  output dcb_pkg::mem_req_t mreq,
  input  dcb_pkg::mem_rsp_t mrsp,
  // FLASH bus
  output logic [7:0]        f_ce_n,
  output logic              f_cle,
  output logic              f_ale,
  output logic              f_we_n,
  output logic              f_re_n,
  output logic [7:0]        f_io_out,
  output logic              f_io_oe,
  input  logic [7:0]        f_io_in,
  input  logic              f_rb_n,
  output logic              busy,
  output logic              done
);
  import dcb_pkg::*;
  localparam int unsigned SPARE_END = PAGE_BYTES + 62;   // one past 0x83D

  typedef enum logic [4:0] {
    IDLE, RST_CMD, RST_WAIT, PG_CMD, PG_ADDR, RD_CONF, RD_WAIT, RD_DATA, RD_MEMW,
    FIX_RD, FIX_WR, WR_FETCH, WR_DATA, WR_CONF, WR_WAIT, ST_CMD, ST_RD, PG_NEXT,
    THROT, DIAG, FINISH
  } state_t;

  // registers
  logic [7:0]  opctl;
  logic [5:0]  srt_pa, end_pa, cur_pa;
  logic [11:0] ba;
  logic [2:0]  fcs;
  logic [15:0] mpg;
  logic        pferr, toerr, iferr;
  logic [7:0]  fstat, corcnt, nccnt;

  state_t      st, ret;
  logic [11:0] bidx;             // byte in page incl. spare
  logic [2:0]  acyc;               // address cycle
  logic [31:0] lw;
  logic [26:0] tcnt;
  logic [5:0]  npg;              // pages done
  logic [7:0]  spare [14];       // 0x830..0x83D as read
  logic [1:0]  fseg;             // segment being fixed
  logic        in_xfer;

  // bus-cycle engine
  logic        op_go, op_done, op_cle, op_ale, op_rd;
  logic [7:0]  op_byte, op_ce_n, rbyte;
  logic [1:0]  ph;
  logic        op_act;

  always_ff @(posedge clk) begin
    if (rst) begin
      op_act <= 1'b0; ph <= '0; op_done <= 1'b0; rbyte <= '0;
    end else begin
      op_done <= 1'b0;
      if (op_go && !op_act) begin op_act <= 1'b1; ph <= '0; end
      else if (op_act) begin
        ph <= ph + 2'd1;
        if (ph == 2'd2 && op_rd) rbyte <= f_io_in;
        if (ph == 2'd3) begin op_act <= 1'b0; op_done <= 1'b1; end
      end
    end
  end
  assign f_ce_n   = op_act ? op_ce_n : 8'hFF;
  assign f_cle    = op_act && op_cle;
  assign f_ale    = op_act && op_ale;
  assign f_we_n   = !(op_act && !op_rd && (ph == 2'd1 || ph == 2'd2));
  assign f_re_n   = !(op_act && op_rd && (ph == 2'd1 || ph == 2'd2));
  assign f_io_out = op_byte;
  assign f_io_oe  = op_act && !op_rd;

  // ECC segments
  logic [23:0] e_calc [4];
  logic [23:0] e_ref  [4];
  logic [3:0]  e_none, e_corr, e_data, e_unc;
  logic [8:0]  e_byte [4];
  logic [2:0]  e_bit  [4];
  logic        data_byte_v;
  logic [7:0]  data_byte;
  logic [7:0]  ckpar;
  logic        tag_ok, par_ok, ecc_en;

  for (genvar g = 0; g < 4; g++) begin : g_ecc
    flash_ecc #(.SEG_BYTES(PAGE_BYTES / 4)) u_ecc (.clk, .rst, .clr(st == PG_CMD),
      .byte_v(data_byte_v && bidx[10:9] == 2'(g)), .byte_in(data_byte), .ecc_ref(e_ref[g]),
      .ecc(e_calc[g]), .err_none(e_none[g]), .err_corr(e_corr[g]), .err_data(e_data[g]),
      .err_uncorr(e_unc[g]), .err_byte(e_byte[g]), .err_bit(e_bit[g]));
    assign e_ref[g] = {spare[1 + 3*g], spare[2 + 3*g], spare[3 + 3*g]};
  end

  assign ecc_en = opctl[0];
  always_comb begin
    ckpar = '0;
    for (int i = 1; i <= 12; i++) ckpar ^= spare[i];
  end
  assign tag_ok = (spare[0] == 8'h42);
  assign par_ok = (ckpar == spare[13]);

  // byte sent during a write-page data phase
  logic [7:0] wr_byte;
  logic [23:0] e_w;
  always_comb begin
    e_w = e_calc[(bidx - 12'(PAGE_BYTES + 49)) / 3];
    if (bidx < 12'(PAGE_BYTES)) wr_byte = lw[31 - 8*bidx[1:0] -: 8];
    else if (bidx < 12'(PAGE_BYTES + 48)) wr_byte = 8'hFF;
    else if (bidx == 12'(PAGE_BYTES + 48)) wr_byte = 8'h42;
    else if (bidx == 12'(PAGE_BYTES + 61)) begin
      wr_byte = 8'h00;
      for (int g = 0; g < 4; g++) wr_byte ^= e_calc[g][23:16] ^ e_calc[g][15:8] ^ e_calc[g][7:0];
    end else case ((bidx - 12'(PAGE_BYTES + 49)) % 3)
      0:       wr_byte = e_w[23:16];
      1:       wr_byte = e_w[15:8];
      default: wr_byte = e_w[7:0];
    endcase
  end

  assign data_byte   = (st == RD_DATA) ? rbyte : wr_byte;
  assign data_byte_v = (bidx < 12'(PAGE_BYTES)) &&
                       ((st == RD_DATA && op_done) || (st == WR_DATA && op_done));

  // memory address of byte bidx of the current page
  logic [27:0] moff;
  logic [28:0] maddr;
  assign moff  = {mpg, opctl[1], 11'b0} + {11'b0, npg, 11'b0} + {16'b0, bidx[10:2], 2'b00};
  assign maddr = opctl[2] ? {1'b1, moff} : {12'b0, moff[16:0]};

  logic start_w, reg_w;
  assign reg_w   = io_wr && (io_addr inside {[8'hA2:8'hA6], 8'hA8, 8'hA9});
  assign start_w = io_wr && io_addr == 8'hA7 && io_wdata[0];
  assign busy    = in_xfer;
  logic [5:0] last_pa;
  assign last_pa = (end_pa < srt_pa) ? 6'h3F : end_pa;

  always_ff @(posedge clk) begin
    if (rst) begin
      opctl <= '0; srt_pa <= '0; end_pa <= '0; ba <= '0; fcs <= '0; mpg <= '0;
      pferr <= 1'b0; toerr <= 1'b0; iferr <= 1'b0; fstat <= '0; corcnt <= '0; nccnt <= '0;
      st <= IDLE; ret <= IDLE; bidx <= '0; acyc <= '0; lw <= '0; tcnt <= '0; npg <= '0; cur_pa <= '0;
      fseg <= '0; in_xfer <= 1'b0; done <= 1'b0; mreq <= '0; cpu_ack <= 1'b0; cpu_rdata <= '0;
      op_go <= 1'b0; op_cle <= 1'b0; op_ale <= 1'b0; op_rd <= 1'b0; op_byte <= '0; op_ce_n <= '1;
      for (int i = 0; i < 14; i++) spare[i] <= '0;
    end else begin
      done <= 1'b0; cpu_ack <= 1'b0; op_go <= 1'b0;
      // register interface
      if (io_wr && io_addr == 8'hA7) begin
        if (io_wdata[3]) pferr <= 1'b0;
        if (io_wdata[2]) toerr <= 1'b0;
        if (io_wdata[1]) iferr <= 1'b0;
      end
      if (io_wr && io_addr == 8'hC0) begin corcnt <= '0; nccnt <= '0; end
      if ((reg_w || start_w) && in_xfer) iferr <= 1'b1;
      else if (reg_w) begin
        case (io_addr)
          8'hA2: opctl <= io_wdata;
          8'hA3: srt_pa <= io_wdata[5:0];
          8'hA4: end_pa <= io_wdata[5:0];
          8'hA5: ba[7:0] <= io_wdata;
          8'hA6: begin ba[11:8] <= io_wdata[3:0]; fcs <= io_wdata[6:4]; end
          8'hA8: mpg[7:0] <= io_wdata;
          8'hA9: mpg[15:8] <= io_wdata;
          default: ;
        endcase
      end

      case (st)
        IDLE: begin
          if (start_w && mode_dma && active) begin
            in_xfer <= 1'b1; npg <= '0; cur_pa <= srt_pa; st <= RST_CMD;
          end else if (start_w) begin
            done <= 1'b1;           // nothing to do: not active or not in DMA mode
            iferr <= 1'b1;
          end else if (cpu_req && !mode_dma && !cpu_ack) begin
            op_go <= 1'b1; op_rd <= !cpu_we; op_cle <= cpu_addr[4]; op_ale <= cpu_addr[5];
            op_byte <= cpu_wdata; op_ce_n <= ~(8'd1 << cpu_addr[2:0]); st <= DIAG;
          end
        end
        DIAG: if (op_done) begin cpu_ack <= 1'b1; cpu_rdata <= rbyte; st <= IDLE; end
        RST_CMD: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b1; op_ale <= 1'b0; op_byte <= 8'hFF;
            op_ce_n <= ~(8'd1 << fcs);
          end
          if (op_done) begin st <= RST_WAIT; tcnt <= '0; ret <= PG_CMD; end
        end
        RST_WAIT, RD_WAIT, WR_WAIT: begin
          tcnt <= tcnt + 27'd1;
          if (tcnt >= 27'd4 && f_rb_n) st <= ret;
          else if (tcnt == 27'(TIMEOUT)) begin
            toerr <= 1'b1;
            st <= opctl[6] ? ret : FINISH;
          end
        end
        PG_CMD: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b1; op_ale <= 1'b0;
            op_byte <= opctl[3] ? 8'h80 : 8'h00;
          end
          if (op_done) begin st <= PG_ADDR; acyc <= '0; end
        end
        PG_ADDR: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b0; op_ale <= 1'b1;
            case (acyc)
              3'd0, 3'd1: op_byte <= 8'h00;
              3'd2:    op_byte <= {ba[1:0], cur_pa};
              3'd3:    op_byte <= ba[9:2];
              default: op_byte <= {6'b0, ba[11:10]};
            endcase
          end
          if (op_done) begin
            if (acyc == 3'd4) begin
              bidx <= '0;
              st <= opctl[3] ? WR_FETCH : RD_CONF;
            end else acyc <= acyc + 3'd1;
          end
        end
        RD_CONF: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b1; op_ale <= 1'b0; op_byte <= 8'h30;
          end
          if (op_done) begin st <= RD_WAIT; tcnt <= '0; ret <= RD_DATA; end
        end
        RD_DATA: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b1; op_cle <= 1'b0; op_ale <= 1'b0;
          end
          if (op_done) begin
            if (bidx < 12'(PAGE_BYTES)) begin
              lw[31 - 8*bidx[1:0] -: 8] <= rbyte;
              if (bidx[1:0] == 2'd3) begin
                st <= RD_MEMW;
                mreq <= '{req: 1'b1, we: 1'b1, size4: 1'b1, addr: maddr, wdata: {lw[31:8], rbyte}};
              end
            end else if (bidx >= 12'(PAGE_BYTES + 48)) spare[4'(bidx - 12'(PAGE_BYTES + 48))] <= rbyte;
            bidx <= bidx + 12'd1;
            if (bidx == 12'(SPARE_END - 1)) begin st <= PG_NEXT; fseg <= '0; end
          end
        end
        RD_MEMW: if (mrsp.ack) begin
          mreq.req <= 1'b0;
          ret <= RD_DATA; st <= (opctl[5]) ? THROT : RD_DATA; tcnt <= '0;
        end
        THROT: begin
          tcnt <= tcnt + 27'd1;
          if (tcnt == 27'(THROTTLE - 1)) st <= ret;
        end
        WR_FETCH: begin
          if (!mreq.req) mreq <= '{req: 1'b1, we: 1'b0, size4: 1'b1, addr: maddr, wdata: '0};
          else if (mrsp.ack) begin
            mreq.req <= 1'b0; lw <= mrsp.rdata;
            ret <= WR_DATA; st <= opctl[5] ? THROT : WR_DATA; tcnt <= '0;
          end
        end
        WR_DATA: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b0; op_ale <= 1'b0; op_byte <= wr_byte;
          end
          if (op_done) begin
            bidx <= bidx + 12'd1;
            if (bidx == 12'(SPARE_END - 1)) st <= WR_CONF;
            else if (bidx < 12'(PAGE_BYTES - 1) && bidx[1:0] == 2'd3) st <= WR_FETCH;
          end
        end
        WR_CONF: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b1; op_ale <= 1'b0; op_byte <= 8'h10;
          end
          if (op_done) begin st <= WR_WAIT; tcnt <= '0; ret <= ST_CMD; end
        end
        ST_CMD: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b0; op_cle <= 1'b1; op_ale <= 1'b0; op_byte <= 8'h70;
          end
          if (op_done) st <= ST_RD;
        end
        ST_RD: begin
          if (!op_act && !op_go && !op_done) begin
            op_go <= 1'b1; op_rd <= 1'b1; op_cle <= 1'b0; op_ale <= 1'b0;
          end
          if (op_done) begin
            fstat <= rbyte;
            if (rbyte[0]) begin
              pferr <= 1'b1;
              st <= opctl[7] ? PG_NEXT : FINISH;
            end else st <= PG_NEXT;
          end
        end
        PG_NEXT: begin
          // ECC check of a page just read, one segment per pass
          if (!opctl[3] && ecc_en && tag_ok && !(fseg == 2'd3 && bidx == '0)) begin
            if (!par_ok) begin
              if (nccnt != 8'hFF) nccnt <= nccnt + 8'd1;
              bidx <= '0; fseg <= 2'd3;   // done with this page
            end else begin
              if (e_unc[fseg] && nccnt != 8'hFF) nccnt <= nccnt + 8'd1;
              if (e_corr[fseg] && corcnt != 8'hFF) corcnt <= corcnt + 8'd1;
              if (e_data[fseg]) begin
                bidx <= {1'b0, fseg, e_byte[fseg]};
                st   <= FIX_RD;
              end else if (fseg == 2'd3) bidx <= '0;
              else fseg <= fseg + 2'd1;
            end
          end else begin
            fseg <= '0; bidx <= 12'd1;
            npg <= npg + 6'd1;
            if (cur_pa == last_pa) st <= FINISH;
            else begin cur_pa <= cur_pa + 6'd1; st <= PG_CMD; end
          end
        end
        FIX_RD: begin
          if (!mreq.req) mreq <= '{req: 1'b1, we: 1'b0, size4: 1'b1, addr: maddr, wdata: '0};
          else if (mrsp.ack) begin
            mreq <= '{req: 1'b0, we: 1'b1, size4: 1'b1, addr: maddr,
                      wdata: mrsp.rdata ^ (32'd1 << (8 * (32'd3 - 32'(bidx[1:0])) + 32'(e_bit[fseg])))};
            st <= FIX_WR;
          end
        end
        FIX_WR: begin
          if (!mreq.req) mreq.req <= 1'b1;
          else if (mrsp.ack) begin
            mreq.req <= 1'b0;
            st <= PG_NEXT;
            if (fseg == 2'd3) bidx <= '0; else fseg <= fseg + 2'd1;
          end
        end
        FINISH: begin
          in_xfer <= 1'b0; done <= 1'b1; st <= IDLE; mreq <= '0;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    case (io_addr)
      8'hA2:   io_rdata = opctl;
      8'hA3:   io_rdata = {2'b0, srt_pa};
      8'hA4:   io_rdata = {2'b0, end_pa};
      8'hA5:   io_rdata = ba[7:0];
      8'hA6:   io_rdata = {1'b0, fcs, ba[11:8]};
      8'hA7:   io_rdata = {4'b0, pferr, toerr, iferr, in_xfer};
      8'hA8:   io_rdata = mpg[7:0];
      8'hA9:   io_rdata = mpg[15:8];
      8'hAA:   io_rdata = {2'b0, cur_pa};
      8'hAB:   io_rdata = fstat;
      8'hC0:   io_rdata = corcnt;
      8'hC1:   io_rdata = nccnt;
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
