// sdram_mgr: the SDRAM manager - client arbitration, error correction and
// the scrubber in front of sdram_ctl.
// Clients, highest priority first: DFB-DMA, TLM-DMA, CPU, scrubber,
// FLASH-DMA (fixed priority, one access at a time). Addresses are byte
// addresses within the 256 MB module. With ECC enabled (0x30 bit 0) the upper
// quarter (0xC000000 up) holds one check byte per data longword at
// 0xC000000 + (addr >> 2): bits 6:0 the ecc_secded32 check bits, bit 7 the
// tag "validated". For other clients:
//  - any access to the upper quarter is not performed (read data 0, err)
//    and sets ScrubCSErrDet;
//  - a write also writes the check byte: tag cleared, or in scrubber test
//    mode (0x30 bit 1) a CPU write stores the jam byte of register 0x33;
//  - a longword read also reads the check byte: tag set - a single-bit error
//    is corrected in the returned data and counted, a multi-bit error
//    counted; tag clear, or no full scrub pass yet (ECCSTATE 0, so the tags
//    may still hold power-up contents) - the check byte is computed and
//    written with the tag.
// The scrubber reads longword after longword of the lower SCRUB_LW longwords,
// one per period (0x30 bits 3:2: 128 cycles = 7.63 us, 4194 = 250 us,
// 33554 = 2 ms, or one per write to 0x32 "on demand") and goes through the
// same read path; once it has been round the region ECCSTATE is set, and from
// then on a single-bit error it finds is also written back corrected. Error
// counters (0x31 single, 0x32 multi) saturate at 255 and clear when a new
// scrub pass starts. 0x34-0x36 and 0x30 bits 5:4 show the scrubber address,
// 0x37 the last check byte it read. An access while SDRAM is not active
// returns err and pulses sdram_null. Behaviour follows the specification;
// the code, check-byte address formula and timings are this design's.
module sdram_mgr #(
  parameter int unsigned SCRUB_LW = 50331648,
  parameter int unsigned P0 = 128,
  parameter int unsigned P1 = 4194,
  parameter int unsigned P2 = 33554
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        io_addr,
  input  logic              io_wr,
  input  logic [7:0]        io_wdata,
  output logic [7:0]        io_rdata,
  input  logic              pwr_on,
  // clients: 0 DFB, 1 TLM, 2 CPU, 3 FLASH
  input  dcb_pkg::mem_req_t creq [4],
  output dcb_pkg::mem_rsp_t crsp [4],
  output logic              sdram_null,
  // to sdram_ctl
  output logic              op_req,
  output logic              op_we,
  output logic              op_size4,
  output logic [27:0]       op_addr,
  output logic [31:0]       op_wdata,
  input  logic              op_ack,
  input  logic              op_null,
  input  logic [31:0]       op_rdata
);
  import dcb_pkg::*;
  typedef enum logic [2:0] {IDLE, DATA, CHK_WR, CHK_RD, TAG_WR, FIX_WR, RESP} state_t;
  state_t     st;
  logic [3:0] ctl;
  logic       eccstate, cserr;
  logic [7:0] sbcnt, mbcnt, jam, ckrd;
  logic [25:0] sptr;
  logic [15:0] ptimer;
  logic       sreq, ondemand;
  logic [4:0] req, gnt;
  logic       adone;
  logic [2:0] g;               // granted: 0 DFB 1 TLM 2 CPU 3 scrubber 4 FLASH
  mem_req_t   r;
  logic [31:0] dat;
  logic [7:0] ck;
  logic       is_scrub, is_cpu, err_q;
  logic [6:0] ck_calc;
  logic [31:0] d_corr;
  logic       sb, mb;
  logic [15:0] period;

  // a client drops its request the cycle after its ack, so the ack masks it
  assign req = {creq[3].req & ~crsp[3].ack, sreq, creq[2].req & ~crsp[2].ack,
                creq[1].req & ~crsp[1].ack, creq[0].req & ~crsp[0].ack};
  prio_arbiter #(.N(5)) u_arb (.clk, .rst, .req, .done(adone), .gnt);

  always_comb begin
    g = 3'd0;
    for (int i = 4; i >= 0; i--) if (gnt[i]) g = 3'(i);
    case (g)
      3'd0: r = creq[0];
      3'd1: r = creq[1];
      3'd2: r = creq[2];
      3'd3: r = '{req: sreq, we: 1'b0, size4: 1'b1, addr: {1'b1, sptr[25:0], 2'b00}, wdata: '0};
      default: r = creq[3];
    endcase
  end
  assign is_scrub = (g == 3'd3);
  assign is_cpu   = (g == 3'd2);

  ecc_secded32 u_ecc (.data_in(dat), .check_in(ck[6:0]), .check_out(ck_calc),
    .data_out(d_corr), .sb_err(sb), .mb_err(mb));

  always_comb begin
    case (ctl[3:2])
      2'd0:    period = 16'(P0 - 1);
      2'd1:    period = 16'(P1 - 1);
      default: period = 16'(P2 - 1);
    endcase
  end

  assign adone = (st == RESP);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; ctl <= '0; eccstate <= 1'b0; cserr <= 1'b0; sbcnt <= '0; mbcnt <= '0;
      jam <= '0; ckrd <= '0; sptr <= '0; ptimer <= '0; sreq <= 1'b0; ondemand <= 1'b0;
      dat <= '0; ck <= '0; err_q <= 1'b0; sdram_null <= 1'b0;
      op_req <= 1'b0; op_we <= 1'b0; op_size4 <= 1'b0; op_addr <= '0; op_wdata <= '0;
      for (int i = 0; i < 4; i++) crsp[i] <= '0;
    end else begin
      sdram_null <= 1'b0;
      for (int i = 0; i < 4; i++) crsp[i].ack <= 1'b0;
      // registers
      if (io_wr) begin
        case (io_addr)
          8'h30: ctl <= io_wdata[3:0];
          8'h31: cserr <= 1'b0;
          8'h32: ondemand <= 1'b1;
          8'h33: jam <= io_wdata;
          default: ;
        endcase
      end
      if (!pwr_on) cserr <= 1'b0;
      // scrubber pacing
      if (!ctl[0]) begin
        ptimer <= '0; sreq <= 1'b0; ondemand <= 1'b0;
      end else if (!sreq) begin
        if (ctl[3:2] == 2'd3) begin
          if (ondemand) begin sreq <= 1'b1; ondemand <= 1'b0; end
        end else if (ptimer >= period) begin
          ptimer <= '0; sreq <= 1'b1;
        end else ptimer <= ptimer + 16'd1;
      end

      case (st)
        IDLE: if (gnt != '0) begin
          err_q <= 1'b0;
          if (ctl[0] && !is_scrub && r.addr[27:26] == 2'b11) begin
            cserr <= 1'b1; err_q <= 1'b1; dat <= '0; st <= RESP;
          end else begin
            op_req <= 1'b1; op_we <= r.we; op_size4 <= r.size4; op_addr <= r.addr[27:0];
            op_wdata <= r.wdata; st <= DATA;
          end
        end
        DATA: if (op_ack) begin
          op_req <= 1'b0;
          dat    <= op_rdata;
          if (op_null) begin
            sdram_null <= 1'b1; err_q <= 1'b1; st <= RESP;
          end else if (ctl[0] && r.we) begin
            op_req <= 1'b1; op_we <= 1'b1; op_size4 <= 1'b0; op_addr <= {2'b11, r.addr[27:2]};
            op_wdata <= {24'b0, (is_cpu && ctl[1]) ? jam : 8'h00};
            st <= CHK_WR;
          end else if (ctl[0] && r.size4) begin
            op_req <= 1'b1; op_we <= 1'b0; op_size4 <= 1'b0; op_addr <= {2'b11, r.addr[27:2]};
            st <= CHK_RD;
          end else st <= RESP;
        end
        CHK_WR: if (op_ack) begin op_req <= 1'b0; st <= RESP; end
        CHK_RD: if (op_ack) begin
          op_req <= 1'b0;
          ck <= op_rdata[7:0];
          if (is_scrub) ckrd <= op_rdata[7:0];
          st <= FIX_WR;     // decide next cycle, once ck is loaded
        end
        FIX_WR: begin
          if (!op_req) begin
            // before the first full scrub pass the tags are power-up garbage
            if (!ck[7] || !eccstate) begin
              op_req <= 1'b1; op_we <= 1'b1; op_size4 <= 1'b0; op_addr <= {2'b11, r.addr[27:2]};
              op_wdata <= {24'b0, 1'b1, ck_calc};
              st <= TAG_WR;
            end else begin
              if (sb && sbcnt != 8'hFF) sbcnt <= sbcnt + 8'd1;
              if (mb && mbcnt != 8'hFF) mbcnt <= mbcnt + 8'd1;
              dat <= d_corr;
              if (sb && is_scrub && eccstate) begin
                op_req <= 1'b1; op_we <= 1'b1; op_size4 <= 1'b1; op_addr <= r.addr[27:0];
                op_wdata <= d_corr;
              end else st <= RESP;
            end
          end else if (op_ack) begin op_req <= 1'b0; st <= RESP; end
        end
        TAG_WR: if (op_ack) begin op_req <= 1'b0; st <= RESP; end
        RESP: begin
          st <= IDLE;
          if (is_scrub) begin
            sreq <= 1'b0;
            if (!err_q) begin
              if (sptr == 26'(SCRUB_LW - 1)) begin
                sptr <= '0; eccstate <= 1'b1; sbcnt <= '0; mbcnt <= '0;
              end else sptr <= sptr + 26'd1;
            end
          end else begin
            crsp[g == 3'd4 ? 2'd3 : 2'(g)] <= '{ack: 1'b1, err: err_q, rdata: dat};
          end
        end
        default: st <= IDLE;
      endcase
      if (!pwr_on) eccstate <= 1'b0;
    end
  end

  always_comb begin
    case (io_addr)
      8'h30:   io_rdata = {eccstate, cserr, 2'(sptr[25:24]), ctl};
      8'h31:   io_rdata = sbcnt;
      8'h32:   io_rdata = mbcnt;
      8'h33:   io_rdata = jam;
      8'h34:   io_rdata = sptr[7:0];
      8'h35:   io_rdata = sptr[15:8];
      8'h36:   io_rdata = sptr[23:16];
      8'h37:   io_rdata = ckrd;
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
