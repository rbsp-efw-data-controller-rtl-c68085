// mbus_ctl: controller of the 8-bit CPU memory bus (MBUS) that carries the
// SRAM, EEPROM, boot ROM and housekeeping-ADC buffers. The CPU normally owns
// the bus; the DMA engines (DFB, S/C command, S/C telemetry, FLASH, in that
// priority, all below the CPU) get slots between CPU cycles through a
// fixed-priority arbiter and the CPU waits while a DMA access runs. A DMA
// longword (size4) is run as four byte cycles at addr..addr+3, byte 0 in
// bits 31:24; a byte request as one cycle. Each byte cycle takes one SCLK
// cycle plus the device's wait states (CPU side only: 3 for ROM/EEPROM/ADC,
// 0 for SRAM). DMA writes below SRAM address 0x8000 are never performed; they
// end with err and pulse dma_lh_err. DMA addresses outside the 128 KB SRAM
// end as null cycles (err, no chip select). A CPU request with no chip select
// (null cycle) ends in one cycle. cyc_type drives the debug MBUSCYCTYPE
// lines: bit 3 read, bit 2 CPU, bits 1:0 client (DMA: DFB, TLM, FSH, CMD) or
// device (CPU: SRAM, PROM, EEPROM, other). Priorities and the debug encoding
// are the specification's; timing and port shapes are this design's.
module mbus_ctl (
  input  logic                    clk,
  input  logic                    rst,
  // CPU side, already decoded by cpu_mem_map
  input  logic                    cpu_req,
  input  logic                    cpu_we,
  input  logic [16:0]             cpu_addr,
  input  logic [7:0]              cpu_wdata,
  input  logic [3:0]              cpu_cs,     // {adc, rom, eeprom, sram}; none = null cycle
  input  logic [1:0]              cpu_ws,
  output logic                    cpu_ack,
  output logic [7:0]              cpu_rdata,
  // DMA clients: 0 DFB, 1 CMD, 2 TLM, 3 FLASH
  input  dcb_pkg::mem_req_t       dreq [4],
  output dcb_pkg::mem_rsp_t       drsp [4],
  output logic                    dma_lh_err,
  // the bus
  output logic [16:0]             mb_addr,
  output logic [7:0]              mb_wdata,
  input  logic [7:0]              mb_rdata,
  output logic                    mb_we,
  output logic                    mb_cs_ram,
  output logic                    mb_cs_nvram,
  output logic                    mb_cs_rom,
  output logic                    mb_cs_adc,
  output logic [3:0]              cyc_type
);
  import dcb_pkg::*;
  logic [4:0] req, gnt;
  logic       done;
  logic [1:0] bcnt;        // byte of a longword
  logic [1:0] ws;
  logic       act;
  logic [2:0] cl;          // granted client, 0 = CPU
  logic [28:0] a;
  logic [31:0] acc;
  logic       bad;
  logic [1:0] dc;
  mem_req_t   r;
  logic       drsp_err_q;
  logic       lh_now, lh_q;    // protected low-half write seen in this access

  assign dc = 2'(cl - 3'd1);
  assign r  = dreq[dc];

  // a client drops its request the cycle after its ack, so the ack masks it
  assign req = {dreq[3].req & ~drsp[3].ack, dreq[2].req & ~drsp[2].ack,
                dreq[1].req & ~drsp[1].ack, dreq[0].req & ~drsp[0].ack, cpu_req & ~cpu_ack};

  prio_arbiter #(.N(5)) u_arb (.clk, .rst, .req, .done, .gnt);

  always_comb begin
    cl = 3'd0;
    for (int i = 4; i >= 0; i--) if (gnt[i]) cl = 3'(i);
  end

  // address and validity of the current byte
  always_comb begin
    a = '0; bad = 1'b0;
    if (cl != 3'd0) begin
      a   = r.addr + 29'(bcnt);
      bad = (a[28:17] != '0) || (r.we && a[16:15] == 2'b00);
    end
  end

  assign act = |gnt;

  always_comb begin
    mb_addr = '0; mb_wdata = '0; mb_we = 1'b0;
    mb_cs_ram = 1'b0; mb_cs_nvram = 1'b0; mb_cs_rom = 1'b0; mb_cs_adc = 1'b0;
    cyc_type = 4'b0100;
    if (gnt[0]) begin
      mb_addr = cpu_addr; mb_wdata = cpu_wdata; mb_we = cpu_we;
      {mb_cs_adc, mb_cs_rom, mb_cs_nvram, mb_cs_ram} = cpu_cs;
      cyc_type = {~cpu_we, 1'b1, (cpu_cs[1] ? 2'b10 : cpu_cs[2] ? 2'b01 : cpu_cs[0] ? 2'b00 : 2'b11)};
    end else if (act) begin
      mb_addr   = a[16:0];
      mb_we     = r.we;
      mb_wdata  = r.size4 ? r.wdata[31 - 8*bcnt -: 8]
                                        : r.wdata[7:0];
      mb_cs_ram = !bad;
      case (cl)
        3'd1:    cyc_type = {~mb_we, 1'b0, 2'b00};
        3'd2:    cyc_type = {~mb_we, 1'b0, 2'b11};
        3'd3:    cyc_type = {~mb_we, 1'b0, 2'b01};
        default: cyc_type = {~mb_we, 1'b0, 2'b10};
      endcase
    end
  end

  always_comb begin
    done = 1'b0;
    if (gnt[0]) done = (ws == cpu_ws);
    else if (act) done = !r.size4 || bcnt == 2'd3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt <= '0; ws <= '0; acc <= '0; cpu_ack <= 1'b0; cpu_rdata <= '0; dma_lh_err <= 1'b0;
      for (int i = 0; i < 4; i++) drsp[i] <= '0;
    end else begin
      cpu_ack <= 1'b0; dma_lh_err <= 1'b0;
      for (int i = 0; i < 4; i++) drsp[i].ack <= 1'b0;
      if (gnt[0]) begin
        if (done) begin
          ws <= '0; cpu_ack <= 1'b1; cpu_rdata <= (|cpu_cs) ? mb_rdata : 8'h00;
        end else ws <= ws + 2'd1;
      end else if (act) begin
        if (done) begin
          dma_lh_err     <= lh_now || lh_q;
          bcnt <= '0;
          drsp[dc].ack   <= 1'b1;
          drsp[dc].err   <= bad || drsp_err_q;
          drsp[dc].rdata <= r.size4 ? {acc[31:8], mb_rdata} : {24'b0, mb_rdata};
        end else begin
          bcnt <= bcnt + 2'd1;
          acc[31 - 8*bcnt -: 8] <= mb_rdata;
        end
      end
    end
  end

  // an error on any byte of a longword marks the whole access
  assign lh_now = act && !gnt[0] && bad && r.we && a[28:15] == '0;
  always_ff @(posedge clk) begin
    if (rst || done) begin drsp_err_q <= 1'b0; lh_q <= 1'b0; end
    else begin
      if (act && !gnt[0] && bad) drsp_err_q <= 1'b1;
      if (lh_now) lh_q <= 1'b1;
    end
  end
endmodule
