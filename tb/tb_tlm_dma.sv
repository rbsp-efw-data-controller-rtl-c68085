// tb_tlm_dma: a buffer of random longwords is placed in a behavioural memory,
// the TLM DMA is configured (page, length, flags) and started. A behavioural
// UART receiver (odd parity) collects the frame, which must be: sync bytes,
// flags and message length, zero header index, the longwords in memory order
// and the 16-bit XOR checksum of the 16-bit words from byte 4 on. A second
// start during the frame must set BQERR, a 1PPS event during the frame
// BCERR, and done must pulse once per frame.
module tb_tlm_dma;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 1_000_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  localparam int D = 16;
  logic pps = 0, txd, done; mem_req_t mreq; mem_rsp_t mrsp;
  tlm_dma #(.DIV(12'(D))) dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .pps_evt(pps), .txd, .done, .mreq, .mrsp);
  logic [31:0] mem [logic [28:0]];
  int lat = 0;
  always @(posedge clk) begin
    mrsp.ack <= 0;
    if (mreq.req && !mrsp.ack && !rst) begin
      if (lat == 3) begin
        mrsp.ack <= 1; mrsp.rdata <= mem.exists(mreq.addr) ? mem[mreq.addr] : 32'hDEADBEEF;
        chk(!mreq.we && mreq.size4 && mreq.addr[1:0] == 0, "longword read");
        lat = 0;
      end else lat++;
    end
  end
  logic [7:0] rx [$]; int ndone = 0; int perr = 0;
  always @(posedge clk) if (done) ndone++;
  initial forever begin
    logic [7:0] b; logic p;
    @(negedge txd); repeat (D / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (D) @(posedge clk); b[i] = txd; end
    repeat (D) @(posedge clk); p = txd; if (p != ~^b) perr++;
    repeat (D) @(posedge clk);
    rx.push_back(b);
  end
  logic [7:0] r;
  task automatic frame(input logic [15:0] page, input int len, input logic [1:0] fl, input bit p28);
    logic [7:0] exp [$]; logic [15:0] cs; int ml, d0;
    for (int i = 0; i < len + 1; i++) mem[{p28, page, 10'(i), 2'b00}] = $urandom;
    rx.delete(); d0 = ndone;
    iow(8'h41, page[7:0]); iow(8'h42, page[15:8]); iow(8'h43, 8'(len)); iow(8'h44, 8'(len >> 8));
    iow(8'h40, {1'b0, p28, fl, 4'b0011});
    ml = 4 * (len + 1) + 4;
    exp = '{8'hFE, 8'hFA, 8'h30, 8'hC8, {fl[1], fl[0], 1'b0, 5'(ml >> 8)}, 8'(ml), 8'h00, 8'h00};
    for (int i = 0; i < len + 1; i++) begin
      logic [31:0] w; w = mem[{p28, page, 10'(i), 2'b00}];
      exp.push_back(w[31:24]); exp.push_back(w[23:16]); exp.push_back(w[15:8]); exp.push_back(w[7:0]);
    end
    cs = 0; for (int i = 4; i < exp.size(); i += 2) cs ^= {exp[i], exp[i + 1]};
    exp.push_back(cs[15:8]); exp.push_back(cs[7:0]);
    while (ndone == d0) @(negedge clk);
    repeat (12 * D) @(negedge clk);
    chk(rx.size() == exp.size(), $sformatf("frame length %0d expected %0d", rx.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < rx.size(); i++) chk(rx[i] == exp[i], $sformatf("byte %0d: %02x expected %02x", i, rx[i], exp[i]));
    chk(ndone == d0 + 1, "one done pulse");
  endtask
  initial begin
    mrsp = '0;
    repeat (3) @(negedge clk); rst = 0;
    iow(8'h40, 8'h01);
    frame(16'h0012, 0, 2'b00, 0);
    frame(16'h1234, 5, 2'b10, 1);
    frame(16'hBEEF, 20, 2'b01, 0);
    ior(8'h40, r); chk(r[2:1] == 0, "no errors so far");
    // errors during a frame
    for (int i = 0; i < 4; i++) mem[{1'b0, 16'h0001, 10'(i), 2'b00}] = $urandom;
    iow(8'h41, 8'h01); iow(8'h42, 8'h00); iow(8'h43, 8'd3); iow(8'h44, 8'd0);
    iow(8'h40, 8'h03); repeat (200) @(negedge clk);
    iow(8'h40, 8'h03); @(negedge clk) pps = 1; @(negedge clk) pps = 0;
    ior(8'h40, r); chk(r[1] && r[2], "BQERR and BCERR");
    iow(8'h40, 8'h05); ior(8'h40, r); chk(r[2:1] == 0, "errors cleared");
    iow(8'h40, 8'h00); ior(8'h44, r); chk(r[6:4] == 0, "disable stops the frame");
    chk(perr == 0, "odd parity on every byte");
    tb_done();
  end
endmodule
