// tb_dfb_dma: 16 channels are given current and next pages, then random DFB
// words for random channels (and some foreign IDs) are fed in. A behavioural
// memory with random latency accepts the longword writes. The memory must
// hold each channel's words packed two per longword from index 4 on; a
// termination tick must pad an odd word with zeros, swap to the next page,
// restart at index 4 and set the swap-status bit and the last-buffer status
// {BufSwap, Timeout, Overflow, Odd, Index}. A channel filled past index 1023
// must set overflow and keep its last longword; channels without swap enable
// must not swap.
module tb_dfb_dma;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 200_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic [7:0] w_id = 0; logic [15:0] w_data = 0; logic w_valid = 0, t128 = 0, t1 = 0, eclr;
  mem_req_t mreq; mem_rsp_t mrsp;
  dfb_dma dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .w_id, .w_data, .w_valid,
    .if_err(4'b0), .if_err_clr(eclr), .tick_128hz(t128), .tick_1hz(t1), .mreq, .mrsp);
  logic [31:0] mem [logic [28:0]];
  int lat = 0, nwr = 0;
  always @(posedge clk) begin
    mrsp.ack <= 0;
    if (mreq.req && !mrsp.ack && !rst) begin
      if (lat <= 0) begin
        mrsp.ack <= 1; mem[mreq.addr] = mreq.wdata; nwr++;
        chk(mreq.we && mreq.size4, "longword write");
        lat = $urandom % 3;
      end else lat--;
    end
  end
  // reference: per channel list of words in the current buffer
  logic [15:0] words [16][$];
  logic [15:0] pg [16];
  logic [7:0] r, r2;
  task automatic sel(input int c); iow(8'h66, {4'(c), 3'b0, 1'b1}); endtask
  task automatic put(input int c, input logic [15:0] d);
    @(negedge clk); w_id = 8'h40 + 8'(c); w_data = d; w_valid = 1;
    @(negedge clk); w_valid = 0;
    repeat (26 + $urandom % 6) @(negedge clk);   // two lines, ~56 clocks per word each
  endtask
  // a channel that was not swapped has not flushed a half-filled longword
  task automatic check_buf(input int c, input logic [15:0] page, input logic p28, input bit swapped);
    int n; n = words[c].size();
    for (int k = 0; k < (swapped ? (n + 1) / 2 : n / 2) && k < 1020; k++) begin
      logic [31:0] e; logic [28:0] a;
      e = {words[c][2 * k], (2 * k + 1 < n) ? words[c][2 * k + 1] : 16'h0000};
      a = {p28, page, 10'(4 + k), 2'b00};
      chk(mem.exists(a) && mem[a] == e, $sformatf("ch %0d longword %0d", c, k));
    end
  endtask
  initial begin
    mrsp = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int c = 0; c < 16; c++) begin
      iow(8'h66, {4'(c), 4'b0}); pg[c] = 16'h0100 + 16'(c * 2);
      iow(8'h68, pg[c][7:0]); iow(8'h69, pg[c][15:8]);
    end
    iow(8'h70, 8'h0F); iow(8'h71, 8'h00);                  // channels 0-3 in SDRAM
    iow(8'h72, 8'hFF); iow(8'h73, 8'h7F);                  // channel 15 never swaps
    iow(8'h74, 8'h00); iow(8'h75, 8'h00);
    iow(8'h66, 8'h01);
    for (int c = 0; c < 16; c++) begin            // next pages
      sel(c); iow(8'h68, pg[c][7:0] + 8'h01); iow(8'h69, pg[c][15:8]);
    end
    for (int i = 0; i < 1500; i++) begin
      int c; logic [15:0] d; c = $urandom % 16; d = $urandom;
      if (i % 50 == 7) begin @(negedge clk); w_id = 8'h22; w_data = d; w_valid = 1; @(negedge clk); w_valid = 0; end
      else begin put(c, d); words[c].push_back(d); end
    end
    repeat (50) @(negedge clk);
    // terminate: 128 Hz tick
    @(negedge clk) t128 = 1; @(negedge clk) t128 = 0;
    repeat (100) @(negedge clk);
    for (int c = 0; c < 16; c++) begin
      logic [15:0] st; int n;
      check_buf(c, pg[c], c < 4, c != 15);
      sel(c); ior(8'h6E, r); ior(8'h6F, r2); st = {r2, r}; n = words[c].size();
      if (c == 15) chk(st == 0, "channel without swap enable keeps its buffer");
      else chk(st == {1'b1, 1'b0, 1'b0, 1'(n % 2), 10'(4 + (n + 1) / 2), 2'b00},
               $sformatf("ch %0d last-buffer status %04x (n=%0d)", c, st, n));
      if (c != 15) begin ior(8'h6A, r); ior(8'h6B, r2); chk({r2, r} == {pg[c][3:0] + 4'd1, 10'd4, 2'b00}, "next page current, index 4"); end
    end
    ior(8'h76, r); ior(8'h77, r2); chk({r2, r} == 16'h7FFF, "swap status bits");
    iow(8'h66, 8'h03); ior(8'h76, r); chk(r == 0, "swap status cleared");
    // overflow on channel 5: 2*1020 words fill indexes 4..1023, then more
    for (int i = 0; i < 2 * 1020 + 6; i++) put(5, 16'(i));
    repeat (50) @(negedge clk);
    ior(8'h78, r); chk(r[5], "overflow flag");
    chk(mem[{1'b0, pg[5] + 16'd1, 10'd1023, 2'b00}] == {16'(2038), 16'(2039)}, "last longword kept at 1023");
    chk(!mem.exists({1'b0, pg[5] + 16'd2, 10'd0, 2'b00}), "no write past the buffer");
    sel(5); iow(8'h68, pg[5][7:0]); iow(8'h69, pg[5][15:8]);
    @(negedge clk) t128 = 1; @(negedge clk) t128 = 0; repeat (50) @(negedge clk);
    sel(5); ior(8'h6E, r); ior(8'h6F, r2); chk({r2, r} == {1'b1, 1'b0, 1'b1, 1'b0, 10'h3FF, 2'b00}, "overflow in last-buffer status");
    tb_done();
  end
endmodule
