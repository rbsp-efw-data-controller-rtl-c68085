// tb_cmd_dma: random bytes are sent into the command UART (divisor 146); each
// must be written once to SRAM at {page, index} by the memory port, in order,
// and the index registers must count. Parity and framing errors must latch
// (the byte is still stored); more than 1024 bytes since the last arm must
// set overflow and drop the extra bytes; a memory that does not answer before
// the next byte must set the timeout flag.
module tb_cmd_dma;
  import dcb_pkg::*;
  localparam int WATCHDOG_NS = 1_000_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  localparam int D = 146;
  logic rxd = 1; mem_req_t mreq; mem_rsp_t mrsp;
  cmd_dma #(.BUF_BYTES(1024)) dut (.clk, .rst, .io_addr, .io_wr, .io_wdata, .io_rdata, .rxd, .mreq, .mrsp);
  logic [7:0] mem [131072]; int nw = 0; bit stall = 0;
  always @(posedge clk) begin
    mrsp.ack <= 0; mrsp.err <= 0; mrsp.rdata <= 0;
    if (mreq.req && !mrsp.ack && !stall && !rst) begin
      mrsp.ack <= 1;
      chk(mreq.we && !mreq.size4, "byte write");
      mem[mreq.addr[16:0]] <= mreq.wdata[7:0]; nw++;
    end
  end
  task automatic send(input logic [7:0] b, input bit bp, input bit bs);
    rxd = 0; repeat (D) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (D) @(negedge clk); end
    rxd = ~^b ^ bp; repeat (D) @(negedge clk);
    rxd = !bs; repeat (D) @(negedge clk); rxd = 1; repeat (D) @(negedge clk);
  endtask
  logic [7:0] r, r2, sent [1100];
  initial begin
    mrsp = '0;
    repeat (3) @(negedge clk); rst = 0;
    iow(8'h61, 8'h25); iow(8'h60, 8'h01); iow(8'h60, 8'h11);
    for (int i = 0; i < 40; i++) begin sent[i] = $urandom; send(sent[i], 0, 0); end
    repeat (10) @(negedge clk);
    chk(nw == 40, $sformatf("40 writes (%0d)", nw));
    for (int i = 0; i < 40; i++) chk(mem[{7'h25, 10'(i)}] == sent[i], $sformatf("byte %0d stored", i));
    ior(8'h62, r); ior(8'h63, r2); chk({r2[1:0], r} == 40, "index register");
    ior(8'h60, r); chk(r[7:4] == 0, "no errors");
    send(8'hA5, 1, 0); ior(8'h60, r); chk(r[6], "parity error latched");
    chk(mem[{7'h25, 10'd40}] == 8'hA5, "byte with parity error stored");
    send(8'h3C, 0, 1); repeat (2 * D) @(negedge clk); ior(8'h60, r); chk(r[7], "framing error latched");
    iow(8'h60, 8'h81); ior(8'h60, r); chk(r[7:4] == 0, "errors cleared");
    // overflow: fill a fresh buffer past 1024 bytes
    iow(8'h61, 8'h30); iow(8'h60, 8'h11); nw = 0;
    for (int i = 0; i < 1030; i++) begin sent[i] = $urandom; send(sent[i], 0, 0); end
    repeat (10) @(negedge clk);
    chk(nw == 1024, $sformatf("1024 bytes stored (%0d)", nw));
    ior(8'h60, r); chk(r[5], "overflow latched");
    chk(mem[{7'h30, 10'd1023}] == sent[1023] && mem[{7'h30, 10'd0}] == sent[0], "buffer ends intact");
    // timeout: stall the memory
    iow(8'h60, 8'h91); stall = 1;
    send(8'h11, 0, 0); send(8'h22, 0, 0); ior(8'h60, r); chk(r[4], "timeout latched");
    stall = 0;
    tb_done();
  end
endmodule
