// tb_debug_uart: the debug UART is enabled at each of the four rates; bytes
// written to 0x95 must appear on txd in the serial frame and bytes sent into
// rxd must be read back in order from 0x92 with the right fill count. The
// receive-parity error flag, read-when-empty flag and their clear, the
// disabled state (FIFOs held empty) and a 128-byte FIFO fill are checked.
module tb_debug_uart;
  localparam int WATCHDOG_NS = 200_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [7:0] io_addr = 8'hFF, io_wdata = 0, io_rdata; logic io_wr = 0, io_rd = 0;
  `include "tb_io.svh"
  logic rxd = 1, txd;
  debug_uart dut (.clk, .rst, .io_addr, .io_wr, .io_rd, .io_wdata, .io_rdata, .rxd, .txd);
  int divs[4] = '{437, 291, 146, 73};
  int D;
  task automatic send(input logic [7:0] b, input bit badpar);
    rxd = 0; repeat (D) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (D) @(negedge clk); end
    rxd = ~^b ^ badpar; repeat (D) @(negedge clk);
    rxd = 1; repeat (2 * D) @(negedge clk);
  endtask
  task automatic recv(output logic [7:0] b);
    int t; t = 0;
    while (txd && t < 100000) begin @(negedge clk); t++; end
    repeat (D / 2) @(negedge clk);
    chk(txd == 0, "tx start bit");
    for (int i = 0; i < 8; i++) begin repeat (D) @(negedge clk); b[i] = txd; end
    repeat (D) @(negedge clk); chk(txd == ~^b, "tx odd parity");
    repeat (D) @(negedge clk); chk(txd == 1, "tx stop bit");
  endtask
  logic [7:0] r, st;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    ior(8'h90, r); chk(r == 8'h08, "reset value: disabled, 115200");
    for (int k = 0; k < 4; k++) begin
      logic [7:0] b[3];
      D = divs[k];
      iow(8'h90, 8'(k << 2) | 8'h01);
      ior(8'h90, r); chk(r == (8'(k << 2) | 8'h01), "control readback");
      for (int i = 0; i < 3; i++) begin b[i] = $urandom; iow(8'h95, b[i]); end
      for (int i = 0; i < 3; i++) begin recv(r); chk(r == b[i], $sformatf("rate %0d tx byte %0d", k, i)); end
      for (int i = 0; i < 3; i++) begin b[i] = $urandom; send(b[i], 0); end
      ior(8'h93, r); chk(r == 3, "rx fill count");
      for (int i = 0; i < 3; i++) begin ior(8'h92, r); chk(r == b[i], $sformatf("rate %0d rx byte %0d", k, i)); end
      ior(8'h91, st); chk(st[6] && st[3:0] == 0, "rx empty, no errors");
    end
    send(8'h5A, 1);
    ior(8'h91, st); chk(st[3], "parity error flagged");
    ior(8'h92, r); ior(8'h92, r);
    ior(8'h91, st); chk(st[0], "read-when-empty flagged");
    iow(8'h91, 8'h01); ior(8'h91, st); chk(st[3:0] == 0, "errors cleared");
    iow(8'h90, 8'h0C);  // disable, stop transmitter before filling
    for (int i = 0; i < 130; i++) iow(8'h95, 8'(i));
    ior(8'h96, r); chk(r == 0, "disabled FIFO held empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
