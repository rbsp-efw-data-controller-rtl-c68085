// tb_uart_tx: random bytes are sent at divisor 73 and sampled mid-bit by a
// behavioural receiver; start bit, LSB-first data, odd parity and stop bit
// are checked, as are the bit time and the done strobe.
module tb_uart_tx;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int D = 73;
  logic start = 0, txd, busy, done; logic [7:0] data = 0;
  uart_tx dut (.clk, .rst, .start, .data, .div(12'(D)), .txd, .busy, .done);
  initial begin #50000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int ndone = 0; always @(posedge clk) if (done) ndone++;
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (5) @(negedge clk);
    chk(txd == 1, "idle high");
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b, r; logic par; int d0, t;
      b = $urandom; d0 = ndone;
      @(negedge clk) begin data = b; start = 1; end
      @(negedge clk) start = 0;
      t = 0; while (txd && t < 10) begin @(negedge clk); t++; end
      chk(t < 10, "start bit begins");
      repeat (D / 2) @(negedge clk);
      chk(txd == 0, "start bit low at mid-bit");
      for (int k = 0; k < 8; k++) begin repeat (D) @(negedge clk); r[k] = txd; end
      repeat (D) @(negedge clk); par = txd;
      repeat (D) @(negedge clk);
      chk(txd == 1, "stop bit");
      chk(r == b, $sformatf("data %02x got %02x", b, r));
      chk(par == ~^b, "odd parity");
      repeat (D) @(negedge clk);
      chk(!busy && ndone == d0 + 1, "done once and idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
