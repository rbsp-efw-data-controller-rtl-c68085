// tb_uart_rx: random bytes sent by a behavioural serial model (start, 8 data
// LSB first, odd parity, stop) at divisor 146 must be received exactly;
// frames with a wrong parity bit must flag par_err and frames with a low stop
// bit must flag frm_err.
module tb_uart_rx;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  localparam int D = 146;
  logic rxd = 1; logic [7:0] data; logic valid, pe, fe, busy;
  uart_rx dut (.clk, .rst, .rxd, .div(12'(D)), .data, .valid, .par_err(pe), .frm_err(fe), .busy);
  initial begin #50000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  logic [7:0] got; int nv = 0, npe = 0, nfe = 0;
  always @(posedge clk) begin if (valid) begin nv++; got <= data; end if (pe) npe++; if (fe) nfe++; end
  task automatic bitout(input logic b); rxd = b; repeat (D) @(negedge clk); endtask
  task automatic frame(input logic [7:0] b, input bit badpar, input bit badstop);
    bitout(0); for (int i = 0; i < 8; i++) bitout(b[i]);
    bitout(~^b ^ badpar); bitout(!badstop); rxd = 1; repeat (2 * D) @(negedge clk);
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (5) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b; int v0, p0, f0; b = $urandom; v0 = nv; p0 = npe; f0 = nfe;
      case (i % 6)
        4: begin frame(b, 1, 0); chk(npe == p0 + 1 && nfe == f0, "parity error flagged"); end
        5: begin frame(b, 0, 1); chk(nfe == f0 + 1, "framing error flagged"); end
        default: begin frame(b, 0, 0); chk(nv == v0 + 1 && got == b && npe == p0 && nfe == f0, $sformatf("byte %02x", b)); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
