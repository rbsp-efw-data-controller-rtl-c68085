// tb_glitch_filter: pulses of 1..3 clocks must not pass; pulses of 4 or more
// clocks must pass with their width kept. Random widths are checked against
// a simple reference count of output pulses.
module tb_glitch_filter;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic din = 0, dout;
  glitch_filter dut (.clk, .rst, .din, .dout);
  initial begin #2000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int hi = 0, rises = 0; logic q = 0;
  always @(posedge clk) begin if (dout) hi++; if (dout && !q) rises++; q <= dout; end
  task automatic send(input int w);
    int r0;
    r0 = rises; hi = 0;
    @(negedge clk) din = 1; repeat (w) @(negedge clk); din = 0;
    repeat (20) @(negedge clk);
    if (w < 4) chk(rises == r0, $sformatf("width %0d rejected", w));
    else begin chk(rises == r0 + 1, $sformatf("width %0d passed", w)); chk(hi == w, $sformatf("width %0d kept (%0d)", w, hi)); end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (5) @(negedge clk);
    for (int w = 1; w <= 10; w++) send(w);
    repeat (200) send(1 + ($urandom % 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
