// tb_timebase: checks the Sample Time counter and every derived tick with a
// shortened 12-bit counter. Periods of the 1 Hz, 256 Hz, 128 Hz, 64 Hz ticks
// and the shift enable are measured, sec_lsb must toggle at each rollover,
// CLK8M must be SCLK/2 and the converter clock must repeat every 21 clocks
// with 11 high.
module tb_timebase;
  localparam int W = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic [W-1:0] st; logic sl, t1, t256, t128, t64, sh, c8, cv;
  timebase #(.CNT_W(W)) dut (.clk, .rst, .sample_time(st), .sec_lsb(sl), .tick_1hz(t1),
    .tick_256hz(t256), .tick_128hz(t128), .tick_64hz(t64), .shift_en(sh), .clk8m(c8), .conv_clk(cv));
  initial begin #2000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int last1 = -1, last256 = -1, last128 = -1, last64 = -1, lastsh = -1, cyc = 0, n1 = 0;
  int cvhi = 0, cvrise = -1, cvper = 0; logic cvq = 0, slq = 0, c8q = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (t1) begin
      chk(st == 0, "tick_1hz with counter at 0");
      if (last1 >= 0) chk(cyc - last1 == (1 << W), "1 Hz period");
      chk(sl != slq, "sec_lsb toggles at rollover"); last1 = cyc; n1++;
    end
    slq <= sl;
    if (t256) begin if (last256 >= 0) chk(cyc - last256 == (1 << (W - 8)), "256 Hz period"); last256 = cyc; end
    if (t128) begin if (last128 >= 0) chk(cyc - last128 == (1 << (W - 7)), "128 Hz period"); last128 = cyc; end
    if (t64)  begin if (last64 >= 0)  chk(cyc - last64 == (1 << (W - 6)), "64 Hz period"); last64 = cyc; end
    if (sh)   begin if (lastsh >= 0)  chk(cyc - lastsh == 16, "shift enable period"); lastsh = cyc; end
    if (cyc > 2) chk(c8 != c8q, "CLK8M toggles every SCLK");
    c8q <= c8;
    if (cv && !cvq) begin
      if (cvrise >= 0 && cvper > 0) begin chk(cyc - cvrise == 21, "converter clock period 21"); chk(cvhi == 11, "converter clock high 11 of 21"); end
      if (cvrise >= 0) cvper++;
      cvrise = cyc; cvhi = 0;
    end
    if (cv) cvhi++;
    cvq <= cv;
  end
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    repeat (3 * (1 << W) + 10) @(posedge clk);
    chk(n1 == 3, "three 1 Hz ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
