// tb_watchdog: drives 1 Hz ticks by hand. Kicked regularly the watchdog never
// fires; after three unkicked ticks it gives one 50-cycle reset pulse, sets
// the detect flag (cleared only by its clear strobe) and sys_rst follows the
// pulse. With the jumper installed it never fires. Power-on reset alone also
// drives sys_rst.
module tb_watchdog;
  logic clk = 0, por = 1; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic tick = 0, kick = 0, dis = 0, clr = 0, wd_rst, wd_det, sys_rst;
  watchdog dut (.clk, .por, .tick_1hz(tick), .kick, .wd_disable(dis), .wd_det_clr(clr), .wd_rst, .wd_det, .sys_rst);
  initial begin #1000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  int rst_cycles = 0, pulses = 0; logic rq = 0;
  always @(posedge clk) begin
    if (wd_rst && !por) rst_cycles++;
    if (wd_rst && !rq && !por) pulses++;
    rq <= wd_rst;
  end
  task automatic pulse_tick(); @(negedge clk) tick = 1; @(negedge clk) tick = 0; repeat (20) @(negedge clk); endtask
  task automatic do_kick(); @(negedge clk) kick = 1; @(negedge clk) kick = 0; endtask
  initial begin
    repeat (2) @(negedge clk);
    chk(sys_rst == 1, "sys_rst during power-on reset");
    por = 0; @(negedge clk);
    chk(sys_rst == 0, "sys_rst released");
    repeat (10) begin pulse_tick(); pulse_tick(); do_kick(); end
    chk(pulses == 0 && !wd_det, "kicked watchdog stays quiet");
    pulse_tick(); pulse_tick();
    chk(pulses == 0, "no reset after two ticks");
    @(negedge clk) tick = 1; @(negedge clk) tick = 0;
    chk(wd_rst && sys_rst && wd_det, "reset asserted on third tick");
    repeat (100) @(negedge clk);
    chk(pulses == 1 && rst_cycles == 50, $sformatf("one 50-cycle pulse (%0d)", rst_cycles));
    chk(wd_det, "detect flag held after pulse");
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    chk(!wd_det, "detect flag cleared");
    dis = 1;
    repeat (6) pulse_tick();
    chk(pulses == 1, "disabled by jumper");
    dis = 0;
    repeat (3) pulse_tick();
    chk(pulses == 2, "fires again when jumper removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
