// tb_util.svh: helpers shared by the testbenches. Included inside a
// testbench module after clk is declared: a check counter with failure
// report, the final result line and a simulation-time watchdog whose limit
// is the including module's WATCHDOG_NS localparam.
int checks = 0, failures = 0;
task automatic chk(input bit c, input string m);
  checks++;
  if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
endtask
task automatic tb_done();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
initial begin
  #(WATCHDOG_NS);
  $display("watchdog: simulation did not finish");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
  $finish;
end
