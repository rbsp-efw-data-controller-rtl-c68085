// tb_sc_pulse_sorter: pulses at the edges of the two width windows are sorted
// into 1PPS, spin pulse or error. The Delta MET and spin time latches must
// hold {sec_lsb, sample_time[23:9]} sampled at the trailing edge, and each
// clear strobe must clear only its own flag.
module tb_sc_pulse_sorter;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  logic p = 0, sl = 0; logic [23:0] st = 0; logic [2:0] clr = 0;
  logic pps, spin, err, evt; logic [15:0] dmet, sptm;
  sc_pulse_sorter dut (.clk, .rst, .pulse_in(p), .sample_time(st), .sec_lsb(sl), .clr,
    .pps_det(pps), .spin_det(spin), .err_det(err), .pps_evt(evt), .dmet, .sptm);
  initial begin #5000000; $display("watchdog expired"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  always @(posedge clk) st <= st + 24'd1;
  int evts = 0; always @(posedge clk) if (evt) evts++;
  task automatic clear_all(); @(negedge clk) clr = 3'b111; @(negedge clk) clr = 0; endtask
  // expect: 0 none/err, 1 spin, 2 pps
  task automatic send(input int w, input int exp);
    logic [15:0] snap; int e0;
    clear_all(); e0 = evts;
    sl = $urandom; @(negedge clk) p = 1; repeat (w) @(negedge clk);
    snap = {sl, st[23:9]}; p = 0; repeat (3) @(negedge clk);
    chk(spin == (exp == 1), $sformatf("width %0d spin flag", w));
    chk(pps == (exp == 2), $sformatf("width %0d pps flag", w));
    chk(err == (exp == 0), $sformatf("width %0d error flag", w));
    chk(evts - e0 == (exp == 2 ? 1 : 0), "pps event strobe");
    if (exp == 1) chk(sptm == snap, "spin time latch");
    if (exp == 2) chk(dmet == snap, "delta MET latch");
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    send(511, 0); send(512, 1); send(700, 1); send(889, 1); send(890, 0);
    send(1157, 0); send(1158, 2); send(1300, 2); send(1527, 2); send(1528, 0); send(5000, 0);
    for (int i = 0; i < 40; i++) begin
      int w; w = 300 + ($urandom % 1500);
      send(w, (w >= 512 && w <= 889) ? 1 : (w >= 1158 && w <= 1527) ? 2 : 0);
    end
    send(600, 1); send(1200, 2);
    // both flags set now? send sets after clear, so set spin again without clearing
    @(negedge clk) p = 1; repeat (600) @(negedge clk); p = 0; repeat (3) @(negedge clk);
    @(negedge clk) clr = 3'b001; @(negedge clk) clr = 0;
    chk(!pps && spin, "pps clear leaves spin flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
