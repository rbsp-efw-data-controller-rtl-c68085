// tb_dfb_rx_merge: two behavioural DFB transmitters send random 24-bit words
// (start, MSB first, odd parity, stop, two clocks per bit) on both lines with
// random gaps, sometimes finishing in the same cycle. Every word must come
// out once with its Data-ID and data, in completion order per line; bad
// parity and bad stop bits must set the matching error flags until clr.
module tb_dfb_rx_merge;
  localparam int WATCHDOG_NS = 100_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [1:0] rxd = 2'b11; logic clr = 0; logic [7:0] id; logic [15:0] data; logic valid; logic [3:0] err;
  dfb_rx_merge dut (.clk, .rst, .rxd, .clr, .id, .data, .valid, .err);
  logic [23:0] q0 [$], q1 [$]; int got = 0, sentn = 0;
  always @(posedge clk) if (valid && !rst) begin
    got++;
    if (q0.size() > 0 && {id, data} == q0[0]) begin void'(q0.pop_front()); chk(1, ""); end
    else if (q1.size() > 0 && {id, data} == q1[0]) begin void'(q1.pop_front()); chk(1, ""); end
    else chk(0, $sformatf("unexpected word %06x (heads %06x %06x)", {id, data}, q0.size() ? q0[0] : 0, q1.size() ? q1[0] : 0));
  end
  task automatic tx(input int ln, input logic [23:0] w, input bit bp, input bit bs);
    rxd[ln] = 0; repeat (2) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin rxd[ln] = w[i]; repeat (2) @(negedge clk); end
    rxd[ln] = ~^w ^ bp; repeat (2) @(negedge clk);
    rxd[ln] = !bs; repeat (2) @(negedge clk); rxd[ln] = 1;
  endtask
  task automatic line(input int ln, input int n, input bit sync_start);
    for (int k = 0; k < n; k++) begin
      logic [23:0] w; w = $urandom;
      if (!sync_start) repeat ($urandom % 7) @(negedge clk);
      if (ln == 0) q0.push_back(w); else q1.push_back(w);
      sentn++;
      tx(ln, w, 0, 0); @(negedge clk);
    end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    fork line(0, 200, 0); line(1, 200, 0); join
    fork line(0, 50, 1); line(1, 50, 1); join
    repeat (20) @(negedge clk);
    chk(got == sentn && q0.size() == 0 && q1.size() == 0, $sformatf("all %0d words received (%0d)", sentn, got));
    chk(err == 0, "no errors on clean traffic");
    q1.push_back(24'h123456); tx(1, 24'h123456, 1, 0); repeat (4) @(negedge clk);
    chk(err == 4'b1000, "parity error on line 1");
    q0.push_back(24'h654321); tx(0, 24'h654321, 0, 1); repeat (10) @(negedge clk); rxd[0] = 1; repeat (10) @(negedge clk);
    chk(err[0] && err[3], "framing error on line 0");
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    chk(err == 0, "errors cleared");
    tb_done();
  end
endmodule
