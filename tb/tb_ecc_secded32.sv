// tb_ecc_secded32: random longwords are encoded; with no error the decoder
// must report nothing; every single flipped bit among the 32 data and 7
// check bits must be corrected and flagged single; random double flips must
// be flagged as uncorrectable and never as single.
module tb_ecc_secded32;
  localparam int WATCHDOG_NS = 10_000_000;
  logic clk = 0; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic [31:0] d, dout; logic [6:0] cin, cout; logic sb, mb;
  logic [31:0] d0; logic [6:0] c0;
  ecc_secded32 dut (.data_in(d), .check_in(cin), .check_out(cout), .data_out(dout), .sb_err(sb), .mb_err(mb));
  initial begin
    for (int i = 0; i < 300; i++) begin
      d0 = $urandom; d = d0; cin = 0; #1 c0 = cout; cin = c0; #1;
      chk(!sb && !mb && dout == d0, "clean word");
      for (int b = 0; b < 39; b++) begin
        {cin, d} = {c0, d0} ^ (39'd1 << b); #1;
        chk(sb && !mb && dout == d0, $sformatf("single flip bit %0d corrected", b));
      end
      for (int k = 0; k < 5; k++) begin
        int b1, b2; b1 = $urandom % 39; b2 = (b1 + 1 + $urandom % 38) % 39;
        {cin, d} = {c0, d0} ^ (39'd1 << b1) ^ (39'd1 << b2); #1;
        chk(mb && !sb, "double flip detected");
      end
    end
    tb_done();
  end
endmodule
