// tb_flash_ecc: random 512-byte segments are fed through the encoder and the
// code is compared with a reference computed in the testbench. The segment
// is then fed again against the stored code with no error, with one flipped
// data bit (located exactly), with one flipped code bit (correctable, data
// good) and with two flipped data bits (uncorrectable).
module tb_flash_ecc;
  localparam int WATCHDOG_NS = 50_000_000;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  `include "tb_util.svh"
  logic clr = 0, bv = 0; logic [7:0] bin = 0; logic [23:0] eref = 0, ecc;
  logic e_none, e_corr, e_data, e_unc; logic [8:0] e_byte; logic [2:0] e_bit;
  flash_ecc dut (.clk, .rst, .clr, .byte_v(bv), .byte_in(bin), .ecc_ref(eref), .ecc,
    .err_none(e_none), .err_corr(e_corr), .err_data(e_data), .err_uncorr(e_unc), .err_byte(e_byte), .err_bit(e_bit));
  logic [7:0] seg [512];
  function automatic logic [23:0] ref_ecc();
    logic [8:0] l1, l0; logic [2:0] c1, c0;
    l1 = 0; l0 = 0; c1 = 0; c0 = 0;
    for (int a = 0; a < 512; a++)
      for (int b = 0; b < 8; b++)
        if (seg[a][b]) begin
          for (int k = 0; k < 9; k++) if (a[k]) l1[k] ^= 1; else l0[k] ^= 1;
          for (int k = 0; k < 3; k++) if (b[k]) c1[k] ^= 1; else c0[k] ^= 1;
        end
    return {l1, l0, c1, c0};
  endfunction
  task automatic feed();
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    for (int a = 0; a < 512; a++) begin bv = 1; bin = seg[a]; @(negedge clk); end
    bv = 0; @(negedge clk);
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 12; t++) begin
      logic [23:0] good; int fa, fb;
      for (int a = 0; a < 512; a++) seg[a] = (t == 0) ? 8'hFF : 8'($urandom);
      good = ref_ecc();
      eref = good; feed();
      chk(ecc == good, $sformatf("code %h expected %h", ecc, good));
      chk(e_none && !e_corr && !e_unc, "clean segment");
      fa = $urandom % 512; fb = $urandom % 8;
      seg[fa][fb] ^= 1; feed();
      chk(e_corr && e_data && !e_unc && e_byte == 9'(fa) && e_bit == 3'(fb), $sformatf("single data bit at %0d.%0d", fa, fb));
      seg[fa][fb] ^= 1;
      eref = good ^ (24'd1 << ($urandom % 24)); feed();
      chk(e_corr && !e_data && !e_unc, "single code bit");
      eref = good; seg[fa][fb] ^= 1; seg[(fa + 7) % 512][(fb + 3) % 8] ^= 1; feed();
      chk(e_unc && !e_none && !e_corr, "two data bits uncorrectable");
    end
    tb_done();
  end
endmodule
