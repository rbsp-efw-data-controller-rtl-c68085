// ecc_secded32: the SDRAM error-correcting code. Each 32-bit longword has 7
// check bits: a Hamming code over positions 1..38 (check bits at positions
// 1,2,4,8,16,32, data bits in the other positions in ascending order) plus an
// overall parity bit over data and Hamming bits. Together with the scrubber's
// tag bit they fill the check byte the specification stores per longword.
// Combinational. check_out encodes data_in. For a stored pair (data_in,
// check_in): syndrome 0 and parity good - no error; parity bad - single-bit
// error, corrected in data_out (sb_err); syndrome nonzero with parity good -
// double error, data_out = data_in (mb_err). The 7-bit count and single-
// correct / multi-detect behaviour are the specification's; the particular
// code is this design's (the standard extended Hamming code).
module ecc_secded32 (
  input  logic [31:0] data_in,
  input  logic [6:0]  check_in,
  output logic [6:0]  check_out,
  output logic [31:0] data_out,
  output logic        sb_err,
  output logic        mb_err
);
  // position (1..38) of every data bit
  function automatic logic [5:0] dpos(input int unsigned i);
    int unsigned p, n;
    p = 0; n = 0;
    for (int unsigned k = 1; k <= 38; k++) begin
      if ((k & (k - 1)) != 0) begin
        if (n == i) p = k;
        n++;
      end
    end
    return 6'(p);
  endfunction

  function automatic logic [5:0] ham(input logic [31:0] d);
    logic [5:0] h;
    h = '0;
    for (int unsigned i = 0; i < 32; i++) if (d[i]) h ^= dpos(i);
    return h;
  endfunction

  logic [5:0] syn;
  logic       par;

  always_comb begin
    check_out = {^{data_in, ham(data_in)}, ham(data_in)};
    syn       = ham(data_in) ^ check_in[5:0];
    par       = ^{data_in, check_in};
    data_out  = data_in;
    sb_err    = 1'b0;
    mb_err    = 1'b0;
    if (par) begin
      sb_err = 1'b1;
      for (int unsigned i = 0; i < 32; i++) if (dpos(i) == syn) data_out[i] = ~data_in[i];
    end else if (syn != '0) mb_err = 1'b1;
  end
endmodule
