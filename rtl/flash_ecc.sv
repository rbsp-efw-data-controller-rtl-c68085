// flash_ecc: Hamming code for one 512-byte FLASH ECC segment (three check
// bytes per segment, four segments per 2048-byte page). Bytes are fed one per
// cycle with byte_v; clr starts a new segment. The code is the usual
// row/column parity code for 512-byte NAND sectors: for each of the 9 byte-
// address bits and the 3 bit-position bits k there is a parity P1_k over all
// data bits whose address bit k is 1 and P0_k over those where it is 0.
// ecc = {P1 line[8:0], P0 line[8:0], P1 col[2:0], P0 col[2:0]} of the bytes
// fed so far. The comparison outputs use ecc_ref (stored code): syndrome 0 -
// clean; all 12 pairs differing - one data bit flipped at byte err_byte, bit
// err_bit (correctable); exactly one syndrome bit - an error in the stored
// code (correctable, data good); anything else - uncorrectable. The segment
// size and three-byte size are the specification's; the code is this
// design's choice.
module flash_ecc #(
  parameter int unsigned SEG_BYTES = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        byte_v,
  input  logic [7:0]  byte_in,
  input  logic [23:0] ecc_ref,
  output logic [23:0] ecc,
  output logic        err_none,
  output logic        err_corr,
  output logic        err_data,     // correctable error lies in the data
  output logic        err_uncorr,
  output logic [8:0]  err_byte,
  output logic [2:0]  err_bit
);
  logic [8:0] addr;
  logic [8:0] lp1, lp0;
  logic [7:0] colacc;
  logic [2:0] cp1, cp0;
  logic [23:0] syn;
  logic [11:0] pair;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      addr <= '0; lp1 <= '0; lp0 <= '0; colacc <= '0;
    end else if (byte_v) begin
      addr   <= (addr == 9'(SEG_BYTES - 1)) ? '0 : addr + 9'd1;
      colacc <= colacc ^ byte_in;
      for (int k = 0; k < 9; k++) begin
        if (addr[k]) lp1[k] <= lp1[k] ^ (^byte_in);
        else         lp0[k] <= lp0[k] ^ (^byte_in);
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      cp1[k] = 1'b0; cp0[k] = 1'b0;
      for (int b = 0; b < 8; b++) begin
        if (b[k]) cp1[k] ^= colacc[b];
        else      cp0[k] ^= colacc[b];
      end
    end
    ecc  = {lp1, lp0, cp1, cp0};
    syn  = ecc ^ ecc_ref;
    pair = {syn[23:15] ^ syn[14:6], syn[5:3] ^ syn[2:0]};
    err_none   = (syn == '0);
    err_data   = (pair == '1);
    err_corr   = err_data || ($countones(syn) == 1);
    err_uncorr = !err_none && !err_corr;
    err_byte   = syn[23:15];
    err_bit    = syn[5:3];
  end
endmodule
