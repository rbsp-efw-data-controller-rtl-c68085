// nand_model: behavioural model of the eight FLASH dies (2048+64-byte pages,
// 64 pages per block) on one shared bus, for testbenches. Commands, address
// and data bytes are taken at the rising edge of WE#; CLE marks a command,
// ALE an address byte (two column bytes, three row bytes). Read data is
// driven on io_in while RE# is low and the column advances at the rising
// edge of RE#. Supported: FFh reset, 00h/30h page read, 80h/10h page
// program, 70h status (bit 6 ready, bit 0 fail). R/B# is low for T_RD,
// T_PROG or T_RST clock cycles after 30h, 10h and FFh. Contents are kept per
// byte in an associative array indexed by {die, row, column}; unwritten bytes
// read 0xFF. fail_next makes the next program report failure; stuck_busy
// holds R/B# low. The model counts resets, reads and programs.
module nand_model #(
  parameter int T_RD = 25, T_PROG = 60, T_RST = 10
) (
  input  logic       clk,
  input  logic [7:0] ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] io_out,
  output logic [7:0] io_in,
  output logic       rb_n
);
  logic [7:0] mem [logic [32:0]];
  logic [7:0] pbuf [logic [11:0]];
  int busy = 0, nreset = 0, nread = 0, nprog = 0;
  bit fail_next = 0, failed = 0, stuck_busy = 0, status_mode = 0;
  int die = 0, acyc = 0;
  logic [7:0] cmd;
  logic [11:0] col;
  logic [17:0] row;
  assign rb_n = (busy == 0) && !stuck_busy;
  function automatic int sel();
    for (int i = 0; i < 8; i++) if (!ce_n[i]) return i;
    return -1;
  endfunction
  always @(posedge clk) if (busy > 0) busy--;
  always @(posedge we_n) if (ce_n != 8'hFF) begin
    if (cle) begin
      cmd = io_out; status_mode = 0;
      case (io_out)
        8'hFF: begin busy = T_RST; nreset++; end
        8'h00, 8'h80: begin acyc = 0; die = sel(); pbuf.delete(); end
        8'h30: begin busy = T_RD; nread++; end
        8'h10: begin
          for (int c = 0; c < 2112; c++)
            if (pbuf.exists(12'(c))) mem[{3'(die), row, 12'(c)}] = pbuf[12'(c)];
          failed = fail_next; fail_next = 0; busy = T_PROG; nprog++;
        end
        8'h70: status_mode = 1;
        default: ;
      endcase
    end else if (ale) begin
      case (acyc)
        0: col[7:0] = io_out;
        1: col[11:8] = io_out[3:0];
        2: row[7:0] = io_out;
        3: row[15:8] = io_out;
        default: row[17:16] = io_out[1:0];
      endcase
      acyc++;
    end else if (cmd == 8'h80) begin
      pbuf[col] = io_out; col++;
    end
  end
  always_comb begin
    io_in = 8'h00;
    if (!re_n && ce_n != 8'hFF) begin
      if (status_mode) io_in = {1'b1, rb_n, 5'b0, failed};
      else io_in = mem.exists({3'(die), row, col}) ? mem[{3'(die), row, col}] : 8'hFF;
    end
  end
  always @(posedge re_n) if (!status_mode && ce_n != 8'hFF) col++;
endmodule
