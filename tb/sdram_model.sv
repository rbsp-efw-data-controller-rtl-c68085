// sdram_model: behavioural model of the bulk SDRAM for testbenches: four
// 64Mx8 dies selected by cs_n[3:0], 4 banks, 13-bit rows, 11-bit columns,
// CAS latency 2, burst length 1. Commands are sampled at the rising clock
// edge; read data appears on dq_in from the next edge, valid at the edge
// CL cycles after the READ. The model checks the protocol and counts
// violations in viol: a command before LOAD MODE (other than PRECHARGE and
// REFRESH), ACTIVE on an open bank, READ/WRITE on a closed bank or before
// tRCD = 2 cycles, REFRESH with an open bank, and any command while CKE is
// low. Contents are kept in an associative array (mem) indexed by the byte
// address {die, row, bank, col}; unwritten bytes read as a fixed pattern.
// nref counts REFRESH commands, nact ACTIVE commands.
module sdram_model (
  input  logic        clk,
  input  logic        cke,
  input  logic [3:0]  cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [7:0]  dq_out,
  input  logic        dq_oe,
  output logic [7:0]  dq_in
);
  logic [7:0] mem [logic [27:0]];
  int viol = 0, nref = 0, nact = 0;
  bit  moded [4];
  bit  open_b [4][4];
  logic [12:0] row [4][4];
  int  act_t [4][4];
  int  cyc = 0;
  logic [7:0] rd_q;
  logic       rd_v;
  function automatic logic [7:0] fill(input logic [27:0] ad);
    return ad[7:0] ^ ad[15:8] ^ ad[23:16] ^ 8'h5A;
  endfunction
  task automatic bad(input string m);
    viol++; $display("SDRAM model: %s at %0t", m, $time);
  endtask
  initial begin
    dq_in = 8'h00; rd_v = 0;
    for (int d = 0; d < 4; d++) begin moded[d] = 0; for (int b = 0; b < 4; b++) open_b[d][b] = 0; end
  end
  always @(posedge clk) begin
    cyc++;
    dq_in <= rd_v ? rd_q : 8'h00;
    rd_v = 0;
    for (int d = 0; d < 4; d++) if (!cs_n[d]) begin
      logic [2:0] c; c = {ras_n, cas_n, we_n};
      if (!cke && c != 3'b111) bad("command with CKE low");
      case (c)
        3'b010: begin   // PRECHARGE
          if (a[10]) for (int b = 0; b < 4; b++) open_b[d][b] = 0; else open_b[d][ba] = 0;
        end
        3'b001: begin   // REFRESH
          for (int b = 0; b < 4; b++) if (open_b[d][b]) bad("refresh with open bank");
          if (d == 0) nref++;
        end
        3'b000: moded[d] = 1;
        3'b011: begin   // ACTIVE
          if (!moded[d]) bad("ACTIVE before LOAD MODE");
          if (open_b[d][ba]) bad("ACTIVE on open bank");
          open_b[d][ba] = 1; row[d][ba] = a; act_t[d][ba] = cyc; nact++;
        end
        3'b101, 3'b100: begin   // READ / WRITE
          logic [27:0] ad;
          if (!open_b[d][ba]) bad("READ/WRITE on closed bank");
          else if (cyc - act_t[d][ba] < 2) bad("tRCD");
          ad = {2'(d), row[d][ba], ba, a[10:0]};
          if (c == 3'b100) begin
            if (!dq_oe) bad("WRITE without data");
            mem[ad] = dq_out;
          end else begin
            rd_q = mem.exists(ad) ? mem[ad] : fill(ad); rd_v = 1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
