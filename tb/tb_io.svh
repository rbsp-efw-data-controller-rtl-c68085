// tb_io.svh: CPU I/O register access for testbenches of blocks on the
// I/O register bus. Needs clk, io_addr, io_wr, io_wdata, io_rdata and io_rd
// declared in the including module. Writes and reads are one-cycle strobes
// driven between clock edges.
task automatic iow(input logic [7:0] a, input logic [7:0] d);
  @(negedge clk); io_addr = a; io_wdata = d; io_wr = 1'b1;
  @(negedge clk); io_wr = 1'b0; io_addr = 8'hFF;
endtask
task automatic ior(input logic [7:0] a, output logic [7:0] d);
  @(negedge clk); io_addr = a; io_rd = 1'b1; #1 d = io_rdata;
  @(negedge clk); io_rd = 1'b0; io_addr = 8'hFF;
endtask
