// beb_amux: BEB analog-multiplexer control (register 0x51). BEB_AMUXSEL (bits
// 5:4) is decoded to at most one active enable: 00 -> 000, 01 -> 001,
// 10 -> 010, 11 -> 100. BEB_AMUXADR (bits 2:0) is driven inverted because the
// BEB receives it through inverting buffers; the enables are not inverted.
// When the register changes, all enables are dropped for GUARD_CYCLES SCLK
// cycles before the new enable is applied (guardband). The decoder table and
// inversion are the specification's; the guardband length is this design's.
module beb_amux #(
  parameter int unsigned GUARD_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  output logic [2:0] amux_enb,
  output logic [2:0] amux_adr_n
);
  logic [7:0] ctl;
  logic [$clog2(GUARD_CYCLES+1)-1:0] guard;
  logic [2:0] dec;

  always_comb begin
    case (ctl[5:4])
      2'b00:   dec = 3'b000;
      2'b01:   dec = 3'b001;
      2'b10:   dec = 3'b010;
      default: dec = 3'b100;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctl <= '0; guard <= '0; amux_enb <= '0; amux_adr_n <= '1;
    end else begin
      if (io_wr && io_addr == 8'h51) begin
        ctl <= io_wdata;
        if (io_wdata != ctl) begin
          guard    <= ($bits(guard))'(GUARD_CYCLES);
          amux_enb <= '0;
        end
      end else if (guard != '0) begin
        guard <= guard - 1'b1;
        amux_adr_n <= ~ctl[2:0];
      end else begin
        amux_enb   <= dec;
        amux_adr_n <= ~ctl[2:0];
      end
    end
  end

  assign io_rdata = (io_addr == 8'h51) ? ctl : 8'h00;
endmodule
