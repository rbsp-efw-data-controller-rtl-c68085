// glitch_filter: removes pulses shorter than MIN_CYCLES SCLK periods from an
// asynchronous S/C input (4 cycles, about 240 ns, per the specification).
// The input is synchronised by two flip-flops; the output changes only after
// the synchronised input has held a new level for MIN_CYCLES consecutive
// cycles, so latency is 2 + MIN_CYCLES cycles on each edge. The two-flop
// synchroniser is this design's choice. Reset value of the line is RST_VAL.
module glitch_filter #(
  parameter int unsigned MIN_CYCLES = 4,
  parameter bit          RST_VAL    = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout
);
  logic [1:0] sync;
  logic [$clog2(MIN_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= {2{RST_VAL}};
      cnt  <= '0;
      dout <= RST_VAL;
    end else begin
      sync <= {sync[0], din};
      if (sync[1] == dout) cnt <= '0;
      else if (cnt == ($bits(cnt))'(MIN_CYCLES - 1)) begin
        dout <= sync[1];
        cnt  <= '0;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
