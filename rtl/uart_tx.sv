// uart_tx: serial transmitter matching uart_rx. A one-cycle start strobe while
// idle loads data and sends start bit, DATA_BITS data bits (LSB first unless
// MSB_FIRST), an odd-parity bit and STOP_BITS stop bits, div SCLK cycles per
// bit; txd idles high. busy is high from the cycle after start until the last
// stop bit ends; done pulses for one cycle then. A start while busy is ignored
// (callers flag it as an error where the specification asks).
module uart_tx #(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned DIV_W     = 12,
  parameter bit          MSB_FIRST = 1'b0,
  parameter int unsigned STOP_BITS = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data,
  input  logic [DIV_W-1:0]     div,
  output logic                 txd,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned NB = DATA_BITS + 2 + STOP_BITS;  // start,data,parity,stop
  logic [NB-1:0]    sh;
  logic [DIV_W-1:0] cnt;
  logic [5:0]       left;
  logic [DATA_BITS-1:0] d;

  always_comb
    for (int i = 0; i < DATA_BITS; i++) d[i] = MSB_FIRST ? data[DATA_BITS-1-i] : data[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '1; cnt <= '0; left <= '0; busy <= 1'b0; done <= 1'b0; txd <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        txd <= 1'b1;
        if (start) begin
          sh   <= {{STOP_BITS{1'b1}}, ~(^data), d, 1'b0};
          busy <= 1'b1;
          cnt  <= '0;
          left <= 6'(NB);
        end
      end else if (cnt == '0) begin
        if (left == '0) begin
          busy <= 1'b0; done <= 1'b1; txd <= 1'b1;
        end else begin
          txd  <= sh[0];
          sh   <= {1'b1, sh[NB-1:1]};
          left <= left - 6'd1;
          cnt  <= div - 1'b1;
        end
      end else cnt <= cnt - 1'b1;
    end
  end
endmodule
