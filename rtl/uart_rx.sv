// uart_rx: serial receiver for the DCB's asynchronous links: the S/C command
// UART and the debug UART (8 data bits) and the DFB telemetry lines (24 bits).
// Frame: one start bit (0), DATA_BITS data bits, one odd-parity bit (data plus
// parity hold an odd number of ones), one stop bit (1); idle is high. The line
// is sampled in the middle of each bit, div SCLK cycles per bit (a run-time
// input so the debug UART can change rate). A start bit that is gone at its
// middle (runt) and a missing stop bit both set frm_err; a runt is dropped,
// while a word with a bad stop bit or parity is still delivered, as the
// specification asks. valid, par_err and frm_err are one-cycle strobes in the
// cycle the stop bit is sampled. Bit order (LSB first unless MSB_FIRST) is this
// design's choice; the frame format is the specification's.
module uart_rx #(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned DIV_W     = 12,
  parameter bit          MSB_FIRST = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rxd,
  input  logic [DIV_W-1:0]     div,
  output logic [DATA_BITS-1:0] data,
  output logic                 valid,
  output logic                 par_err,
  output logic                 frm_err,
  output logic                 busy
);
  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_t;
  state_t                 st;
  logic [DIV_W-1:0]       cnt;
  logic [5:0]             nbit;
  logic [DATA_BITS:0]     sh;   // data bits plus parity
  logic                   prev;

  assign busy = (st != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; cnt <= '0; nbit <= '0; sh <= '0; prev <= 1'b1;
      data <= '0; valid <= 1'b0; par_err <= 1'b0; frm_err <= 1'b0;
    end else begin
      prev <= rxd;
      valid <= 1'b0; par_err <= 1'b0; frm_err <= 1'b0;
      case (st)
        IDLE: if (prev && !rxd) begin
          st  <= START;
          cnt <= (div >> 1) - 1'b1;   // sample at the middle of the start bit
        end
        START: if (cnt == '0) begin
          if (rxd) begin st <= IDLE; frm_err <= 1'b1; end
          else begin st <= BITS; cnt <= div - 1'b1; nbit <= '0; end
        end else cnt <= cnt - 1'b1;
        BITS: if (cnt == '0) begin
          sh  <= {rxd, sh[DATA_BITS:1]};
          cnt <= div - 1'b1;
          if (nbit == 6'(DATA_BITS)) st <= STOP;
          else nbit <= nbit + 6'd1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == '0) begin
          st      <= IDLE;
          valid   <= 1'b1;
          frm_err <= ~rxd;
          par_err <= ~(^sh);
          for (int i = 0; i < DATA_BITS; i++)
            data[i] <= MSB_FIRST ? sh[DATA_BITS-1-i] : sh[i];
        end else cnt <= cnt - 1'b1;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
