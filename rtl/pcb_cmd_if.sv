// pcb_cmd_if: serial command port to the Power Control Board (PCB).
// The CPU writes the byte to PCBCmdDat (0x2C) and starts the shift by writing
// 1 to PCBCmd bit 0 (0x2D). The byte is sent MSB first on pcb_cmd with
// pcb_clk running at SCLK/(2*HALF_PERIOD) = 1.048 MHz only during the shift;
// data changes on the rising edge of pcb_clk. After the eighth bit pcb_stb is
// high for one pcb_clk period. Writing 0x2C or starting while busy is ignored
// and sets the sticky error flag (read at 0x2D bit 1, cleared by writing 1 to
// bit 1). Clock rate, bit order and strobe follow the specification; idle
// levels (all low) are this design's choice.
module pcb_cmd_if #(
  parameter int unsigned HALF_PERIOD = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] io_addr,
  input  logic       io_wr,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  output logic       pcb_cmd,
  output logic       pcb_clk,
  output logic       pcb_stb,
  output logic       busy
);
  logic [7:0] dat, sh;
  logic       err;
  logic [3:0] bitn;    // 0..7 data bits, 8 strobe
  logic [$clog2(HALF_PERIOD)-1:0] cnt;
  logic       phase;   // 0: clock high half, 1: clock low half

  always_ff @(posedge clk) begin
    if (rst) begin
      dat <= '0; sh <= '0; err <= 1'b0; busy <= 1'b0; bitn <= '0; cnt <= '0; phase <= 1'b0;
      pcb_cmd <= 1'b0; pcb_clk <= 1'b0; pcb_stb <= 1'b0;
    end else begin
      if (io_wr && io_addr == 8'h2D && io_wdata[1]) err <= 1'b0;
      if (io_wr && io_addr == 8'h2C) begin
        if (busy) err <= 1'b1; else dat <= io_wdata;
      end
      if (io_wr && io_addr == 8'h2D && io_wdata[0]) begin
        if (busy) err <= 1'b1;
        else begin
          busy <= 1'b1; sh <= dat; bitn <= '0; cnt <= '0; phase <= 1'b0;
          pcb_cmd <= dat[7]; pcb_clk <= 1'b1;
        end
      end else if (busy) begin
        if (cnt == ($bits(cnt))'(HALF_PERIOD - 1)) begin
          cnt <= '0;
          phase <= ~phase;
          if (!phase) begin
            pcb_clk <= 1'b0;
          end else if (bitn == 4'd8) begin
            busy <= 1'b0; pcb_stb <= 1'b0; pcb_clk <= 1'b0;
          end else begin
            bitn <= bitn + 4'd1;
            pcb_clk <= 1'b1;
            if (bitn == 4'd7) begin
              pcb_stb <= 1'b1; pcb_cmd <= 1'b0;
            end else begin
              pcb_cmd <= sh[6];
              sh <= {sh[6:0], 1'b0};
            end
          end
        end else cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    case (io_addr)
      8'h2C:   io_rdata = dat;
      8'h2D:   io_rdata = {6'b0, err, busy};
      default: io_rdata = 8'h00;
    endcase
  end
endmodule
