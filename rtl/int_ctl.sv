// int_ctl: the CPU interrupt logic. Three sources - the 256 Hz timer tick,
// TLM DMA done and FLASH DMA done - each set a latched flag (intStatReg, 0x1C:
// bit 2 timer, bit 1 TLM, bit 0 FLASH) that stays set until the CPU writes 1 to
// the same bit of intClrReg. The flags latch whether or not enabled; the
// enabled flags (dcbCtl bits 4..6) are ORed onto the single active-low Z80
// Mode 1 interrupt line. A set and a clear in the same cycle leave the flag
// set, so no event is lost. Follows the specification.
module int_ctl (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] src,     // one-cycle events {timer, tlm, flash}
  input  logic [2:0] en,      // {timer, tlm, flash} enables
  input  logic [2:0] clr,     // clear strobes
  output logic [2:0] stat,
  output logic       int_n
);
  always_ff @(posedge clk) begin
    if (rst) stat <= '0;
    else     stat <= (stat & ~clr) | src;
  end
  assign int_n = ~|(stat & en);
endmodule
