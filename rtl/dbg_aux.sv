// dbg_aux: the debug-connector hooks of the DCB FPGA.
// - NMI push-button: the switch input is synchronised and must hold one
//   level for DEB_CYCLES SCLK cycles before it is accepted; each accepted
//   press gives a one-cycle nmi pulse to the CPU.
// - Alternate boot PROM: alt_boot_sel_n (MISCCNTL(3)) is pulled up on the
//   board and grounded by a jumper on the debug board. While it is low,
//   boot-PROM cycles are sent to the debug-board PROM: the on-board PROM
//   chip select is held off and ALTBOOTCS/ALTBOOTREAD/ALTBOOTWRITE
//   (MISCCNTL(2:0)) follow the cycle instead.
// - LASTROBE(1:0): logic-analyser strobes, high during MBUS read and write
//   strobes; LASTROBE(2) is a spare and driven low.
// Interface: rom_cs/mb_rd/mb_wr come from the MBUS controller (combinational,
// one per bus cycle). All outputs active high; timing: nmi one cycle,
// the other outputs follow their inputs combinationally.
// The signal set is the specification's debug-connector table; the debounce
// time (about 15.6 ms) and the active-low switch are this design's choices.
module dbg_aux #(
  parameter int unsigned DEB_CYCLES = 262144
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       nmi_sw_n,        // push-button, low while pressed
  output logic       nmi,             // one-cycle NMI request
  input  logic       alt_boot_sel_n,  // MISCCNTL(3)
  input  logic       rom_cs,          // boot-PROM cycle from the MBUS controller
  input  logic       mb_rd,
  input  logic       mb_wr,
  output logic       rom_cs_onboard,
  output logic [2:0] alt_boot,        // {ALTBOOTCS, ALTBOOTWRITE, ALTBOOTREAD}
  output logic [2:0] lastrobe
);
  logic [1:0] sync;
  logic       state;                  // accepted level: 1 = pressed
  logic [$clog2(DEB_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= 2'b11; state <= 1'b0; cnt <= '0; nmi <= 1'b0;
    end else begin
      sync <= {sync[0], nmi_sw_n};
      nmi  <= 1'b0;
      if (!sync[1] == state) cnt <= '0;
      else if (cnt == ($bits(cnt))'(DEB_CYCLES - 1)) begin
        cnt   <= '0;
        state <= !sync[1];
        if (!sync[1]) nmi <= 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end

  assign rom_cs_onboard = rom_cs && alt_boot_sel_n;
  assign alt_boot[2]    = rom_cs && !alt_boot_sel_n;
  assign alt_boot[1]    = alt_boot[2] && mb_wr;
  assign alt_boot[0]    = alt_boot[2] && mb_rd;
  assign lastrobe       = {1'b0, mb_wr, mb_rd};
endmodule
