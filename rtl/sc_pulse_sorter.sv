// sc_pulse_sorter: sorts the spacecraft 1PPS / Spin Pulse line by pulse width.
// The input (already deglitched, high while the pulse is active) is timed in
// SCLK cycles. At the trailing edge the width is classed: SPIN_MIN..SPIN_MAX
// (30.5-53 us) raises spin_det, PPS_MIN..PPS_MAX (69-91 us) raises pps_det,
// any other width raises err_det. For 1PPS the time stamp {sec_lsb,
// sample_time[23:9]} is loaded into dmet (Delta MET latch, regs 0x20/0x21), for
// a spin pulse into sptm (regs 0x24/0x25). The three flags are sticky until
// the CPU clears them with the pulse register. Widths and register layout are
// the specification's; the active-high input polarity is this design's choice.
module sc_pulse_sorter #(
  parameter int unsigned SPIN_MIN = 512,
  parameter int unsigned SPIN_MAX = 889,
  parameter int unsigned PPS_MIN  = 1158,
  parameter int unsigned PPS_MAX  = 1527
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pulse_in,
  input  logic [23:0] sample_time,
  input  logic        sec_lsb,
  input  logic [2:0]  clr,        // {err, spin, pps} clear strobes
  output logic        pps_det,
  output logic        spin_det,
  output logic        err_det,
  output logic        pps_evt,    // one-cycle strobe at a valid 1PPS trailing edge
  output logic [15:0] dmet,
  output logic [15:0] sptm
);
  logic        prev;
  logic [11:0] width;
  logic        ovf;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev <= 1'b0; width <= '0; ovf <= 1'b0;
      pps_det <= 1'b0; spin_det <= 1'b0; err_det <= 1'b0; pps_evt <= 1'b0;
      dmet <= '0; sptm <= '0;
    end else begin
      prev    <= pulse_in;
      pps_evt <= 1'b0;
      if (clr[0]) pps_det  <= 1'b0;
      if (clr[1]) spin_det <= 1'b0;
      if (clr[2]) err_det  <= 1'b0;
      if (pulse_in) begin
        if (!prev) begin
          width <= 12'd1; ovf <= 1'b0;
        end else if (width == '1) ovf <= 1'b1;
        else width <= width + 12'd1;
      end else if (prev) begin
        if (!ovf && width >= 12'(SPIN_MIN) && width <= 12'(SPIN_MAX)) begin
          spin_det <= 1'b1;
          sptm     <= {sec_lsb, sample_time[23:9]};
        end else if (!ovf && width >= 12'(PPS_MIN) && width <= 12'(PPS_MAX)) begin
          pps_det <= 1'b1;
          pps_evt <= 1'b1;
          dmet    <= {sec_lsb, sample_time[23:9]};
        end else err_det <= 1'b1;
      end
    end
  end
endmodule
