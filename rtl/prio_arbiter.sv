// prio_arbiter: fixed-priority arbiter used for both shared memories. Bit 0
// of req is the highest priority. When the resource is free the highest
// pending request is granted (gnt one-hot) and the grant is held until the
// owner's access completes (done), so a longer access is never split. The
// client order is set by the instantiating logic: MBUS is CPU, DFB-DMA,
// CMD-DMA, TLM-DMA, FLASH-DMA; SDRAM is DFB-DMA, TLM-DMA, CPU, scrubber,
// FLASH-DMA, as in the specification. The grant is registered: it appears
// the cycle after a request while the bus is free.
module prio_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         done,
  output logic [N-1:0] gnt
);
  logic [N-1:0] pick;
  always_comb begin
    pick = '0;
    for (int i = N - 1; i >= 0; i--) if (req[i]) pick = N'(1) << i;
  end

  always_ff @(posedge clk) begin
    if (rst) gnt <= '0;
    else if (gnt == '0 || done) gnt <= (done ? '0 : pick);
  end
endmodule
