`timescale 1ps/1ps
// ring_osc -- BEHAVIOURAL MODEL (not synthesizable) of the event-driven ring
// oscillator: STAGES two-input NAND gates in a loop. Stage 0 gates the loop
// with RO_key; the other stages have one input tied high and act as
// inverters. With RO_key low the chain rests at 1010...101 (stage 0 = 1).
// When RO_key rises, stage 0 flips, and the flip runs around the loop:
// 001010..., 011010..., ..., 010101...0, 110101...0, ..., back to 101...101
// after 2*STAGES stage delays. Every stage delay is STAGE_DELAY_PS (the real
// chain averages about 35 ps; the model ignores the slightly faster first
// stage). Output node[i] is stage i's output; node[STAGES-1] also clocks the
// coarse counter. Topology and rest state follow the design description; the
// transport-delay model is this design's own.
module ring_osc #(
  parameter int unsigned STAGES         = 15,
  parameter int unsigned STAGE_DELAY_PS = 35
) (
  input  logic              ro_key,
  output logic [STAGES-1:0] node
);
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic a, y;
    if (i == 0) begin : g_first
      assign a = node[STAGES-1] & ro_key;
    end else begin : g_next
      assign a = node[i-1] & 1'b1;
    end
    delay_cell #(.DELAY_PS(STAGE_DELAY_PS)) u_dly (.a(~a), .y);
    assign node[i] = y;
  end
endmodule
