`timescale 1ps/1ps
// coarse_counter: counts ring-oscillator periods for the TDC's coarse time.
// It increments on each rising edge of the ring's last stage, which happens
// once per ring period, when the ring passes its rest state again
// (transition 30, 60, ...). RO_key low clears it asynchronously, so it
// always starts from zero with the ring. At 2**WIDTH periods it wraps; with
// 6 bits and ~1.05 ns periods that is ~67 ns of range. The 6-bit width
// follows the design description; clocking from the last stage is this
// design's choice, made so that code = coarse*30 + fine needs no correction.
module coarse_counter #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             ro_tap,   // last ring stage
  input  logic             ro_key,   // ring enable, active-high
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge ro_tap or negedge ro_key) begin
    if (!ro_key) count <= '0;
    else         count <= count + 1'b1;
  end
endmodule
