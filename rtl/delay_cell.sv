`timescale 1ps/1ps
// delay_cell -- BEHAVIOURAL MODEL (not synthesizable) of a delay element
// with transport delay: every change of a reappears on y DELAY_PS later, so
// pulses shorter than the delay pass through unchanged. y starts low and
// takes a's start-up value after one delay. Used by the ring
// oscillator and the latch-pulse one-shots.
module delay_cell #(
  parameter int unsigned DELAY_PS = 35
) (
  input  logic a,
  output logic y
);
  initial y = 1'b0;
  // evaluated once at start-up, then on every change of a
  always begin
    fork
      automatic logic v = a;
      #(DELAY_PS) y = v;
    join_none
    @(a);
  end
endmodule
