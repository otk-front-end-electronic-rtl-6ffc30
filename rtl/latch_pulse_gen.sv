`timescale 1ps/1ps
// latch_pulse_gen -- BEHAVIOURAL MODEL (delay cells, not synthesizable) of
// the pulse-shaping part of the TDC controller. It makes the ~300 ps latch
// pulses from edges and provides delayed copies that tdc_ctrl uses to judge
// whether a pulse was wide enough.
//   gated clock : gclk = clk_ref & gate_en delayed by GATE_PS.
//   CLK_latch1  : gclk & ~(clk_ref delayed by PULSE_W_PS) -- 300 ps after each
//                 gated rising edge; shorter when the gate opens while
//                 clk_ref is already high, absent if it opens >300 ps late.
//   CLK_latch2  : ~clk_ref & (clk_ref delayed) & l2_en -- 300 ps after a
//                 falling edge of the reference clock.
//   TOT_latch   : ~pulse & (pulse delayed) & ro_key -- 300 ps after the
//                 pulse's falling edge; only as wide as the pulse if the
//                 pulse is narrower than 300 ps.
//   *_dly       : CLK_latch1 and TOT_latch delayed by VALID_PS, sampled by
//                 tdc_ctrl at the pulse's falling edge (valid if still high).
// Pulse widths (300 ps) and the ~450 ps gate setup that decides the TOA
// boundary cases follow the design description; the gate structure, the
// delay-line one-shots and the 280 ps validity threshold are this design's.
module latch_pulse_gen #(
  parameter int unsigned PULSE_W_PS = 300,
  parameter int unsigned GATE_PS    = 450,
  parameter int unsigned VALID_PS   = 280
) (
  input  logic clk_ref,
  input  logic pulse,
  input  logic ro_key,
  input  logic gate_en,
  input  logic l2_en,
  output logic clk_latch1,
  output logic clk_latch1_dly,
  output logic clk_latch2,
  output logic tot_latch,
  output logic tot_latch_dly
);
  logic gate_en_d, clk_d, pulse_d, gclk;

  delay_cell #(.DELAY_PS(GATE_PS))    u_d_gate (.a(gate_en),    .y(gate_en_d));
  delay_cell #(.DELAY_PS(PULSE_W_PS)) u_d_clk  (.a(clk_ref),    .y(clk_d));
  delay_cell #(.DELAY_PS(PULSE_W_PS)) u_d_pul  (.a(pulse),      .y(pulse_d));
  delay_cell #(.DELAY_PS(VALID_PS))   u_d_l1   (.a(clk_latch1), .y(clk_latch1_dly));
  delay_cell #(.DELAY_PS(VALID_PS))   u_d_tot  (.a(tot_latch),  .y(tot_latch_dly));

  assign gclk       = clk_ref & gate_en_d;
  assign clk_latch1 = gclk & ~clk_d;
  assign clk_latch2 = ~clk_ref & clk_d & l2_en;
  assign tot_latch  = ~pulse & pulse_d & ro_key;
endmodule
