`timescale 1ps/1ps
// pll_model -- BEHAVIOURAL MODEL (not synthesizable) of the clock PLL that
// multiplies the 43.3 MHz reference by MULT = 40 to 1.732 GHz. It measures
// the reference period between rising edges (in ps) and, from the
// LOCK_CYCLES-th edge on, starts each reference period with a rising output
// edge followed by 2*MULT-1 toggles every period/(2*MULT) ps (rounded down),
// so the output stays phase-aligned to the reference. lock goes high with
// the first output cycle; rst_n low stops the output and drops lock. The
// 43.3 MHz -> 1.732 GHz ratio follows the design description; the loop
// itself (jitter, lock time) is not modelled.
module pll_model #(
  parameter int unsigned MULT        = 40,
  parameter int unsigned LOCK_CYCLES = 3
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic clk_out,
  output logic lock
);
  longint t_last, half;
  int     edges;

  initial begin
    clk_out = 1'b0;
    lock    = 1'b0;
    t_last  = 0;
    half    = 0;
    edges   = 0;
  end

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      edges   = 0;
      lock    = 1'b0;
      clk_out = 1'b0;
    end else begin
      if (edges > 0) half = ($time - t_last) / (2 * MULT);
      t_last = $time;
      if (edges < LOCK_CYCLES) edges++;
      if (edges >= LOCK_CYCLES && half > 0) begin
        lock    = 1'b1;
        clk_out = 1'b1;
        for (int i = 1; i < 2 * MULT; i++) begin
          #(half) clk_out = ~clk_out;
        end
      end
    end
  end
endmodule
