`timescale 1ps/1ps
// clk_div: divides a clock by DIV (even) with 50% duty cycle. A counter runs
// 0..DIV-1; the output is high for counts 0..DIV/2-1. The output is a
// register that resets high, so the first period after reset is complete.
// In the multi-channel chip it makes the 43.3 MHz system clock from the
// 1.732 GHz PLL output (the divide ratio 40 follows the design description;
// the circuit is this design's own).
module clk_div #(
  parameter int unsigned DIV = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b1;
    end else begin
      cnt     <= (cnt == CW'(DIV-1)) ? '0 : cnt + 1'b1;
      clk_out <= (cnt == CW'(DIV-1)) || (cnt < CW'(DIV/2 - 1));
    end
  end
endmodule
