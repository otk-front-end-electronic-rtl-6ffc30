`timescale 1ps/1ps
// clk_mux: selects the serializer clock, either the PLL's 1.732 GHz output
// (sel = 0) or the external 1.732 GHz clock (sel = 1), as the test chip
// lets either drive the serializers and, through them, the TDC. It is a
// plain combinational 2:1 multiplexer: sel is a static configuration pin
// and must only change while the chip is held in reset. The choice between
// the two clocks follows the design description; the static-select rule is
// this design's.
module clk_mux (
  input  logic clk_pll,
  input  logic clk_ext,
  input  logic sel,
  output logic clk_out
);
  always_comb clk_out = sel ? clk_ext : clk_pll;
endmodule
