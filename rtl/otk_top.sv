`timescale 1ps/1ps
// otk_top: top level holding every block of this design. Three parts stand
// side by side, each with its own plain-signal ports and clocks, because
// they belong to different chips of the tracker readout:
//   - juloong_core: the single-channel TDC test chip (PLL, clock mux, ring
//     oscillator TDC, high- and low-speed serializers);
//   - juloong_chip (chip_*): the 128-channel readout chip, each channel a
//     TDC with its own event builder making 48-bit hit words, merged onto
//     one 43.3 Mbit/s link;
//   - taotie_tree (agg_*): aggregation of 32 chip links of 43.3 Mbit/s into
//     one 1.39 Gbit/s link by 8:1 and 4:1 TaoTie stages.
// No logic is added here; timing of each part is described in its module.
// Grouping the three parts in one top is this design's own choice.
module otk_top (
  // TDC test chip
  input  logic              ref_clk,      // 43.3 MHz reference
  input  logic              ext_fclk,     // external 1.732 GHz clock
  input  logic              clk_sel,      // 1: use ext_fclk
  input  logic              rst_n,
  input  logic              pulse,        // discriminator output
  output logic              pll_lock,
  output logic              hs_out,       // 1.732 Gbit/s encoded words
  output logic              ls_out,       // 43.3 Mbit/s raw frames
  output logic              ls_frame,
  output logic              overrun,
  // multi-channel readout chip
  input  logic              chip_ref_clk,   // 43.3 MHz
  input  logic              chip_rst_n,
  input  logic [4:0]        chip_id,
  input  logic [127:0]      chip_pulse,     // discriminator outputs
  output logic              chip_pll_lock,
  output logic              chip_link_out,  // 43.3 Mbit/s hit words
  output logic              chip_link_frame,
  output logic              chip_hit_lost,
  // link aggregation
  input  logic              agg_clk,      // 1.39 GHz output bit clock
  input  logic              agg_rst_n,
  input  logic [31:0]       agg_links,    // chip uplinks, group g = bits 8g+7..8g
  output logic              agg_out,
  output logic              agg_slot0,
  output logic              agg_chip_slot
);
  juloong_core u_core (
    .ref_clk, .ext_fclk, .clk_sel, .rst_n, .pulse,
    .pll_lock, .hs_out, .ls_out, .ls_frame, .overrun
  );

  juloong_chip u_chip (
    .ref_clk(chip_ref_clk), .rst_n(chip_rst_n), .chip_id, .pulse(chip_pulse),
    .pll_lock(chip_pll_lock), .link_out(chip_link_out), .link_frame(chip_link_frame),
    .hit_lost(chip_hit_lost)
  );

  taotie_tree u_agg (
    .clk(agg_clk), .rst_n(agg_rst_n), .chip_links(agg_links),
    .dout(agg_out), .slot0(agg_slot0), .chip_slot(agg_chip_slot)
  );
endmodule
