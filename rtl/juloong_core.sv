`timescale 1ps/1ps
// juloong_core: single-channel TDC test chip of the JuLoong readout ASIC.
// The 43.3 MHz reference feeds a PLL that makes 1.732 GHz; a multiplexer
// picks that or an external 1.732 GHz clock for the two serializers. The
// high-speed serializer divides its clock by 40 to give the TDC its
// 43.3 MHz reference and sends one 40-bit word per reference period
// (1.732 Gbit/s): the encoded TOT/TOA/CAL codes of each measurement, idle
// words otherwise. The low-speed serializer sends the 128-bit raw latch
// contents of each measurement at 43.3 Mbit/s, ls_frame marking the first
// bit of each frame. The discriminator pulse is an input: the analog front
// end is not part of this RTL. Block partition and clock plan follow the
// design description; word formats and link rates of the low-speed path
// are this design's own.
module juloong_core
  import juloong_pkg::*;
#(
  parameter int unsigned STAGE_DELAY_PS = 35,
  parameter int unsigned STOP_COUNT     = 4,
  parameter int unsigned LS_DIV         = 40
) (
  input  logic ref_clk,     // 43.3 MHz reference
  input  logic ext_fclk,    // external 1.732 GHz clock
  input  logic clk_sel,     // 1: use ext_fclk
  input  logic rst_n,
  input  logic pulse,       // discriminator output
  output logic pll_lock,
  output logic hs_out,
  output logic ls_out,
  output logic ls_frame,
  output logic overrun
);
  logic     clk_pll, fclk, clk_tdc, frame_ce;
  logic     done_tgl, tot_missing, cal_missing;
  logic [CODE_W-1:0] tot_code, toa_code, cal_code;
  tdc_raw_t tot_raw, toa_raw, cal_raw;
  hs_word_t hs_word;
  ls_word_t ls_word;
  logic     ls_valid, ls_ready;

  pll_model #(.MULT(HS_W)) u_pll (.ref_clk, .rst_n, .clk_out(clk_pll), .lock(pll_lock));

  clk_mux u_mux (.clk_pll, .clk_ext(ext_fclk), .sel(clk_sel), .clk_out(fclk));

  hs_serializer #(.WIDTH(HS_W)) u_hs (
    .clk(fclk), .rst_n, .word(hs_word), .frame_ce, .sout(hs_out), .clk_ref(clk_tdc)
  );

  tdc_channel #(.STAGE_DELAY_PS(STAGE_DELAY_PS), .STOP_COUNT(STOP_COUNT)) u_tdc (
    .rst_n, .clk_ref(clk_tdc), .pulse, .tot_code, .toa_code, .cal_code,
    .tot_raw, .toa_raw, .cal_raw, .done_tgl, .tot_missing, .cal_missing
  );

  tdc_readout u_rd (
    .clk(fclk), .rst_n, .frame_ce, .done_tgl, .tot_missing, .tot_code, .toa_code,
    .cal_code, .tot_raw, .toa_raw, .cal_raw, .hs_word, .ls_word, .ls_valid,
    .ls_ready, .overrun
  );

  ls_serializer #(.WIDTH(LS_W), .DIV(LS_DIV)) u_ls (
    .clk(fclk), .rst_n, .word(ls_word), .valid(ls_valid), .ready(ls_ready),
    .sout(ls_out), .frame(ls_frame)
  );
endmodule
