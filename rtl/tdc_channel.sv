`timescale 1ps/1ps
// tdc_channel: one TDC channel -- controller, ring oscillator with
// quantization latches and coarse counter, and encoder.
// A discriminator pulse starts the ring. Three latch banks catch the ring
// state and coarse count: TOT when the pulse ends (TOT_latch), TOA at the
// first valid gated reference edge (CLK_latch1, then copied by CLK_latch2
// into the TOA bank), and CAL one reference period later (CLK_latch1 again,
// overwriting TOA in the first bank). CAL - TOA is one reference period in
// ring steps, which calibrates the LSB. Each bank's 30+6 bits are encoded
// to 11 bits: TOT_code, TOA_code, CAL_code (codes of ~35 ps, measured from
// the pulse's rising edge to the closing edge of each latch pulse).
// done_tgl toggles once the measurement has ended and all banks hold their
// results; the banks keep them until the next pulse starts the ring.
// The partition (controller / ring + latches / encoder) and all widths
// follow the design description.
module tdc_channel
  import juloong_pkg::*;
#(
  parameter int unsigned STAGE_DELAY_PS = 35,
  parameter int unsigned STOP_COUNT     = 4
) (
  input  logic              rst_n,
  input  logic              clk_ref,      // 43.3 MHz reference
  input  logic              pulse,        // discriminator output
  output logic [CODE_W-1:0] tot_code,
  output logic [CODE_W-1:0] toa_code,
  output logic [CODE_W-1:0] cal_code,
  output tdc_raw_t          tot_raw,
  output tdc_raw_t          toa_raw,
  output tdc_raw_t          cal_raw,
  output logic              done_tgl,
  output logic              tot_missing,
  output logic              cal_missing
);
  logic ro_key, gate_en, l2_en;
  logic clk_latch1, clk_latch1_dly, clk_latch2, tot_latch, tot_latch_dly;
  logic [STAGES-1:0]   node;
  logic [COARSE_W-1:0] coarse;
  logic [STAGES-1:0]   q1;
  logic [FINE_W-1:0]   therm_tot, therm_toa, therm_cal;

  tdc_ctrl #(.STOP_COUNT(STOP_COUNT)) u_ctrl (
    .rst_n, .pulse, .clk_ref, .clk_latch1, .clk_latch1_dly, .clk_latch2,
    .tot_latch, .tot_latch_dly, .ro_key, .gate_en, .l2_en, .done_tgl,
    .tot_missing, .cal_missing
  );

  latch_pulse_gen u_pgen (
    .clk_ref, .pulse, .ro_key, .gate_en, .l2_en, .clk_latch1,
    .clk_latch1_dly, .clk_latch2, .tot_latch, .tot_latch_dly
  );

  ring_osc #(.STAGES(STAGES), .STAGE_DELAY_PS(STAGE_DELAY_PS)) u_ring (
    .ro_key, .node
  );

  coarse_counter #(.WIDTH(COARSE_W)) u_cnt (
    .ro_tap(node[STAGES-1]), .ro_key, .count(coarse)
  );

  // TOT bank
  quant_latch u_lat_tot (
    .en(tot_latch), .d(node), .cnt_d(coarse), .fine(tot_raw.fine), .cnt_q(tot_raw.coarse)
  );
  // TOA/CAL bank (first level)
  quant_latch u_lat_cal (
    .en(clk_latch1), .d(node), .cnt_d(coarse), .fine(cal_raw.fine), .cnt_q(cal_raw.coarse)
  );
  // TOA bank (second level, copies the first-level Q outputs)
  always_comb for (int i = 0; i < STAGES; i++) q1[i] = cal_raw.fine[2*i+1];
  quant_latch u_lat_toa (
    .en(clk_latch2), .d(q1), .cnt_d(cal_raw.coarse), .fine(toa_raw.fine), .cnt_q(toa_raw.coarse)
  );

  tdc_encoder u_enc_tot (.fine(tot_raw.fine), .coarse(tot_raw.coarse), .code(tot_code), .therm(therm_tot));
  tdc_encoder u_enc_toa (.fine(toa_raw.fine), .coarse(toa_raw.coarse), .code(toa_code), .therm(therm_toa));
  tdc_encoder u_enc_cal (.fine(cal_raw.fine), .coarse(cal_raw.coarse), .code(cal_code), .therm(therm_cal));
endmodule
