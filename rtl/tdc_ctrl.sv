`timescale 1ps/1ps
// tdc_ctrl: event-driven digital core of the TDC controller.
// A rising edge of the discriminator pulse sets RO_key: the ring oscillator
// starts and the clock gate (gate_en) opens. Each falling edge of CLK_latch1
// is judged by clk_latch1_dly (the pulse delayed by the validity threshold):
// if the pulse was wide enough the valid count steps. The first valid pulse
// has latched TOA, so l2_en arms CLK_latch2 for the next falling reference
// edge, which copies TOA into the second bank; the second valid pulse has
// latched CAL (TOA + one clock period) and closes the clock gate. TOT is done
// when TOT_latch was valid. When TOT and CAL are both done, or when STOP_COUNT
// reference rising edges have passed since the start (the fix for pulses too
// narrow to make a TOT_latch, which would otherwise leave the ring running),
// stop clears RO_key; the ring returns to rest and all counts clear. Each
// stop toggles done_tgl, with tot_missing/cal_missing telling how it ended.
// A short, too-early CLK_latch1 pulse (pulse edge < ~450 ps before a clock
// edge) is not counted, so TOA and CAL move one clock later.
// All sequencing follows the design description; the asynchronous-reset
// loop that makes stop a self-clearing pulse, the 3-bit stop counter and the
// done toggle for the readout are this design's own. The loop through stop
// and the asynchronous resets is intended (an event-driven controller).
module tdc_ctrl #(
  parameter int unsigned STOP_COUNT = 4
) (
  input  logic rst_n,
  input  logic pulse,
  input  logic clk_ref,
  input  logic clk_latch1,
  input  logic clk_latch1_dly,
  input  logic clk_latch2,
  input  logic tot_latch,
  input  logic tot_latch_dly,
  output logic ro_key,
  output logic gate_en,
  output logic l2_en,
  output logic done_tgl,
  output logic tot_missing,
  output logic cal_missing
);
  logic [1:0] v1_cnt;     // valid CLK_latch1 pulses: 1 = TOA, 2 = CAL
  logic       l2_done;
  logic       tot_ok;
  logic [2:0] ref_cnt;    // reference rising edges since the start
  logic       cal_done;
  logic       stop;
  logic       kill;
  logic       clr_n;      // clears all counts: ring stopped or chip reset

  assign cal_done = (v1_cnt == 2'd2);
  assign stop     = (cal_done && tot_ok) || (ref_cnt == 3'(STOP_COUNT));
  assign kill     = stop || !rst_n;
  assign clr_n    = ro_key && rst_n;

  always_ff @(posedge pulse or posedge kill) begin
    if (kill) ro_key <= 1'b0;
    else      ro_key <= 1'b1;
  end

  always_ff @(negedge clk_latch1 or negedge clr_n) begin
    if (!clr_n)                          v1_cnt <= '0;
    else if (clk_latch1_dly && !cal_done) v1_cnt <= v1_cnt + 1'b1;
  end

  always_ff @(negedge clk_latch2 or negedge clr_n) begin
    if (!clr_n) l2_done <= 1'b0;
    else         l2_done <= 1'b1;
  end

  always_ff @(negedge tot_latch or negedge clr_n) begin
    if (!clr_n)            tot_ok <= 1'b0;
    else if (tot_latch_dly) tot_ok <= 1'b1;
  end

  always_ff @(posedge clk_ref or negedge clr_n) begin
    if (!clr_n)                       ref_cnt <= '0;
    else if (ref_cnt != 3'(STOP_COUNT)) ref_cnt <= ref_cnt + 1'b1;
  end

  always_ff @(posedge stop or negedge rst_n) begin
    if (!rst_n) begin
      done_tgl    <= 1'b0;
      tot_missing <= 1'b0;
      cal_missing <= 1'b0;
    end else begin
      done_tgl    <= ~done_tgl;
      tot_missing <= ~tot_ok;
      cal_missing <= ~cal_done;
    end
  end

  assign gate_en = ro_key && !cal_done;
  assign l2_en   = (v1_cnt != 2'd0) && !l2_done;

  // CLK_latch2 must only fire after TOA has been latched
  a_l2_after_toa: assert property (@(posedge clk_latch2) disable iff (!rst_n) v1_cnt != 2'd0);
endmodule
