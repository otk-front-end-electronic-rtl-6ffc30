`timescale 1ps/1ps
// tdc_readout: takes finished TDC measurements into the fast-clock domain
// and builds the two output words of the test chip: a 40-bit word of encoded
// codes for the high-speed serializer and a 128-bit word of raw latch bits
// (with a header) for the low-speed serializer.
// done_tgl from the TDC controller is asynchronous: it passes a two-flop
// synchronizer, and a change means a new result. The codes and raw bits are
// stable at that point (the latch banks hold them until the next pulse), so
// they are registered then. At every frame_ce the next 40-bit word is chosen:
// the pending result (header HS_HDR_DATA), else an idle word (HS_HDR_IDLE,
// zeros). The 128-bit word (sync 0xB5A, 7-bit event number, flag, TOT, TOA,
// CAL raw samples) is offered with valid until the low-speed serializer
// takes it. The 40/128-bit split follows the design description; the header
// values, the field order and the synchronizer are this design's own.
module tdc_readout
  import juloong_pkg::*;
(
  input  logic              clk,          // fast clock
  input  logic              rst_n,
  input  logic              frame_ce,     // high-speed word boundary
  input  logic              done_tgl,
  input  logic              tot_missing,
  input  logic [CODE_W-1:0] tot_code,
  input  logic [CODE_W-1:0] toa_code,
  input  logic [CODE_W-1:0] cal_code,
  input  tdc_raw_t          tot_raw,
  input  tdc_raw_t          toa_raw,
  input  tdc_raw_t          cal_raw,
  output hs_word_t          hs_word,
  output ls_word_t          ls_word,
  output logic              ls_valid,
  input  logic              ls_ready,
  output logic              overrun       // a result was replaced before it was sent
);
  logic [2:0] sync;
  logic       new_result;
  logic       hs_pending;
  hs_word_t   hs_next;
  logic [6:0] evt;

  assign new_result = sync[2] ^ sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= '0;
      hs_pending <= 1'b0;
      hs_next    <= '0;
      hs_word    <= '{hdr: HS_HDR_IDLE, default: '0};
      ls_word    <= '0;
      ls_valid   <= 1'b0;
      evt        <= '0;
      overrun    <= 1'b0;
    end else begin
      sync <= {sync[1:0], done_tgl};
      if (new_result) begin
        hs_next    <= '{hdr: HS_HDR_DATA, tot_missing: tot_missing,
                        tot: tot_code, toa: toa_code, cal: cal_code};
        hs_pending <= 1'b1;
        ls_word    <= '{sync: LS_SYNC, evt: evt, tot_missing: tot_missing,
                        tot: tot_raw, toa: toa_raw, cal: cal_raw};
        ls_valid   <= 1'b1;
        evt        <= evt + 1'b1;
        overrun    <= overrun | hs_pending | (ls_valid & ~ls_ready);
      end else begin
        if (frame_ce) hs_pending <= 1'b0;
        if (ls_ready) ls_valid   <= 1'b0;
      end
      if (frame_ce)
        hs_word <= hs_pending ? hs_next : '{hdr: HS_HDR_IDLE, default: '0};
    end
  end
endmodule
