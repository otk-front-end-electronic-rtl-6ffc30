`timescale 1ps/1ps
// juloong_chip: the multi-channel readout chip. NCH channels (128 by
// default), each a ring-oscillator TDC followed by its own event builder,
// share a PLL and one serial link. The 43.3 MHz reference feeds the PLL
// (1.732 GHz); a divide-by-40 gives the 43.3 MHz system clock that serves as
// every TDC's reference and clocks all digital logic. When a channel's
// measurement ends, its done toggle passes a two-flop synchronizer; the
// change becomes result_valid for the channel's event builder, which packs
// TOA, TOT, CAL, channel number, bunch ID and chip ID into a 48-bit hit word.
// hit_merger takes the waiting words in round-robin order into a FIFO, and
// the link serializer sends them MSB first at one bit per system clock
// (43.3 Mbit/s, 48 cycles per hit), link_frame marking each word's first
// bit; the line is low when no word is waiting.
// Timing rules: a channel's codes must stay put until the synchronizer has
// passed the result on, so a channel must see no new pulse for 4 system
// clock cycles after its measurement ends. A result that arrives while the
// channel's previous word is still waiting is dropped and sets hit_lost.
// The channel count, the per-channel TDC + event builder, the PLL and the
// single serializer follow the design description (its block diagram);
// the analog front end, DAC, calibration injection and I2C are not part of
// this RTL (pulse[] is the discriminator output). The merger, the FIFO,
// the synchronizer and the link rate are this design's own choices.
module juloong_chip
  import juloong_pkg::*;
#(
  parameter int unsigned NCH            = 128,
  parameter int unsigned STAGE_DELAY_PS = 35,
  parameter int unsigned STOP_COUNT     = 4,
  parameter int unsigned FIFO_DEPTH     = 16
) (
  input  logic           ref_clk,     // 43.3 MHz reference
  input  logic           rst_n,
  input  logic [4:0]     chip_id,
  input  logic [NCH-1:0] pulse,       // discriminator outputs
  output logic           pll_lock,
  output logic           link_out,    // 43.3 Mbit/s hit words
  output logic           link_frame,  // first bit of a hit word
  output logic           hit_lost     // sticky: a result was dropped
);
  logic           fclk, clk_sys;
  logic [NCH-1:0] done_tgl, new_res, result_valid, drop, busy, hit_valid;
  logic [NCH-1:0] sync1, sync2, sync3;
  hit_word_t      hit [NCH];
  hit_word_t      word;
  logic           valid, ready;

  pll_model #(.MULT(HS_W)) u_pll (.ref_clk, .rst_n, .clk_out(fclk), .lock(pll_lock));
  clk_div   #(.DIV(HS_W))  u_div (.clk(fclk), .rst_n, .clk_out(clk_sys));

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      sync3 <= '0;
    end else begin
      sync1 <= done_tgl;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end
  assign new_res      = sync2 ^ sync3;
  assign result_valid = new_res & ~busy;
  assign drop         = new_res & busy;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic [CODE_W-1:0] tot_code, toa_code, cal_code;

    tdc_channel #(.STAGE_DELAY_PS(STAGE_DELAY_PS), .STOP_COUNT(STOP_COUNT)) u_tdc (
      .rst_n, .clk_ref(clk_sys), .pulse(pulse[i]),
      .tot_code, .toa_code, .cal_code,
      .tot_raw(), .toa_raw(), .cal_raw(),
      .done_tgl(done_tgl[i]), .tot_missing(), .cal_missing()
    );

    event_builder u_evb (
      .clk(clk_sys), .rst_n, .chip_id, .channel(7'(i)),
      .result_valid(result_valid[i]), .tot_code, .toa_code, .cal_code,
      .hit(hit[i]), .hit_valid(hit_valid[i])
    );
  end

  hit_merger #(.NCH(NCH), .DEPTH(FIFO_DEPTH)) u_merge (
    .clk(clk_sys), .rst_n, .hit, .hit_valid, .drop, .busy,
    .word, .valid, .ready, .lost(hit_lost)
  );

  ls_serializer #(.WIDTH(48), .DIV(1)) u_link (
    .clk(clk_sys), .rst_n, .word, .valid, .ready, .sout(link_out), .frame(link_frame)
  );
endmodule
