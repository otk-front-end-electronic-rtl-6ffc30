`timescale 1ps/1ps
// juloong_pkg: constants and types shared by the single-channel TDC test chip.
//
// The TDC measures time with a 15-stage NAND ring oscillator. Each ring period
// passes through 2*15 = 30 distinct states, so a latched ring state gives a
// fine phase 0..29 (one stage delay per step, ~35 ps), and a 6-bit counter of
// ring periods extends the range. A latched sample is 30 fine bits (a Q/Q-bar
// pair per stage, as the single-to-differential cell and SR latch produce)
// plus 6 coarse bits; the encoder turns it into an 11-bit code
// coarse*30 + fine (64*30 = 1920 codes fit in 11 bits).
//
// The ring's rest state 101010101010101 (stage 0 written leftmost) and the
// 30-bit/6-bit/11-bit widths follow the design description, as do the field
// widths of the 48-bit hit word; the frame headers and all field orders below
// are this design's own choice.
package juloong_pkg;

  localparam int unsigned STAGES   = 15;          // NAND stages in the ring
  localparam int unsigned PHASES   = 2 * STAGES;  // fine phases per ring period
  localparam int unsigned FINE_W   = 2 * STAGES;  // latched Q/Q-bar bits
  localparam int unsigned COARSE_W = 6;           // coarse counter width
  localparam int unsigned CODE_W   = 11;          // encoded TOA/TOT/CAL width
  localparam int unsigned HS_W     = 40;          // high-speed serializer word
  localparam int unsigned LS_W     = 128;         // low-speed serializer word

  // Ring state with RO_key low: stage i outputs 1 for even i. Bit i = stage i.
  localparam logic [STAGES-1:0] RO_REST = 15'b101010101010101;

  // One latched ring sample: fine[2i+1] = Q of stage i, fine[2i] = Q-bar.
  typedef struct packed {
    logic [FINE_W-1:0]   fine;
    logic [COARSE_W-1:0] coarse;
  } tdc_raw_t;                                     // 36 bits

  // 40-bit encoded word: header, status, then the three 11-bit codes.
  localparam logic [5:0] HS_HDR_DATA = 6'b101000;
  localparam logic [5:0] HS_HDR_IDLE = 6'b010111;

  typedef struct packed {
    logic [5:0]        hdr;
    logic              tot_missing;  // measurement ended by the 4-clock stop
    logic [CODE_W-1:0] tot;
    logic [CODE_W-1:0] toa;
    logic [CODE_W-1:0] cal;
  } hs_word_t;                                     // 40 bits

  // 128-bit raw word: 20-bit header, then TOT, TOA, CAL samples (3 x 36).
  localparam logic [11:0] LS_SYNC = 12'hB5A;

  typedef struct packed {
    logic [11:0] sync;
    logic [6:0]  evt;          // event sequence number
    logic        tot_missing;
    tdc_raw_t    tot;
    tdc_raw_t    toa;
    tdc_raw_t    cal;
  } ls_word_t;                                     // 128 bits

  // 48-bit hit word of the tracker readout: 28 bits of time (10 TOA, 8 TOT,
  // 10 CAL) + 7-bit channel + 8-bit bunch ID + 5-bit chip ID.
  typedef struct packed {
    logic [4:0] chip_id;
    logic [7:0] bunch_id;
    logic [6:0] channel;
    logic [9:0] toa;
    logic [7:0] tot;
    logic [9:0] cal;
  } hit_word_t;                                    // 48 bits

endpackage
