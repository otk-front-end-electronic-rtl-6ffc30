`timescale 1ps/1ps
// event_builder: packs one TDC result into the 48-bit hit word sent off the
// chip: chip ID (5 bits), bunch ID (8), channel (7), TOA (10), TOT (8) and
// CAL (10), most significant field first. The bunch ID is an 8-bit count of
// 43.3 MHz reference cycles since reset, taken in the cycle the result
// arrives. The TDC's 11-bit codes are narrowed: TOA saturates at 1023 and
// TOT at 255 steps; CAL is sent as CAL - TOA, the reference period in TDC
// steps (about 660 at 35 ps), which is what the calibration needs and fits
// 10 bits. One cycle after result_valid, hit_valid pulses with the word.
// Field widths (48 bit/hit = 10 TOA + 8 TOT + 10 CAL + 7 channel + 8 bunch
// ID + 5 chip ID) follow the design description; field order, saturation
// and the CAL difference are this design's own.
module event_builder
  import juloong_pkg::*;
(
  input  logic              clk,          // 43.3 MHz reference
  input  logic              rst_n,
  input  logic [4:0]        chip_id,
  input  logic [6:0]        channel,
  input  logic              result_valid, // one cycle per finished measurement
  input  logic [CODE_W-1:0] tot_code,
  input  logic [CODE_W-1:0] toa_code,
  input  logic [CODE_W-1:0] cal_code,
  output hit_word_t         hit,
  output logic              hit_valid
);
  logic [7:0]        bunch;
  logic [CODE_W-1:0] period;

  assign period = cal_code - toa_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bunch     <= '0;
      hit       <= '0;
      hit_valid <= 1'b0;
    end else begin
      bunch     <= bunch + 1'b1;
      hit_valid <= result_valid;
      if (result_valid) begin
        hit.chip_id  <= chip_id;
        hit.bunch_id <= bunch;
        hit.channel  <= channel;
        hit.toa      <= (toa_code > CODE_W'(1023)) ? 10'd1023 : toa_code[9:0];
        hit.tot      <= (tot_code > CODE_W'(255))  ? 8'd255   : tot_code[7:0];
        hit.cal      <= (cal_code < toa_code) ? 10'd0 :
                        (period > CODE_W'(1023)) ? 10'd1023 : period[9:0];
      end
    end
  end
endmodule
