`timescale 1ps/1ps
// hs_serializer: 40:1 serializer on the 1.732 GHz clock, which also makes
// the 43.3 MHz reference clock for the TDC (1.732 GHz / 40).
// A modulo-WIDTH counter runs on the fast clock. In its last state the
// shift register loads `word` and frame_ce pulses for one cycle; in every
// other cycle it shifts left, so bits leave MSB first, one per fast clock,
// and each word is sent once per reference period. clk_ref is high for the
// first WIDTH/2 counts of a frame (registered, glitch-free), so a frame
// starts just after clk_ref rises. The 40-bit width, the 1.732 GHz rate and
// the serializer supplying the TDC clock follow the design description; the
// MSB-first order and the clock phase are this design's own choice.
module hs_serializer #(
  parameter int unsigned WIDTH = 40
) (
  input  logic             clk,        // 1.732 GHz
  input  logic             rst_n,
  input  logic [WIDTH-1:0] word,
  output logic             frame_ce,   // word is loaded at this edge
  output logic             sout,
  output logic             clk_ref     // clk / WIDTH
);
  localparam int unsigned CW = $clog2(WIDTH);
  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] sh;

  assign frame_ce = (cnt == CW'(WIDTH-1));
  assign sout     = sh[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      sh      <= '0;
      clk_ref <= 1'b1;
    end else begin
      cnt     <= frame_ce ? '0 : cnt + 1'b1;
      sh      <= frame_ce ? word : {sh[WIDTH-2:0], 1'b0};
      clk_ref <= frame_ce || (cnt < CW'(WIDTH/2 - 1));
    end
  end
endmodule
