`timescale 1ps/1ps
// ls_serializer: low-speed serializer for the 128-bit raw TDC words.
// One bit leaves every DIV clock cycles (DIV = 40 on the 1.732 GHz clock
// gives 43.3 Mbit/s, the per-chip uplink rate of the tracker readout; the
// multi-channel chip uses WIDTH = 48 and DIV = 1 on its 43.3 MHz clock). When the previous
// frame has been sent and `valid` is high, the word is loaded (`ready`
// pulses for that cycle) and sent MSB first; frame marks the first bit
// period of a frame. With no word waiting the output stays low. Handshake:
// the word is taken in the cycle where valid && ready. The 128-bit width
// follows the design description; the rate, handshake and idle level are
// this design's own choices.
module ls_serializer #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DIV   = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] word,
  input  logic             valid,
  output logic             ready,
  output logic             sout,
  output logic             frame
);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned BW = $clog2(WIDTH + 1);
  logic [DW-1:0]    div_cnt;
  logic [BW-1:0]    bits_left;
  logic [WIDTH-1:0] sh;
  logic             tick;

  assign tick  = (div_cnt == DW'(DIV-1));
  assign ready = tick && (bits_left <= BW'(1));
  assign sout  = (bits_left != '0) && sh[WIDTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      bits_left <= '0;
      sh        <= '0;
      frame     <= 1'b0;
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (tick) begin
        if (ready && valid) begin
          sh        <= word;
          bits_left <= BW'(WIDTH);
          frame     <= 1'b1;
        end else begin
          sh        <= {sh[WIDTH-2:0], 1'b0};
          bits_left <= (bits_left != '0) ? bits_left - 1'b1 : '0;
          frame     <= 1'b0;
        end
      end
    end
  end
endmodule
