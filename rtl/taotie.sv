`timescale 1ps/1ps
// taotie: link aggregator. N_IN serial uplinks of rate R enter, one uplink
// of rate N_IN*R leaves, carrying the input bits interleaved: lane 0, 1,
// ..., N_IN-1, then the next bit of lane 0. The module runs on a clock at
// the output bit rate, or on a faster clock with ce marking output bit
// periods. A slot counter steps on ce; at slot 0 the current bit of every
// lane is captured, and in slot i the captured bit of lane i drives dout
// (registered). slot0 marks the period carrying lane 0, for framing at the
// far end. Inputs must hold each bit across the ce that starts slot 0; the
// latency from capture to lane i on dout is i+1 output periods.
// Function, lane count (8 uplinks, one clock, one uplink out) and the rates
// (43.3 Mbit/s x 8 = 347 Mbit/s, x 4 = 1.39 Gbit/s) follow the design
// description; bit interleaving and the slot0 marker are this design's own.
module taotie #(
  parameter int unsigned N_IN = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic [N_IN-1:0] din,
  output logic            dout,
  output logic            slot0
);
  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1;
  logic [SW-1:0]   slot;
  logic [N_IN-1:0] cap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot  <= '0;
      cap   <= '0;
      dout  <= 1'b0;
      slot0 <= 1'b0;
    end else if (ce) begin
      if (slot == '0) begin
        cap  <= din;
        dout <= din[0];
      end else begin
        dout <= cap[slot];
      end
      slot0 <= (slot == '0);
      slot  <= (slot == SW'(N_IN-1)) ? '0 : slot + 1'b1;
    end
  end
endmodule
