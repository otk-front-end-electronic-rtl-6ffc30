`timescale 1ps/1ps
// hit_merger: collects hit words from NCH channel event builders into one
// stream for the chip's serial link. Each channel's event builder holds its
// word until it is taken; pend[i] marks a word waiting there. Every cycle a
// round-robin arbiter picks the first waiting channel at or after the one
// after the last grant and, if the FIFO has room, copies that channel's word
// into a DEPTH-entry FIFO and clears its flag. The FIFO head is offered to
// the serializer with valid/ready (taken in the cycle valid && ready).
// busy[i] tells the channel that its event builder must not take a new
// result; a result that arrives while busy is dropped and sets the sticky
// `lost` flag. Timing: a word enters the FIFO at the earliest one cycle after
// hit_valid. The merging scheme, FIFO depth and loss rule are this design's
// own; the design description only shows per-channel event builders feeding
// one serializer.
module hit_merger
  import juloong_pkg::*;
#(
  parameter int unsigned NCH   = 128,
  parameter int unsigned DEPTH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  hit_word_t      hit [NCH],     // held by each event builder
  input  logic [NCH-1:0] hit_valid,     // one-cycle strobe per new word
  input  logic [NCH-1:0] drop,          // result arrived while busy
  output logic [NCH-1:0] busy,
  output hit_word_t      word,
  output logic           valid,
  input  logic           ready,
  output logic           lost
);
  localparam int unsigned IW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [NCH-1:0]  pend;
  logic [IW-1:0]   ptr, gnt;
  logic            gnt_ok, push, pop;
  hit_word_t       mem [DEPTH];
  logic [AW-1:0]   wr_a, rd_a;
  logic [AW:0]     count;

  // round-robin search starting at ptr
  always_comb begin
    int unsigned idx;
    gnt_ok = 1'b0;
    gnt    = '0;
    for (int unsigned k = 0; k < NCH; k++) begin
      idx = (int'(ptr) + k) % NCH;
      if (!gnt_ok && pend[idx]) begin
        gnt_ok = 1'b1;
        gnt    = IW'(idx);
      end
    end
  end

  assign busy  = pend | hit_valid;
  assign push  = gnt_ok && (count != (AW+1)'(DEPTH));
  assign valid = (count != '0);
  assign pop   = valid && ready;
  assign word  = mem[rd_a];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend  <= '0;
      ptr   <= '0;
      wr_a  <= '0;
      rd_a  <= '0;
      count <= '0;
      lost  <= 1'b0;
    end else begin
      pend <= (pend | hit_valid) & ~(push ? (NCH'(1) << gnt) : '0);
      if (push) begin
        mem[wr_a] <= hit[gnt];
        wr_a      <= (wr_a == AW'(DEPTH-1)) ? '0 : wr_a + 1'b1;
        ptr       <= (gnt == IW'(NCH-1)) ? '0 : gnt + 1'b1;
      end
      if (pop) rd_a <= (rd_a == AW'(DEPTH-1)) ? '0 : rd_a + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (|drop) lost <= 1'b1;
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
