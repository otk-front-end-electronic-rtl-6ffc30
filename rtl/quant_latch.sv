`timescale 1ps/1ps
// quant_latch: one bank of the TDC's quantization latches. Each ring stage
// goes through a single-to-differential cell into an SR latch whose S and R
// inputs are NAND-gated by the latch pulse. While en (CLK_latch1, CLK_latch2
// or TOT_latch) is high the latch follows its input; when en falls it holds.
// The design uses three such banks: TOT, TOA/CAL (written by CLK_latch1) and
// the TOA copy (CLK_latch2 reads the TOA/CAL bank). The coarse count is held
// the same way. Output: fine[2i+1] = Q, fine[2i] = Q-bar of stage i.
// Level-sensitive latches are intended: the latch structure is the design's.
// Interface: d is the ring state (or the previous bank's Q outputs); timing
// is set by the en pulse width (~300 ps).
module quant_latch
  import juloong_pkg::*;
#(
  parameter int unsigned N  = STAGES,
  parameter int unsigned CW = COARSE_W
) (
  input  logic            en,
  input  logic [N-1:0]    d,
  input  logic [CW-1:0]   cnt_d,
  output logic [2*N-1:0]  fine,
  output logic [CW-1:0]   cnt_q
);
  logic [N-1:0] q;

  always_latch begin
    if (en) begin
      q     = d;
      cnt_q = cnt_d;
    end
  end

  // Q / Q-bar pairs of the SR latches
  always_comb begin
    for (int i = 0; i < N; i++) begin
      fine[2*i+1] = q[i];
      fine[2*i]   = ~q[i];
    end
  end
endmodule
