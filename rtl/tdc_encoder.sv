`timescale 1ps/1ps
// tdc_encoder: turns one latched sample (30 Q/Q-bar bits + 6-bit coarse
// count) into an 11-bit binary time code.
// Step 1 reorders the pairs into a 30-bit thermometer code. With
// s[i] = Q[i] xor rest[i] (stage i has flipped since the ring started), the
// code is {~s[0..14], s[0..14]} read left to right: 1^15 0^15 at rest,
// 0 1^15 0^14 after one flip, 0^15 1^15 after fifteen, 1 0^15 1^14 after
// sixteen -- a 15-ones window rotating once per ring period. Step 2 reads
// the phase k (0..29) from the left half: with L ones in it, k = 15-L when
// its first bit is 0, else k = 0 (L = 15) or L+15. Counting ones rather
// than finding an edge tolerates bubbles. Step 3: code = coarse*30 + k.
// Combinational. The thermometer reordering follows the design description;
// the popcount decoder and the coarse*30 + fine code are this design's own.
module tdc_encoder
  import juloong_pkg::*;
(
  input  logic [FINE_W-1:0]   fine,
  input  logic [COARSE_W-1:0] coarse,
  output logic [CODE_W-1:0]   code,
  output logic [FINE_W-1:0]   therm     // reordered thermometer, bit 29 = leftmost
);
  logic [STAGES-1:0] s;
  logic [4:0]        ones;
  logic [4:0]        k;

  always_comb begin
    for (int i = 0; i < STAGES; i++) begin
      // pick Q or Q-bar so that 1 means "stage i has flipped"
      s[i] = RO_REST[i] ? fine[2*i] : fine[2*i+1];
      therm[FINE_W-1-i]      = ~s[i];
      therm[STAGES-1-i]      =  s[i];
    end
    ones = '0;
    for (int i = 0; i < STAGES; i++) ones += 5'(therm[FINE_W-1-i]);
    if (!therm[FINE_W-1])          k = 5'(STAGES) - ones;
    else if (ones == 5'(STAGES))   k = '0;
    else                           k = ones + 5'(STAGES);
    code = CODE_W'(coarse) * CODE_W'(PHASES) + CODE_W'(k);
  end
endmodule
