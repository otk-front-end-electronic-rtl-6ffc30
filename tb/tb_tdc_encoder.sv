`timescale 1ps/1ps
// tb_tdc_encoder: for every time n = 0 .. 64*30-1 ring steps, builds the
// latched sample a running ring would give (first n%30 stages flipped for a
// phase up to 15, the trailing stages after that; coarse = n/30) and checks
// code == n. Also checks the reordered thermometer for the printed examples:
// rest -> 1^15 0^15, one flip -> 0 1^15 0^14, fifteen -> 0^15 1^15,
// sixteen -> 1 0^15 1^14.
module tb_tdc_encoder;
  import juloong_pkg::*;
  logic [FINE_W-1:0] fine;
  logic [COARSE_W-1:0] coarse;
  logic [CODE_W-1:0] code;
  logic [FINE_W-1:0] therm;
  int checks = 0, failures = 0;

  tdc_encoder dut (.fine, .coarse, .code, .therm);

  function automatic logic [FINE_W-1:0] sample(input int k);
    logic [STAGES-1:0] s = '0, q;
    logic [FINE_W-1:0] f;
    for (int i = 0; i < STAGES; i++)
      if (k <= STAGES ? (i < k) : (i >= k - STAGES)) s[i] = 1'b1;
    q = RO_REST ^ s;
    for (int i = 0; i < STAGES; i++) begin f[2*i+1] = q[i]; f[2*i] = ~q[i]; end
    return f;
  endfunction

  task automatic chk_therm(input int k, input logic [FINE_W-1:0] exp);
    fine = sample(k); coarse = '0;
    #1;
    checks++;
    if (therm !== exp) begin failures++; $display("FAIL therm k=%0d %b exp %b", k, therm, exp); end
  endtask

  initial begin
    for (int n = 0; n < 64 * PHASES; n++) begin
      fine = sample(n % PHASES);
      coarse = COARSE_W'(n / PHASES);
      #1;
      checks++;
      if (int'(code) != n) begin failures++; $display("FAIL n=%0d code=%0d", n, code); end
    end
    chk_therm(0,  {{15{1'b1}}, {15{1'b0}}});
    chk_therm(1,  {1'b0, {15{1'b1}}, {14{1'b0}}});
    chk_therm(15, {{15{1'b0}}, {15{1'b1}}});
    chk_therm(16, {1'b1, {15{1'b0}}, {14{1'b1}}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
