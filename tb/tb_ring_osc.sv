`timescale 1ps/1ps
// tb_ring_osc: checks the ring oscillator model. With RO_key low the ring
// must rest at 101010101010101; after RO_key rises, n stage delays later the
// first n stages (n <= 15) have flipped, then the flip wave returns
// (stages n-15 .. 14 flipped), giving a period of 30 delays. The expected
// state is built here from that rule and sampled mid-step. Dropping RO_key
// must bring the ring back to rest.
module tb_ring_osc;
  import juloong_pkg::*;
  localparam int D = 35;
  logic ro_key = 1'b0;
  logic [STAGES-1:0] node;
  int checks = 0, failures = 0;

  ring_osc dut (.ro_key, .node);

  function automatic logic [STAGES-1:0] expect_state(input int n);
    int k = n % PHASES;
    logic [STAGES-1:0] s = '0;
    for (int i = 0; i < STAGES; i++)
      if (k <= STAGES ? (i < k) : (i >= k - STAGES)) s[i] = 1'b1;
    return RO_REST ^ s;
  endfunction

  initial begin
    #(D * 20);
    checks++; if (node !== RO_REST) begin failures++; $display("FAIL rest %b", node); end
    ro_key = 1'b1;
    #(D / 2);
    for (int n = 0; n < 95; n++) begin
      checks++;
      if (node !== expect_state(n)) begin
        failures++;
        $display("FAIL n=%0d got %b exp %b", n, node, expect_state(n));
      end
      #(D);
    end
    ro_key = 1'b0;
    #(D * 40);
    checks++; if (node !== RO_REST) begin failures++; $display("FAIL back to rest %b", node); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
