`timescale 1ps/1ps
// tb_quant_latch: the latch bank must follow its inputs while en is high,
// hold them after en falls whatever the inputs do, and give complementary
// Q / Q-bar pairs (fine[2i+1] = d[i], fine[2i] = ~d[i]).
module tb_quant_latch;
  import juloong_pkg::*;
  logic en = 1'b0;
  logic [STAGES-1:0] d;
  logic [COARSE_W-1:0] cnt_d;
  logic [FINE_W-1:0] fine;
  logic [COARSE_W-1:0] cnt_q;
  int checks = 0, failures = 0;

  quant_latch dut (.en, .d, .cnt_d, .fine, .cnt_q);

  task automatic chk(input logic [STAGES-1:0] ed, input logic [COARSE_W-1:0] ec);
    logic [FINE_W-1:0] ef;
    for (int i = 0; i < STAGES; i++) begin ef[2*i+1] = ed[i]; ef[2*i] = ~ed[i]; end
    checks++;
    if (fine !== ef || cnt_q !== ec) begin
      failures++;
      $display("FAIL fine %h exp %h cnt %0d exp %0d", fine, ef, cnt_q, ec);
    end
  endtask

  initial begin
    logic [STAGES-1:0] held;
    logic [COARSE_W-1:0] heldc;
    for (int r = 0; r < 20; r++) begin
      en = 1'b1;
      for (int j = 0; j < 4; j++) begin
        d = STAGES'($urandom); cnt_d = COARSE_W'($urandom);
        #10 chk(d, cnt_d);          // transparent
      end
      held = d; heldc = cnt_d;
      en = 1'b0;
      for (int j = 0; j < 4; j++) begin
        #5 d = STAGES'($urandom); cnt_d = COARSE_W'($urandom);
        #5 chk(held, heldc);        // opaque
      end
    end
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
