`timescale 1ps/1ps
// tb_tdc_ctrl: drives the controller's latch-pulse inputs directly and
// checks its sequencing: RO_key and the clock gate open on the pulse's rising
// edge; a CLK_latch1 pulse judged too short is not counted; the first valid
// one arms CLK_latch2 (l2_en) until a CLK_latch2 pulse has passed; the second
// valid one closes the gate; a valid TOT_latch then stops the measurement
// (RO_key low, done toggled, tot_missing = 0). A second event without TOT
// must stop at the 4th reference rising edge with tot_missing = 1.
module tb_tdc_ctrl;
  logic rst_n = 1'b1, pulse = 1'b0, clk_ref = 1'b0;
  logic clk_latch1 = 1'b0, clk_latch1_dly = 1'b0, clk_latch2 = 1'b0;
  logic tot_latch = 1'b0, tot_latch_dly = 1'b0;
  logic ro_key, gate_en, l2_en, done_tgl, tot_missing, cal_missing;
  int checks = 0, failures = 0;

  tdc_ctrl dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  // a latch pulse on sig, judged valid (dly high at its fall) or not
  task automatic l1(input bit valid);
    clk_latch1 = 1'b1; clk_latch1_dly = valid;
    #300 clk_latch1 = 1'b0;
    #10 clk_latch1_dly = 1'b0;
  endtask

  task automatic clk_edge();
    #100 clk_ref = 1'b1;
    #100 clk_ref = 1'b0;
  endtask

  initial begin
    logic d0;
    #5 pulse = 1'b1;
    #5 pulse = 1'b0;
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    chk("idle key", ro_key, 1'b0);
    d0 = done_tgl;
    // --- event 1: complete measurement
    #100 pulse = 1'b1;
    #1 chk("key on pulse", ro_key, 1'b1);
    chk("gate open", gate_en, 1'b1);
    chk("l2 idle", l2_en, 1'b0);
    clk_edge();
    l1(1'b0);                       // too short: not counted
    #1 chk("short latch1 ignored", l2_en, 1'b0);
    clk_edge();
    l1(1'b1);                       // TOA
    #1 chk("l2 armed", l2_en, 1'b1);
    chk("gate still open", gate_en, 1'b1);
    #100 clk_latch2 = 1'b1;
    #300 clk_latch2 = 1'b0;
    #1 chk("l2 done", l2_en, 1'b0);
    pulse = 1'b0;
    clk_edge();
    l1(1'b1);                       // CAL (3rd reference edge)
    #1 chk("gate closed", gate_en, 1'b0);
    chk("still running", ro_key, 1'b1);
    tot_latch = 1'b1; tot_latch_dly = 1'b1;
    #300 tot_latch = 1'b0;
    #1 chk("stopped", ro_key, 1'b0);
    chk("done toggled", done_tgl, ~d0);
    chk("tot ok", tot_missing, 1'b0);
    chk("cal ok", cal_missing, 1'b0);
    tot_latch_dly = 1'b0;
    // --- event 2: no TOT_latch, stop at the 4th reference edge
    d0 = done_tgl;
    #100 pulse = 1'b1;
    for (int e = 1; e <= 4; e++) begin
      clk_edge();
      if (e <= 2) l1(1'b1);
      #1 chk("running until 4th edge", ro_key, e < 4);
    end
    chk("done toggled 2", done_tgl, ~d0);
    chk("tot missing", tot_missing, 1'b1);
    chk("cal ok 2", cal_missing, 1'b0);
    pulse = 1'b0;
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
