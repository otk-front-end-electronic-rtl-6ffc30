`timescale 1ps/1ps
// tb_latch_pulse_gen: measures the widths of the generated pulses.
// CLK_latch1: 300 ps when the gate opens well before a reference edge;
// 250 ps when gate_en rises 400 ps before the edge (it reaches the gate
// 450 ps later, 50 ps after the edge); none when gate_en rises at the edge.
// CLK_latch2: 300 ps after a falling reference edge, only with l2_en.
// TOT_latch: 300 ps after the pulse falls; as wide as the pulse for a
// 150 ps pulse; none with RO_key low. The *_dly outputs lag by 280 ps.
module tb_latch_pulse_gen;
  logic clk_ref = 1'b0, pulse = 1'b0, ro_key = 1'b0, gate_en = 1'b0, l2_en = 1'b0;
  logic clk_latch1, clk_latch1_dly, clk_latch2, tot_latch, tot_latch_dly;
  int checks = 0, failures = 0;
  longint r1, f1, r2, f2, rt, ft, rd;
  int n1 = 0, n2 = 0, nt = 0;

  latch_pulse_gen dut (.*);

  always @(posedge clk_latch1) begin r1 = $time; n1++; end
  always @(negedge clk_latch1) f1 = $time;
  always @(posedge clk_latch2) begin r2 = $time; n2++; end
  always @(negedge clk_latch2) f2 = $time;
  always @(posedge tot_latch)  begin rt = $time; nt++; end
  always @(negedge tot_latch)  ft = $time;
  always @(posedge clk_latch1_dly) rd = $time;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  task automatic ref_cycle();   // rising edge now, 10 ns period
    clk_ref = 1'b1; #5000 clk_ref = 1'b0; #5000;
  endtask

  initial begin
    #2000;
    // full latch1 pulse
    gate_en = 1'b1;
    #1000 ref_cycle();
    chk("latch1 count", n1, 1);
    chk("latch1 width", f1 - r1, 300);
    chk("latch1 dly lag", rd - r1, 280);
    chk("latch1 at edge", r1, 3000);
    gate_en = 1'b0; #2000;
    // gate opened 400 ps before the edge -> short pulse
    gate_en = 1'b1; #400;
    ref_cycle();
    chk("short count", n1, 2);
    chk("short width", f1 - r1, 250);
    gate_en = 1'b0; #2000;
    // gate opened at the edge -> no pulse
    gate_en = 1'b1;
    ref_cycle();
    chk("none count", n1, 2);
    // latch2 only with l2_en
    chk("latch2 none", n2, 0);
    l2_en = 1'b1;
    ref_cycle();
    chk("latch2 count", n2, 1);
    chk("latch2 width", f2 - r2, 300);
    l2_en = 1'b0; gate_en = 1'b0;
    // TOT_latch
    ro_key = 1'b1;
    pulse = 1'b1; #2000 pulse = 1'b0;
    #1000;
    chk("tot count", nt, 1);
    chk("tot start", rt, 49400);
    chk("tot width", ft - rt, 300);
    pulse = 1'b1; #150 pulse = 1'b0;
    #1000;
    chk("narrow tot count", nt, 2);
    chk("narrow tot width", ft - rt, 150);
    ro_key = 1'b0;
    pulse = 1'b1; #1000 pulse = 1'b0;
    #1000;
    chk("no tot without key", nt, 2);
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
