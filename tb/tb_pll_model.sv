`timescale 1ps/1ps
// tb_pll_model: 43.3 MHz reference in; checks that lock rises, that after
// lock every reference period holds exactly 40 output rising edges, the
// first one aligned with the reference edge, and that reset drops lock and
// stops the output.
module tb_pll_model;
  localparam int T = 23094;
  logic ref_clk = 1'b0, rst_n = 1'b1, clk_out, lock;
  int checks = 0, failures = 0;
  int edges = 0;

  pll_model dut (.*);

  always #(T/2) ref_clk = ~ref_clk;
  always @(posedge clk_out) edges++;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    repeat (5) @(posedge ref_clk);
    chk("locked", lock, 1);
    for (int i = 0; i < 10; i++) begin
      @(posedge ref_clk);
      #1;
      chk("aligned", clk_out, 1);
      edges = 1;
      @(posedge ref_clk);
      chk("edges per period", edges, 40);
      #1 edges = 1;
    end
    @(negedge ref_clk);
    #(T/2 - 100) rst_n = 1'b0;
    #200 chk("unlocked", lock, 0);
    edges = 0;
    #(3*T) chk("no output in reset", edges, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
