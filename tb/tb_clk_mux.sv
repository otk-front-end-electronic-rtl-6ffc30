`timescale 1ps/1ps
// tb_clk_mux: two clocks of different periods; the output must follow the
// PLL clock with sel = 0 and the external clock with sel = 1, checked at
// many sample points.
module tb_clk_mux;
  logic clk_pll = 1'b0, clk_ext = 1'b0, sel = 1'b0, clk_out;
  int checks = 0, failures = 0;

  clk_mux dut (.*);

  always #289 clk_pll = ~clk_pll;
  always #411 clk_ext = ~clk_ext;

  initial begin
    for (int s = 0; s < 4; s++) begin
      sel = s[0];
      for (int i = 0; i < 50; i++) begin
        #97;
        checks++;
        if (clk_out !== (sel ? clk_ext : clk_pll)) begin failures++; $display("FAIL sel=%b", sel); end
      end
    end
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
