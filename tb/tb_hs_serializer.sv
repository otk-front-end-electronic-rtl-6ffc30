`timescale 1ps/1ps
// tb_hs_serializer: feeds random 40-bit words, one per frame_ce, and
// rebuilds them from sout (MSB first, bit 39 in the cycle after the load).
// Also checks that frame_ce comes every 40 fast cycles and that clk_ref has
// a period of 40 cycles and is high for 20 of them.
module tb_hs_serializer;
  localparam int W = 40;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] word;
  logic frame_ce, sout, clk_ref;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  logic [W-1:0] rx;
  int bitn = -1, cyc = 0, last_ce = -1, last_rise = -1, high_cnt = 0;
  logic clk_ref_q = 1'b0;

  hs_serializer dut (.*);

  always #289 clk = ~clk;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0h exp %0h", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // receiver: sample the bit on the line during this cycle
    if (bitn >= 0) begin
      rx = {rx[W-2:0], sout};
      bitn++;
      if (bitn == W) begin
        chk("word", rx, sent.pop_front());
        bitn = 0;
      end
    end
    if (frame_ce) begin
      if (last_ce >= 0) chk("frame period", cyc - last_ce, W);
      last_ce = cyc;
      sent.push_back(word);
      if (bitn < 0) bitn = 0;
      word <= {$urandom, 8'($urandom)};
    end
    if (clk_ref) high_cnt++;
    if (clk_ref && !clk_ref_q) begin
      if (last_rise >= 0) begin
        chk("clk_ref period", cyc - last_rise, W);
        chk("clk_ref high", high_cnt - 1, W / 2);
      end
      last_rise = cyc;
      high_cnt = 1;
    end
    clk_ref_q <= clk_ref;
  end

  initial begin
    word = 40'h12_3456_789A;
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    repeat (40 * 30) @(posedge clk);
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
