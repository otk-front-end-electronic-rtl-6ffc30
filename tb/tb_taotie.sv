`timescale 1ps/1ps
// tb_taotie: eight lanes of random bits, each held for 8 output periods,
// with ce high in three of four cycles to exercise the enable. The output
// stream is rebuilt here: after each slot0, the next 8 output bits must be
// lanes 0..7 of the bits captured at the start of that slot cycle.
module tb_taotie;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0;
  logic [N-1:0] din = '0;
  logic dout, slot0;
  int checks = 0, failures = 0, cyc = 0, nce = 0, frames = 0;
  logic [N-1:0] lanes_q [$];
  logic [N-1:0] cur;
  int pos = -1;

  taotie #(.N_IN(N)) dut (.*);

  always #300 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ce) begin
      // a new slot cycle starts when the slot counter is 0: record the lanes
      if (nce % N == 0) lanes_q.push_back(din);
      nce++;
    end
    // check outputs one cycle after the ce that produced them
  end

  logic ce_q = 1'b0;
  always @(negedge clk) if (rst_n && ce_q) begin
    if (slot0) begin cur = lanes_q.pop_front(); pos = 0; frames++; end
    if (pos >= 0 && pos < N) begin
      checks++;
      if (dout !== cur[pos]) begin failures++; $display("FAIL lane %0d", pos); end
      pos++;
    end
  end
  always @(posedge clk) ce_q <= ce;

  initial begin
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    repeat (200 * N) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0;
      // lanes change right after the last slot of a cycle was clocked
      if (ce && (nce % N == 0)) din = N'($urandom);
    end
    checks++;
    if (frames < 100) begin failures++; $display("FAIL too few frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
