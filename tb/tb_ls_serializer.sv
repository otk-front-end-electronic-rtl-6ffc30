`timescale 1ps/1ps
// tb_ls_serializer: offers random 128-bit words with valid/ready, some
// back to back and some with gaps, and rebuilds them from sout/frame (bit
// period DIV fast cycles, sampled mid-bit, MSB first). Checks every word
// arrives once and in order, that frame marks only first bits, and that the
// line is low while idle. DIV is reduced to 4 to keep the run short.
module tb_ls_serializer;
  localparam int W = 128, DIV = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] word = '0;
  logic valid = 1'b0, ready, sout, frame;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  logic [W-1:0] rx;
  int bitn = -1, phase = 0, nrx = 0, idle_bits = 0;

  ls_serializer #(.WIDTH(W), .DIV(DIV)) dut (.*);

  always #289 clk = ~clk;

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // sample in the middle of each bit period
  always @(posedge clk) if (rst_n) begin
    if (dut.tick) phase = 0; else phase++;
    if (phase == DIV / 2) begin
      if (frame) begin
        if (bitn > 0) chk("frame in mid-word", W'(bitn), W'(0));
        bitn = 0;
      end
      if (bitn >= 0) begin
        rx = {rx[W-2:0], sout};
        bitn++;
        if (bitn == W) begin
          chk("word", rx, sent.pop_front());
          nrx++;
          bitn = -1;
        end
      end else begin
        idle_bits++;
        checks++;
        if (sout) begin failures++; $display("FAIL line high while idle"); end
      end
    end
  end

  initial begin
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      word = {$urandom, $urandom, $urandom, $urandom};
      valid = 1'b1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(word);
      @(negedge clk) valid = 1'b0;
      if (i % 2 == 1) repeat (DIV * 40) @(posedge clk);
    end
    repeat (DIV * (W + 20)) @(posedge clk);
    chk("words received", W'(nrx), W'(6));
    chk("idle seen", W'(idle_bits > 0), W'(1));
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
