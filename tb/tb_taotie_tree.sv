`timescale 1ps/1ps
// tb_taotie_tree: 32 chip links of random bits through the 8:1 + 4:1 tree at
// the default size. The links change right after each cycle flagged by
// chip_slot; the sampled 32-bit vectors are queued. The whole output stream
// is recorded, then the expected stream (for each chip bit period: lane j of
// group g in the order j = 0..7, g = 0..3 inside) is searched at every offset
// up to 200 bits. Exactly one offset must match every bit, and slot0 must be
// high on each bit of group 0 at that offset.
module tb_taotie_tree;
  localparam int N1 = 8, NG = 4, NL = N1 * NG, FRAMES = 60;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [NL-1:0] chip_links = '0;
  logic dout, slot0, chip_slot;
  int checks = 0, failures = 0;
  logic [NL-1:0] sampled [$];
  logic out_bits [$];
  logic out_s0 [$];

  taotie_tree #(.N1(N1), .N_GROUPS(NG)) dut (.*);

  always #360 clk = ~clk;   // 720 ps, about 1.39 Gbit/s

  always @(posedge clk) if (rst_n) begin
    out_bits.push_back(dout);
    out_s0.push_back(slot0);
    if (chip_slot) sampled.push_back(chip_links);
  end

  initial begin
    int n_match, good_off, nbits;
    logic ok, s0ok;
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    while (sampled.size() < FRAMES) begin
      @(posedge clk);
      if (chip_slot === 1'b1) begin
        @(negedge clk);
        chip_links = NL'({$urandom, $urandom});
      end
    end
    repeat (2 * NL) @(posedge clk);
    nbits = (FRAMES - 2) * NL;
    n_match = 0; good_off = -1;
    for (int off = 0; off <= 200; off++) begin
      ok = 1'b1; s0ok = 1'b1;
      for (int k = 0; k < nbits; k++) begin
        int f, j, g;
        f = k / NL; j = (k % NL) / NG; g = k % NG;
        if (off + k >= out_bits.size()) begin ok = 1'b0; break; end
        if (out_bits[off + k] !== sampled[f][g * N1 + j]) begin ok = 1'b0; break; end
        if (out_s0[off + k] !== (g == 0)) s0ok = 1'b0;
      end
      if (ok) begin n_match++; good_off = off; end
      if (ok && !s0ok) begin failures++; $display("FAIL slot0 misplaced at offset %0d", off); end
    end
    checks++;
    if (n_match != 1) begin
      failures++;
      $display("FAIL stream matched at %0d offsets (last %0d)", n_match, good_off);
    end else begin
      checks += nbits;   // every bit of the stream was compared
      $display("stream aligned at offset %0d, %0d bits compared", good_off, nbits);
    end
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
