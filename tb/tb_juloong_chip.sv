`timescale 1ps/1ps
// tb_juloong_chip: the 128-channel readout chip at its default size. After
// the PLL locks, pulses are placed on chosen channels at chosen offsets from
// the 43.3 MHz system clock. The serial link is deserialized here from the
// frame marker, and every 48-bit hit word is checked against values worked
// out from the pulse and clock edge times: chip ID, channel, TOA = (first
// clock edge more than ~430 ps after the pulse + 300 ps - pulse) / 35 ps,
// TOT = (width + 300 ps) / 35 ps, CAL = one period in 35 ps steps (codes
// +-1, CAL +-2), bunch ID 1..6 cycles after the CAL edge.
// Scenarios: single hits (normal and deferred TOA), a burst of 24 channels
// at once (round-robin merging, FIFO full), and a second burst on the same
// channels while many words still wait (results dropped, hit_lost). Words of
// the second burst may be dropped; all others must arrive exactly once.
// Mechanisms counted: PLL lock, single, deferred, burst words, FIFO full,
// dropped results.
module tb_juloong_chip;
  import juloong_pkg::*;
  localparam int TREF = 23094;
  localparam int STEP = 35;
  localparam int NCH  = 128;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [4:0] chip_id = 5'd19;
  logic [NCH-1:0] pulse = '0;
  logic pll_lock, link_out, link_frame, hit_lost;

  juloong_chip dut (.*);

  always #(TREF/2) ref_clk = ~ref_clk;

  int checks = 0, failures = 0;
  int n_lock = 0, n_single = 0, n_deferred = 0, n_burst = 0, n_full = 0, n_dropped = 0;
  int n_words = 0;

  typedef struct { int toa, tot, per, cyc; bit optional; } exp_t;
  exp_t exp_q [NCH][$];

  task automatic chk(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------- system clock record
  longint clk_rise [$];
  int     cyc = 0;
  always @(posedge dut.clk_sys) begin
    clk_rise.push_back($time);
    if (clk_rise.size() > 16) void'(clk_rise.pop_front());
    if (rst_n) cyc++;
    if (dut.u_merge.count == (FIFO_FULL_W)'(16)) n_full++;
  end
  localparam int FIFO_FULL_W = 5;

  // ---------------- link receiver
  logic [47:0] sh;
  int nbit = -1;
  always @(negedge dut.clk_sys) if (rst_n) begin
    if (link_frame) begin sh = {47'b0, link_out}; nbit = 1; end
    else if (nbit > 0) begin sh = {sh[46:0], link_out}; nbit++; end
    if (nbit == 48) begin
      hit_word_t w;
      int ch, d;
      bit done;
      w = hit_word_t'(sh);
      nbit = -1;
      n_words++;
      ch = int'(w.channel);
      chk("chip id", int'(w.chip_id), 19, 0);
      done = 1'b0;
      while (!done) begin
        if (exp_q[ch].size() == 0) begin
          failures++; checks++; done = 1'b1;
          $display("FAIL unexpected word for channel %0d", ch);
        end else begin
          exp_t e;
          bit ok;
          e = exp_q[ch][0];
          ok = (int'(w.toa) >= e.toa - 1) && (int'(w.toa) <= e.toa + 1) &&
               (int'(w.tot) >= e.tot - 1) && (int'(w.tot) <= e.tot + 1);
          if (!ok && e.optional) begin
            void'(exp_q[ch].pop_front());   // that result was dropped
          end else begin
            void'(exp_q[ch].pop_front());
            chk("toa", int'(w.toa), e.toa, 1);
            chk("tot", int'(w.tot), e.tot, 1);
            chk("cal", int'(w.cal), e.per, 2);
            d = (int'(w.bunch_id) - e.cyc) & 255;
            chk("bunch id", d, 3, 3);
            done = 1'b1;
          end
        end
      end
    end
  end

  // ---------------- stimulus
  // pulse on channel ch, `off` ps after the next system clock edge
  task automatic expect_hit(input int ch, input longint t0, input longint tr,
                            input longint per, input int wid, input bit optional);
    longint tc;
    exp_t e;
    tc = tr + per;
    while (tc - t0 <= 430) tc = tc + per;
    if (tc - tr > per) n_deferred++;
    e.toa = int'((tc + 300 - t0) / STEP);
    e.tot = int'((wid + 300) / STEP);
    e.per = int'(per / STEP);
    // bunch count at the CAL edge: cycles from now to tc + per
    e.cyc = (cyc + int'((tc + per - tr) / per)) & 255;
    e.optional = optional;
    exp_q[ch].push_back(e);
  endtask

  task automatic single(input int ch, input int off, input int wid);
    longint tr, per;
    @(posedge dut.clk_sys);
    tr  = clk_rise[$];
    per = clk_rise[$] - clk_rise[$-1];
    expect_hit(ch, tr + off, tr, per, wid, 1'b0);
    n_single++;
    #(off) pulse[ch] = 1'b1;
    #(wid) pulse[ch] = 1'b0;
  endtask

  // all channels in chs at the same moment, widths differing per channel
  task automatic burst(input int chs [], input int off, input bit optional);
    longint tr, per;
    @(posedge dut.clk_sys);
    tr  = clk_rise[$];
    per = clk_rise[$] - clk_rise[$-1];
    foreach (chs[k]) expect_hit(chs[k], tr + off, tr, per, 600 + 70 * k, optional);
    #(off);
    foreach (chs[k]) pulse[chs[k]] = 1'b1;
    for (int t = 0; t < 600 + 70 * chs.size(); t += 70) begin
      #70;
      foreach (chs[k]) if (600 + 70 * k <= t + 70) pulse[chs[k]] = 1'b0;
    end
    if (!optional) n_burst += chs.size();
  endtask

  task automatic wait_words();
    // until every non-optional expectation has been met or 200 words' time
    for (int i = 0; i < 200 * 48; i++) begin
      bit left;
      left = 1'b0;
      for (int c = 0; c < NCH; c++)
        foreach (exp_q[c][k]) if (!exp_q[c][k].optional) left = 1'b1;
      if (!left) break;
      @(posedge dut.clk_sys);
    end
    repeat (60) @(posedge dut.clk_sys);
  endtask

  initial begin
    int chs [];
    int left;
    // every asynchronous clear in the TDC controllers needs a falling edge
    #5 pulse = '1;
    #3 pulse = '0;
    #10 rst_n = 1'b0;
    #(2*TREF) rst_n = 1'b1;
    wait (pll_lock);
    n_lock++;
    repeat (20) @(posedge dut.clk_sys);
    // single hits
    single(5,   5000, 2000);  repeat (12) @(posedge dut.clk_sys);
    single(127, 9000, 4000);  repeat (12) @(posedge dut.clk_sys);
    single(0,  22800, 1500);  repeat (12) @(posedge dut.clk_sys);   // ~300 ps before an edge: deferred
    single(64, 15000,  800);  repeat (12) @(posedge dut.clk_sys);
    for (int i = 0; i < 4; i++) begin
      single(int'($urandom % NCH), int'(500 + $urandom % 22000), int'(400 + $urandom % 7000));
      repeat (12) @(posedge dut.clk_sys);
    end
    wait_words();
    // burst of 24 channels
    chs = new[24];
    foreach (chs[k]) chs[k] = 3 + 5 * k;
    burst(chs, 7000, 1'b0);
    // second burst on the same channels while many words still wait
    repeat (10) @(posedge dut.clk_sys);
    burst(chs, 11000, 1'b1);
    wait_words();
    repeat (30 * 48) @(posedge dut.clk_sys);
    // optional expectations never met were dropped results
    left = 0;
    for (int c = 0; c < NCH; c++) begin
      foreach (exp_q[c][k]) begin
        if (exp_q[c][k].optional) n_dropped++;
        else left++;
      end
    end
    chk("words still missing", left, 0, 0);
    chk("hit_lost flag", int'(hit_lost), 1, 0);
    chk("pll lock seen", int'(n_lock > 0), 1, 0);
    chk("single hits", n_single, 8, 0);
    chk("deferred seen", int'(n_deferred > 0), 1, 0);
    chk("burst words", n_burst, 24, 0);
    chk("fifo full seen", int'(n_full > 0), 1, 0);
    chk("dropped seen", int'(n_dropped > 0), 1, 0);
    chk("words received", n_words, 8 + 48 - n_dropped, 0);
    $display("lock=%0d single=%0d deferred=%0d burst=%0d fifo_full_cycles=%0d dropped=%0d words=%0d",
             n_lock, n_single, n_deferred, n_burst, n_full, n_dropped, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
