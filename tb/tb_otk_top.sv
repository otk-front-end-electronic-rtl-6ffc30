`timescale 1ps/1ps
// tb_otk_top: full-size end-to-end test of the top level, all parameters at
// their defaults. The three parts of the top run at the same time:
//  - TDC test chip: a 43.3 MHz reference drives the PLL; discriminator
//    pulses are placed at chosen offsets from the TDC clock (the 1.732 GHz
//    clock divided by 40). Both serial outputs are deserialized here: word
//    alignment of the 1.732 Gbit/s stream comes from the idle pattern, the
//    128-bit low-speed frames from the frame marker. Codes are compared with
//    intervals computed from the pulse and clock edge times (35 ps steps,
//    +-1); each raw frame is decoded here independently of the encoder.
//  - 128-channel chip: pulses on a few channels, one pair at the same time;
//    the 43.3 Mbit/s link is deserialized from its frame marker and each
//    48-bit word checked for chip ID, channel, TOT and CAL - TOA.
//  - link aggregation: 32 random chip links through the 8:1 + 4:1 tree; the
//    recorded output stream must match the expected interleaving at exactly
//    one offset, with the frame marker on group 0.
// Mechanisms counted: PLL lock, normal TOA, deferred TOA, stop after 4
// clocks without TOT, idle words, data words, raw frames, low-speed overrun,
// external-clock mode, multi-channel hit words (with two channels merged)
// and aggregated bits.
module tb_otk_top;
  import juloong_pkg::*;
  localparam int TREF = 23094;
  localparam int STEP = 35;

  logic ref_clk = 1'b0, ext_fclk = 1'b0, clk_sel = 1'b0, rst_n = 1'b1, pulse = 1'b0;
  logic pll_lock, hs_out, ls_out, ls_frame, overrun;

  // multi-channel chip and link aggregation stimulus
  logic chip_ref_clk = 1'b0, chip_rst_n = 1'b1;
  logic [4:0] chip_id = 5'd7;
  logic [127:0] chip_pulse = '0;
  logic chip_pll_lock, chip_link_out, chip_link_frame, chip_hit_lost;
  logic agg_clk = 1'b0, agg_rst_n = 1'b1;
  logic [31:0] agg_links = '0;
  logic agg_out, agg_slot0, agg_chip_slot;

  otk_top dut (.*);

  always #(TREF/2) ref_clk = ~ref_clk;
  always #289 ext_fclk = ~ext_fclk;
  always #11547 chip_ref_clk = ~chip_ref_clk;
  always #360 agg_clk = ~agg_clk;     // 1.39 Gbit/s

  int checks = 0, failures = 0;
  int n_lock = 0, n_normal = 0, n_deferred = 0, n_timeout = 0, n_idle = 0;
  int n_data = 0, n_raw = 0, n_overrun = 0, n_ext = 0;
  int n_chip_words = 0, n_merged = 0, n_agg_bits = 0;
  bit chip_done = 1'b0, agg_done = 1'b0;

  typedef struct { int tot, toa, cal, evt; bit tot_missing; } exp_t;
  exp_t exp_hs [$];
  exp_t exp_ls [$];
  int   hit_no = 0;   // hits since reset = raw event number

  task automatic chk(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------- TDC clock edge record
  longint tdc_rise [$];
  always @(posedge dut.u_core.clk_tdc) begin
    tdc_rise.push_back($time);
    if (tdc_rise.size() > 16) void'(tdc_rise.pop_front());
  end

  // ---------------- high-speed receiver
  logic [HS_W-1:0] hs_sh;
  int  hs_bit = -1;
  hs_word_t w;
  always @(posedge dut.u_core.fclk) begin
    hs_sh = {hs_sh[HS_W-2:0], hs_out};
    if (!rst_n) hs_bit = -1;
    else if (hs_bit < 0) begin
      if (hs_sh == {HS_HDR_IDLE, 34'h0}) hs_bit = 0;
    end else begin
      hs_bit++;
      if (hs_bit == HS_W) begin
        hs_bit = 0;
        w = hs_sh;
        if (w.hdr == HS_HDR_IDLE) n_idle++;
        else if (w.hdr == HS_HDR_DATA) begin
          n_data++;
          if (exp_hs.size() == 0) begin failures++; $display("FAIL unexpected data word"); end
          else begin
            exp_t e;
            e = exp_hs.pop_front();
            chk("hs tot_missing", int'(w.tot_missing), int'(e.tot_missing), 0);
            if (!e.tot_missing) chk("hs tot", int'(w.tot), e.tot, 1);
            chk("hs toa", int'(w.toa), e.toa, 1);
            chk("hs cal", int'(w.cal), e.cal, 1);
          end
        end else begin
          failures++; $display("FAIL bad header %b", w.hdr);
        end
      end
    end
  end

  // ---------------- low-speed receiver (independent decode of raw samples)
  function automatic int decode(input tdc_raw_t r);
    logic [STAGES-1:0] s;
    int ones = 0, k;
    for (int i = 0; i < STAGES; i++) begin
      if (r.fine[2*i+1] == r.fine[2*i]) return -1000;   // pair not complementary
      s[i] = r.fine[2*i+1] ^ RO_REST[i];
      ones += s[i];
    end
    if (s == '0)      k = 0;
    else if (s[0])    k = ones;
    else              k = PHASES - ones;
    return int'(r.coarse) * PHASES + k;
  endfunction

  logic [LS_W-1:0] ls_sh;
  int ls_bit = -1, ls_ph = 0;
  ls_word_t lw;
  always @(posedge dut.u_core.fclk) begin
    if (!rst_n) ls_bit = -1;
    else begin
      if (ls_frame && ls_bit < 0) begin ls_bit = 0; ls_ph = 0; end
      if (ls_bit >= 0) begin
        if (ls_ph == 20) begin
          ls_sh = {ls_sh[LS_W-2:0], ls_out};
          ls_bit++;
          if (ls_bit == LS_W) begin
            lw = ls_sh;
            ls_bit = -1;
            n_raw++;
            chk("ls sync", int'(lw.sync), int'(LS_SYNC), 0);
            if (exp_ls.size() == 0) begin failures++; $display("FAIL unexpected raw frame"); end
            else begin
              exp_t e;
              e = exp_ls.pop_front();
              chk("ls evt", int'(lw.evt), e.evt, 0);
              chk("ls tot_missing", int'(lw.tot_missing), int'(e.tot_missing), 0);
              if (!e.tot_missing) chk("ls tot", decode(lw.tot), e.tot, 1);
              chk("ls toa", decode(lw.toa), e.toa, 1);
              chk("ls cal", decode(lw.cal), e.cal, 1);
            end
          end
        end
        ls_ph = (ls_ph == 39) ? 0 : ls_ph + 1;
      end
    end
  end

  // a raw word replaced before the low-speed link took it is lost
  always @(posedge overrun) n_overrun++;

  // ---------------- stimulus
  task automatic hit(input int off, input int wid, input bit expect_tot, input bit keep_raw);
    longint t0, tr, per, tc, tc2;
    exp_t e;
    @(posedge dut.u_core.clk_tdc);
    tr  = tdc_rise[$];
    per = tdc_rise[$] - tdc_rise[$-1];
    t0  = tr + off;
    // first TDC clock rising edge more than ~430 ps after the pulse, and the next
    tc  = tr + per;
    if (tc - t0 <= 430) begin tc = tc + per; n_deferred++; end else n_normal++;
    tc2 = tc + per;
    e.toa = int'((tc + 300 - t0) / STEP);
    e.cal = int'((tc2 + 300 - t0) / STEP);
    e.tot = int'((wid + 300) / STEP);
    e.tot_missing = !expect_tot;
    e.evt = hit_no % 128;
    hit_no++;
    if (!expect_tot) n_timeout++;
    exp_hs.push_back(e);
    if (keep_raw) exp_ls.push_back(e);
    #(off);
    pulse = 1'b1;
    #(wid) pulse = 1'b0;
    repeat (6) @(posedge dut.u_core.clk_tdc);
  endtask

  task automatic wait_raw_frames();
    repeat (140) @(posedge dut.u_core.clk_tdc);
  endtask

  task automatic start(input bit sel);
    clk_sel = sel;
    // every asynchronous clear in the TDC controller needs a falling edge
    #5 pulse = 1'b1;
    #3 pulse = 1'b0;
    #10 rst_n = 1'b0;
    #(2*TREF) rst_n = 1'b1;
    hit_no = 0;
  endtask




  // ---------------- multi-channel chip
  typedef struct { int ch, tot; } chip_exp_t;
  chip_exp_t chip_q [$];
  logic [47:0] csh;
  int cbit = -1;

  always @(negedge dut.u_chip.clk_sys) if (chip_rst_n) begin
    if (chip_link_frame) begin csh = {47'b0, chip_link_out}; cbit = 1; end
    else if (cbit > 0) begin csh = {csh[46:0], chip_link_out}; cbit++; end
    if (cbit == 48) begin
      hit_word_t cw;
      int found;
      cw = hit_word_t'(csh);
      cbit = -1;
      n_chip_words++;
      chk("chip id", int'(cw.chip_id), 7, 0);
      chk("chip cal - toa", int'(cw.cal), TREF / STEP, 2);
      found = -1;
      foreach (chip_q[k]) if (chip_q[k].ch == int'(cw.channel)) found = k;
      checks++;
      if (found < 0) begin
        failures++; $display("FAIL chip word for channel %0d not expected", cw.channel);
      end else begin
        chk("chip tot", int'(cw.tot), chip_q[found].tot, 1);
        chip_q.delete(found);
      end
    end
  end

  task automatic chip_hit(input int cha, input int chb, input int wid);
    @(posedge dut.u_chip.clk_sys);
    #5000;
    chip_q.push_back('{cha, (wid + 300) / STEP});
    chip_pulse[cha] = 1'b1;
    if (chb >= 0) begin
      chip_q.push_back('{chb, (wid + 600) / STEP});
      chip_pulse[chb] = 1'b1;
      n_merged++;
    end
    #(wid) chip_pulse[cha] = 1'b0;
    #300 if (chb >= 0) chip_pulse[chb] = 1'b0;
    repeat (150) @(posedge dut.u_chip.clk_sys);
  endtask

  initial begin
    #5 chip_pulse = '1;
    #3 chip_pulse = '0;
    #10 chip_rst_n = 1'b0;
    #(2*TREF) chip_rst_n = 1'b1;
    wait (chip_pll_lock);
    repeat (20) @(posedge dut.u_chip.clk_sys);
    chip_hit(17, -1, 2100);
    chip_hit(100, 33, 1200);
    chip_hit(127, -1, 3000);
    chk("all chip words", chip_q.size(), 0, 0);
    chip_done = 1'b1;
  end

  // ---------------- link aggregation
  localparam int NL = 32, N1 = 8, NG = 4, AGG_FRAMES = 60;
  logic [NL-1:0] agg_sampled [$];
  logic agg_bits [$];
  logic agg_s0 [$];

  always @(posedge agg_clk) if (agg_rst_n && !agg_done) begin
    agg_bits.push_back(agg_out);
    agg_s0.push_back(agg_slot0);
    if (agg_chip_slot) agg_sampled.push_back(agg_links);
  end

  initial begin
    int n_match, nbits;
    logic ok, s0ok;
    #10 agg_rst_n = 1'b0;
    #1000 agg_rst_n = 1'b1;
    while (agg_sampled.size() < AGG_FRAMES) begin
      @(posedge agg_clk);
      if (agg_chip_slot === 1'b1) begin
        @(negedge agg_clk);
        agg_links = {$urandom};
      end
    end
    repeat (2 * NL) @(posedge agg_clk);
    nbits = (AGG_FRAMES - 2) * NL;
    n_match = 0;
    for (int off = 0; off <= 200; off++) begin
      ok = 1'b1; s0ok = 1'b1;
      for (int k = 0; k < nbits; k++) begin
        int f, j, g;
        f = k / NL; j = (k % NL) / NG; g = k % NG;
        if (off + k >= agg_bits.size()) begin ok = 1'b0; break; end
        if (agg_bits[off + k] !== agg_sampled[f][g * N1 + j]) begin ok = 1'b0; break; end
        if (agg_s0[off + k] !== (g == 0)) s0ok = 1'b0;
      end
      if (ok) begin
        n_match++;
        n_agg_bits = nbits;
        chk("aggregate frame marker", int'(s0ok), 1, 0);
      end
    end
    chk("aggregate stream alignments", n_match, 1, 0);
    agg_done = 1'b1;
  end

  initial begin
    // ---- PLL mode
    start(1'b0);
    wait (pll_lock);
    n_lock++;
    repeat (20) @(posedge dut.u_core.clk_tdc);
    hit(5000,   3000, 1, 1);   wait_raw_frames();
    hit(0,      2000, 1, 1);   wait_raw_frames();   // on an edge: deferred
    hit(TREF-400, 1500, 1, 1); wait_raw_frames();   // 400 ps early: deferred
    hit(9000,    150, 0, 1);   wait_raw_frames();   // too narrow: stopped
    // three hits within one raw frame: the first is sent at once, the second
    // waits and is replaced by the third (overrun), so its raw word is lost
    hit(7000,   2500, 1, 1);
    hit(3000,   4000, 1, 0);
    hit(12000,  1800, 1, 1);
    wait_raw_frames(); wait_raw_frames();
    hit(15000,  1200, 1, 1);   wait_raw_frames();
    chk("all hs words", exp_hs.size(), 0, 0);
    chk("all raw frames", exp_ls.size(), 0, 0);
    // ---- external clock mode
    start(1'b1);
    repeat (20) @(posedge dut.u_core.clk_tdc);
    hit(11000,  2222, 1, 1);   wait_raw_frames();
    n_ext++;
    chk("all hs words ext", exp_hs.size(), 0, 0);
    chk("all raw frames ext", exp_ls.size(), 0, 0);
    // ---- every mechanism seen
    chk("pll lock seen", n_lock > 0, 1, 0);
    chk("normal seen", n_normal > 0, 1, 0);
    chk("deferred seen", n_deferred > 0, 1, 0);
    chk("timeout seen", n_timeout > 0, 1, 0);
    chk("idle seen", n_idle > 0, 1, 0);
    chk("data words", n_data, 9, 0);
    chk("raw frames", n_raw, 8, 0);
    chk("overrun seen", n_overrun > 0, 1, 0);
    chk("ext mode seen", n_ext > 0, 1, 0);
    wait (chip_done && agg_done);
    chk("chip words", n_chip_words, 4, 0);
    chk("merged chip hits", n_merged, 1, 0);
    chk("aggregated bits", n_agg_bits > 1000, 1, 0);
    $display("lock=%0d normal=%0d deferred=%0d timeout=%0d idle=%0d data=%0d raw=%0d overrun=%0d ext=%0d chipwords=%0d merged=%0d aggbits=%0d",
             n_lock, n_normal, n_deferred, n_timeout, n_idle, n_data, n_raw, n_overrun, n_ext,
             n_chip_words, n_merged, n_agg_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
