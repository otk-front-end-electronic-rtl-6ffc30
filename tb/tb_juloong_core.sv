`timescale 1ps/1ps
// tb_juloong_core: end-to-end run of the single-channel TDC test chip at its
// default parameters. A 43.3 MHz reference drives the PLL; discriminator
// pulses are placed at chosen offsets from the TDC clock (the 1.732 GHz
// clock divided by 40 in the high-speed serializer). The testbench
// deserializes both outputs on its own: it finds word alignment of the
// 1.732 Gbit/s stream from the idle pattern, and reads 128-bit low-speed
// frames from the frame marker. Each data word's TOT/TOA/CAL codes are
// compared with intervals computed from the pulse and TDC clock edge times
// (35 ps steps, +-1), and each raw frame is decoded here, independently of
// the encoder, and must give the same codes.
// Mechanisms that must each occur: PLL lock, normal TOA, deferred TOA
// (pulse close before a clock edge), stop after 4 clocks without TOT, idle
// words, raw frames, low-speed overrun (hits closer than one raw frame) and
// the external-clock mode.
module tb_juloong_core;
  import juloong_pkg::*;
  localparam int TREF = 23094;
  localparam int STEP = 35;

  logic ref_clk = 1'b0, ext_fclk = 1'b0, clk_sel = 1'b0, rst_n = 1'b1, pulse = 1'b0;
  logic pll_lock, hs_out, ls_out, ls_frame, overrun;

  juloong_core dut (.*);

  always #(TREF/2) ref_clk = ~ref_clk;
  always #289 ext_fclk = ~ext_fclk;

  int checks = 0, failures = 0;
  int n_lock = 0, n_normal = 0, n_deferred = 0, n_timeout = 0, n_idle = 0;
  int n_data = 0, n_raw = 0, n_overrun = 0, n_ext = 0;

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
  always @(posedge dut.clk_tdc) begin
    tdc_rise.push_back($time);
    if (tdc_rise.size() > 16) void'(tdc_rise.pop_front());
  end

  // ---------------- high-speed receiver
  logic [HS_W-1:0] hs_sh;
  int  hs_bit = -1;
  hs_word_t w;
  always @(posedge dut.fclk) begin
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
  always @(posedge dut.fclk) begin
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
    @(posedge dut.clk_tdc);
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
    repeat (6) @(posedge dut.clk_tdc);
  endtask

  task automatic wait_raw_frames();
    repeat (140) @(posedge dut.clk_tdc);
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



  initial begin
    // ---- PLL mode
    start(1'b0);
    wait (pll_lock);
    n_lock++;
    repeat (20) @(posedge dut.clk_tdc);
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
    repeat (20) @(posedge dut.clk_tdc);
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
    $display("lock=%0d normal=%0d deferred=%0d timeout=%0d idle=%0d data=%0d raw=%0d overrun=%0d ext=%0d",
             n_lock, n_normal, n_deferred, n_timeout, n_idle, n_data, n_raw, n_overrun, n_ext);
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
