`timescale 1ps/1ps
// tb_tdc_channel: drives one TDC channel with a 43.3 MHz reference and
// discriminator pulses at chosen offsets and widths, and checks TOT, TOA and
// CAL codes against times worked out here from the delays of the model:
// code = floor(interval / 35 ps), where TOT closes 300 ps after the pulse
// falls, TOA 300 ps after the first reference rising edge that comes more
// than ~430 ps after the pulse (450 ps gate setup less the 280 ps validity
// margin against a 300 ps pulse), and CAL one period later. Codes may differ
// by one step. Covered: normal hits, the three TOA boundary cases (pulse on,
// slightly before and well before a clock edge), a pulse too narrow to make
// TOT_latch (stopped after 4 reference edges), and a TOT longer than the stop
// window.
module tb_tdc_channel;
  import juloong_pkg::*;
  localparam int T     = 23094;  // 43.3 MHz period, ps
  localparam int STEP  = 35;

  logic rst_n = 1'b1, clk_ref = 1'b0, pulse = 1'b0;
  logic [CODE_W-1:0] tot_code, toa_code, cal_code;
  tdc_raw_t tot_raw, toa_raw, cal_raw;
  logic done_tgl, tot_missing, cal_missing;

  int checks = 0, failures = 0;
  int n_normal = 0, n_deferred = 0, n_timeout = 0;

  tdc_channel dut (.*);

  always #(T/2) clk_ref = ~clk_ref;

  task automatic check(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Pulse rises `off` ps after a reference rising edge, lasts `w` ps.
  task automatic hit(input int off, input int w, input bit expect_tot);
    longint tr, t0, tc;
    int exp_toa, exp_cal, exp_tot;
    logic d0;
    @(posedge clk_ref);
    tr = $time;
    #(off);
    t0 = $time;
    d0 = done_tgl;
    pulse = 1'b1;
    fork
      begin #(w) pulse = 1'b0; end
    join_none
    tc = tr + T;
    if (tc - t0 <= 430) begin tc = tc + T; n_deferred++; end else n_normal++;
    exp_toa = int'((tc + 300 - t0) / STEP);
    exp_cal = int'((tc + T + 300 - t0) / STEP);
    exp_tot = int'((w + 300) / STEP);
    wait (done_tgl != d0);
    #100;
    check("toa", int'(toa_code), exp_toa, 1);
    check("cal", int'(cal_code), exp_cal, 1);
    check("cal-toa", int'(cal_code) - int'(toa_code), T / STEP, 1);
    check("cal_missing", int'(cal_missing), 0, 0);
    check("tot_missing", int'(tot_missing), expect_tot ? 0 : 1, 0);
    if (expect_tot) check("tot", int'(tot_code), exp_tot, 1);
    else            n_timeout++;
    if (expect_tot) begin
      // ring and controller back at rest before the next pulse
      #1000;
      check("ring at rest", int'(dut.node), int'(RO_REST), 0);
    end
    wait (pulse == 1'b0);
    repeat (2) @(posedge clk_ref);
  endtask

  initial begin
    // The controller clears on edges: start the ring once, then reset, so
    // every asynchronous clear sees a falling edge.
    #5 pulse = 1'b1;
    #3 pulse = 1'b0;
    #10 rst_n = 1'b0;
    #(2*T) rst_n = 1'b1;
    repeat (2) @(posedge clk_ref);
    hit(5000,   3000, 1);   // normal
    hit(12345,  1517, 1);   // normal
    hit(20000,   777, 1);   // normal, close to the end of the period
    hit(0,      2000, 1);   // boundary 1: pulse on a clock edge -> deferred
    hit(T-200,  2500, 1);   // boundary 2: slightly before an edge -> deferred
    hit(T-400,  4321, 1);   // boundary 3: 400 ps before (short latch1) -> deferred
    hit(T-600,  1234, 1);   // > 450 ps before: normal
    hit(3000,    150, 0);   // too narrow for TOT_latch -> stopped after 4 edges
    hit(7000,  90000, 0);   // TOT longer than the stop window (4 edges)
    hit(9000,  10000, 1);   // normal again after the stops
    check("normal hits",   n_normal   > 0 ? 1 : 0, 1, 0);
    check("deferred hits", n_deferred > 0 ? 1 : 0, 1, 0);
    check("timeouts",      n_timeout  > 0 ? 1 : 0, 1, 0);
    $display("normal=%0d deferred=%0d timeout=%0d", n_normal, n_deferred, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
