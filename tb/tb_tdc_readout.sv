`timescale 1ps/1ps
// tb_tdc_readout: toggles done_tgl with random codes and raw samples and
// checks, at each word boundary (frame_ce every 40 cycles), that the next
// 40-bit word carries the result exactly once (data header, flag, TOT, TOA,
// CAL) and is idle otherwise; that the 128-bit word carries sync, event
// number, flag and raw samples with valid held until ready; and that two
// results inside one frame set overrun.
module tb_tdc_readout;
  import juloong_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, frame_ce = 1'b0, done_tgl = 1'b0, tot_missing = 1'b0;
  logic [CODE_W-1:0] tot_code, toa_code, cal_code;
  tdc_raw_t tot_raw, toa_raw, cal_raw;
  hs_word_t hs_word;
  ls_word_t ls_word;
  logic ls_valid, ls_ready = 1'b0, overrun;
  int checks = 0, failures = 0, cyc = 0, n_data = 0, n_idle = 0;

  tdc_readout dut (.*);

  always #289 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    frame_ce <= ((cyc % 40) == 39);
  end

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic wait_frame();
    @(posedge clk iff frame_ce);
    @(negedge clk);
  endtask

  initial begin
    hs_word_t e;
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    wait_frame();
    chk("idle after reset", hs_word.hdr, HS_HDR_IDLE);
    for (int i = 0; i < 8; i++) begin
      tot_code = CODE_W'($urandom); toa_code = CODE_W'($urandom); cal_code = CODE_W'($urandom);
      tot_raw = tdc_raw_t'({$urandom, $urandom}); toa_raw = tdc_raw_t'({$urandom, $urandom});
      cal_raw = tdc_raw_t'({$urandom, $urandom});
      tot_missing = i[0];
      done_tgl = ~done_tgl;
      wait_frame();
      e = '{hdr: HS_HDR_DATA, tot_missing: i[0], tot: tot_code, toa: toa_code, cal: cal_code};
      chk("data word", hs_word, e);
      n_data++;
      chk("ls valid", ls_valid, 1);
      chk("ls word", ls_word, {LS_SYNC, 7'(i), i[0], tot_raw, toa_raw, cal_raw});
      wait_frame();
      chk("idle word", hs_word, {HS_HDR_IDLE, 34'h0});
      n_idle++;
      chk("ls valid held", ls_valid, 1);
      @(negedge clk) ls_ready = 1'b1;
      @(negedge clk) ls_ready = 1'b0;
      chk("ls taken", ls_valid, 0);
      chk("no overrun", overrun, 0);
    end
    // two results in one frame
    done_tgl = ~done_tgl;
    repeat (6) @(negedge clk);
    done_tgl = ~done_tgl;
    repeat (6) @(negedge clk);
    chk("overrun", overrun, 1);
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
