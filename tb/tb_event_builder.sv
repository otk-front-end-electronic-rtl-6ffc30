`timescale 1ps/1ps
// tb_event_builder: random results (about one cycle in three) with codes
// drawn to hit the saturation limits and CAL < TOA, plus random chip and
// channel numbers. A reference model here counts bunches and computes the
// expected 48-bit word; every hit_valid is compared, and hit_valid must pulse
// exactly once per result.
module tb_event_builder;
  import juloong_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [4:0] chip_id = '0;
  logic [6:0] channel = '0;
  logic result_valid = 1'b0;
  logic [CODE_W-1:0] tot_code = '0, toa_code = '0, cal_code = '0;
  hit_word_t hit;
  logic hit_valid;
  int checks = 0, failures = 0, n_res = 0, n_hit = 0, n_sat = 0, n_neg = 0;
  int unsigned bunch_m = 0;
  hit_word_t exp_q [$];

  event_builder dut (.*);

  always #11547 clk = ~clk;   // 43.3 MHz

  function automatic hit_word_t model(int unsigned b);
    hit_word_t w;
    int p;
    w.chip_id  = chip_id;
    w.bunch_id = 8'(b);
    w.channel  = channel;
    w.toa      = (toa_code > 1023) ? 10'd1023 : toa_code[9:0];
    w.tot      = (tot_code > 255) ? 8'd255 : tot_code[7:0];
    p = int'(cal_code) - int'(toa_code);
    w.cal      = (p < 0) ? 10'd0 : (p > 1023) ? 10'd1023 : 10'(p);
    return w;
  endfunction

  function automatic logic [CODE_W-1:0] pick();
    case ($urandom % 4)
      0: return CODE_W'($urandom % 2048);
      1: return CODE_W'(1000 + $urandom % 48);
      2: return CODE_W'(240 + $urandom % 32);
      default: return CODE_W'($urandom % 1300);
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (hit_valid) begin
      hit_word_t e;
      n_hit++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected hit_valid");
      end else begin
        e = exp_q.pop_front();
        if (hit !== e) begin
          failures++; $display("FAIL hit %h expected %h", hit, e);
        end
      end
    end
    if (result_valid) begin
      exp_q.push_back(model(bunch_m));
      n_res++;
      if (toa_code > 1023 || tot_code > 255) n_sat++;
      if (cal_code < toa_code) n_neg++;
    end
    bunch_m++;
  end

  initial begin
    #10 rst_n = 1'b0;
    #30000 rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      result_valid = ($urandom % 3) == 0;
      chip_id  = 5'($urandom);
      channel  = 7'($urandom);
      toa_code = pick();
      tot_code = pick();
      cal_code = ($urandom % 2 == 0) ? CODE_W'(32'(toa_code) + 650 + $urandom % 20) : pick();
    end
    @(negedge clk) result_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_hit != n_res || exp_q.size() != 0) begin
      failures++; $display("FAIL %0d results, %0d hits", n_res, n_hit);
    end
    checks++;
    if (n_sat < 50 || n_neg < 50) begin
      failures++; $display("FAIL corner coverage sat=%0d neg=%0d", n_sat, n_neg);
    end
    $display("results=%0d saturated=%0d cal<toa=%0d", n_res, n_sat, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
