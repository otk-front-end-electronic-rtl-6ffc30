`timescale 1ps/1ps
// tb_coarse_counter: counts rising edges of the ring tap while RO_key is
// high, checks the count after each edge against a reference count
// (modulo 64, so the wrap is covered), checks that falling edges do not
// count and that RO_key low clears the counter.
module tb_coarse_counter;
  logic ro_tap = 1'b0, ro_key = 1'b1;
  logic [5:0] count;
  int checks = 0, failures = 0;
  int ref_cnt;

  coarse_counter dut (.ro_tap, .ro_key, .count);

  task automatic chk(input int exp);
    checks++;
    if (int'(count) != exp) begin failures++; $display("FAIL count %0d exp %0d", count, exp); end
  endtask

  initial begin
    #10 ro_key = 1'b0;
    #10 chk(0);
    ro_key = 1'b1;
    ref_cnt = 0;
    for (int i = 0; i < 70; i++) begin
      #10 ro_tap = 1'b1; ref_cnt = (ref_cnt + 1) % 64;
      #1 chk(ref_cnt);
      #9 ro_tap = 1'b0;
      #1 chk(ref_cnt);
    end
    ro_key = 1'b0;
    #1 chk(0);
    #10 ro_tap = 1'b1;
    #1 chk(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
