// tb_class_decision: checks the argmax over the two class sums for all
// pairs of sums in -20..20 (including ties, where class 0 is chosen).
`timescale 1ns/1ps
module tb_class_decision;
  import ctm_pkg::*;
  sum_t sums [NCLASS];
  logic [0:0] class_o;
  sum_t max_o;

  class_decision dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -20; a <= 20; a++)
      for (int b = -20; b <= 20; b++) begin
        sums[0] = sum_t'(a); sums[1] = sum_t'(b);
        #1;
        checks++;
        if (class_o != ((b > a) ? 1'b1 : 1'b0) || int'(max_o) != ((b > a) ? b : a)) begin
          failures++;
          $display("FAIL: v0=%0d v1=%0d -> class %0d max %0d", a, b, class_o, max_o);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
