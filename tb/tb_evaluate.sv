// tb_evaluate: checks the error counter with random predictions, labels,
// valid and enable, and a clear in the middle, against a reference count.
`timescale 1ns/1ps
module tb_evaluate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, en = 0, valid = 0, pred = 0, label = 0;
  logic [31:0] err_o, count_o;

  evaluate dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    e = 0; n = 0;
    for (int t = 0; t < 3000; t++) begin
      clear = (t == 1500);
      en = ($urandom_range(0, 9) != 0);
      valid = 1'($urandom); pred = 1'($urandom); label = 1'($urandom);
      @(negedge clk);
      if (clear) begin e = 0; n = 0; end
      else if (en && valid) begin n++; if (pred != label) e++; end
      check(err_o == 32'(e) && count_o == 32'(n), $sformatf("t=%0d errors %0d/%0d expected %0d/%0d", t, err_o, count_o, e, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
