// tb_adder_tree: checks the pipelined adder tree with its default size
// (40 inputs, 6 stages). A new random input vector (values -2..1) enters
// every clock with a random valid and tag; each output must equal the sum
// of the vector that entered exactly 6 clocks earlier, with its valid and
// tag.
`timescale 1ns/1ps
module tb_adder_tree;
  localparam int N = 40, LAT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid_i = 0, tag_i = 0, valid_o, tag_o;
  logic signed [1:0] in_i [N];
  logic signed [7:0] sum_o;

  adder_tree dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  hist_sum [$];
  bit  hist_v   [$];
  bit  hist_t   [$];

  initial begin
    for (int i = 0; i < N; i++) in_i[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int s;
      s = 0;
      for (int i = 0; i < N; i++) begin
        in_i[i] = 2'($urandom_range(0, 3));
        s += int'(in_i[i]);
      end
      valid_i = 1'($urandom);
      tag_i   = 1'($urandom);
      hist_sum.push_back(s); hist_v.push_back(valid_i); hist_t.push_back(tag_i);
      @(negedge clk);
      if (hist_sum.size() >= LAT) begin
        int es; bit ev, et;
        es = hist_sum.pop_front(); ev = hist_v.pop_front(); et = hist_t.pop_front();
        check(valid_o == ev, "valid delayed by 6");
        check(tag_o == et, "tag delayed by 6");
        check(int'(sum_o) == es, $sformatf("t=%0d sum %0d expected %0d", t, sum_o, es));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
