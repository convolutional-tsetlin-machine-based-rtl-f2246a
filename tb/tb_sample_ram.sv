// tb_sample_ram: checks the dataset RAM at its default depth (8192 x 17):
// writes every word, then reads back in random order, interleaved with
// writes to other words, checking the one-clock read latency.
`timescale 1ns/1ps
module tb_sample_ram;
  localparam int DEPTH = 8192, W = 17;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [12:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;

  sample_ram dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [DEPTH];

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 13'(i); wdata = 17'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 20000; t++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      raddr = 13'(a);
      we = 1'($urandom);
      waddr = 13'($urandom_range(0, DEPTH - 1));
      if (waddr == raddr) we = 0;
      wdata = 17'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
