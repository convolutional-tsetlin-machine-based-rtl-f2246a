// tb_ta_team: checks the team of Tsetlin automata against a reference model.
// Random inc/dec/en/init patterns run for thousands of cycles, long enough
// to reach both saturation ends; states and include actions (state >= 0)
// are compared with an independent model every cycle. Reset and init must
// give state -1 (exclude) everywhere.
`timescale 1ns/1ps
module tb_ta_team;
  import ctm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, en = 0;
  logic [NLIT-1:0] inc = '0, dec = '0, include_o;
  ta_t state_o [NLIT];

  ta_team dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [NLIT];
  int sat_hi = 0, sat_lo = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NLIT; k++) model[k] = -1;
    @(negedge clk);
    for (int k = 0; k < NLIT; k++) begin
      check(state_o[k] == -1, "reset state -1");
      check(!include_o[k], "reset action exclude");
    end
    for (int t = 0; t < 20000; t++) begin
      int bias;
      bias = (t / 2000) % 2;   // phases that drift up, then down
      en   = ($urandom_range(0, 9) != 0);
      init = ($urandom_range(0, 4999) == 0);
      for (int k = 0; k < NLIT; k++) begin
        int r;
        r = $urandom_range(0, 99);
        inc[k] = bias ? (r < 70) : (r < 20);
        dec[k] = !inc[k] && (bias ? (r > 85) : (r > 40));
      end
      @(negedge clk);
      for (int k = 0; k < NLIT; k++) begin
        if (init) model[k] = -1;
        else if (en && inc[k] && model[k] < 127) model[k]++;
        else if (en && dec[k] && !inc[k] && model[k] > -128) model[k]--;
        if (model[k] == 127) sat_hi++;
        if (model[k] == -128) sat_lo++;
        check(int'(state_o[k]) == model[k],
              $sformatf("t=%0d TA %0d: %0d expected %0d", t, k, state_o[k], model[k]));
        check(include_o[k] == (model[k] >= 0), "include action");
      end
    end
    check(sat_hi > 0 && sat_lo > 0, "both saturation ends reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
