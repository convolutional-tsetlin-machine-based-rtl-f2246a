// tb_reservoir: checks the per-clause reservoir sampler.
// Thousands of images are streamed, 9 patches each, with random clause
// outputs and the patch index as the feature value, and a fresh uniform
// 24-bit random number per patch. After each image the count must equal the
// number of patches with clause = 1 and the kept patch must be one of them
// (0 when there is none). For images in which a fixed set of 4 patches
// matches, each of the 4 must be kept about 1/4 of the time (within 4
// standard deviations). With en low the registers must hold.
`timescale 1ns/1ps
module tb_reservoir;
  import ctm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, patch_valid = 0, patch_first = 0, clause = 0;
  feat_t feat = '0;
  rnd_t rnd = '0;
  logic [3:0] n_o;
  feat_t patch_o;

  reservoir dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hits [NPATCH];
  localparam int NFIX = 8000;

  task automatic run_image(logic [NPATCH-1:0] cm);
    int cnt;
    for (int p = 0; p < NPATCH; p++) begin
      patch_valid = 1; patch_first = (p == 0); clause = cm[p];
      feat = feat_t'(p + 1);
      rnd = 24'($urandom);
      @(negedge clk);
    end
    patch_valid = 0;
    cnt = $countones(cm);
    check(int'(n_o) == cnt, $sformatf("count %0d expected %0d", n_o, cnt));
    if (cnt == 0) check(patch_o == '0, "nothing kept");
    else check(patch_o >= 1 && patch_o <= NPATCH && cm[patch_o - 1], "kept patch made the clause 1");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) run_image(9'($urandom));
    run_image(9'h000);
    run_image(9'h1FF);
    for (int p = 0; p < NPATCH; p++) hits[p] = 0;
    for (int i = 0; i < NFIX; i++) begin
      run_image(9'b1_0010_0101);   // patches 0, 2, 5, 8
      hits[patch_o - 1]++;
    end
    for (int p = 0; p < NPATCH; p++) begin
      if (p == 0 || p == 2 || p == 5 || p == 8)
        check(hits[p] > NFIX / 4 - 4 * 39 && hits[p] < NFIX / 4 + 4 * 39,
              $sformatf("patch %0d kept %0d of %0d times", p, hits[p], NFIX));
    end
    // hold with enable low
    begin
      feat_t      keep_p;
      logic [3:0] keep_n;
      keep_p = patch_o; keep_n = n_o;
      en = 0;
      for (int p = 0; p < NPATCH; p++) begin
        patch_valid = 1; patch_first = (p == 0); clause = 1'b1;
        feat = feat_t'(p + 1); rnd = '0;
        @(negedge clk);
      end
      patch_valid = 0;
      check(patch_o == keep_p && n_o == keep_n, "registers hold with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
