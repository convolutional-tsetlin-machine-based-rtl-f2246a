// tb_tm_class: checks one class TM (40 clauses) against a reference model.
// Random include masks are written into the TA teams through the update
// port (one increment moves an automaton from -1 to 0, i.e. include); a few
// clauses are left empty. Random images are then streamed as 9 patches
// each, back to back, in learning and in inference mode. Checked: every
// clause output on every patch, the clause output register (OR over the 9
// patches), the empty-clause rule (1 when learning, 0 otherwise) and the
// class sum (odd clauses +1, even -1), which must be valid exactly 7 clocks
// after the last patch.
`timescale 1ns/1ps
module tb_tm_class;
  import ctm_pkg::*;
  localparam int M = NCLAUSE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ta_init = 0, learn = 0;
  logic patch_valid = 0, patch_first = 0, patch_last = 0, tag_i = 0;
  feat_t feat = '0;
  logic upd_en = 0;
  logic [$clog2(M)-1:0] upd_clause = '0;
  lit_t upd_inc = '0, upd_dec = '0;
  logic [M-1:0] clause_o, clause_reg_o;
  lit_t include_o [M];
  logic sum_valid_o, sum_tag_o;
  sum_t sum_o;

  tm_class dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lit_t mask [M];

  function automatic feat_t ref_feat(logic [15:0] im, int px, int py);
    logic [1:0] cx, cy;
    cx = (px == 0) ? 2'b10 : (px == 1) ? 2'b01 : 2'b00;
    cy = (py == 0) ? 2'b10 : (py == 1) ? 2'b01 : 2'b00;
    return {cx, cy, im[(py+1)*4 + px + 1], im[(py+1)*4 + px], im[py*4 + px + 1], im[py*4 + px]};
  endfunction

  function automatic bit ref_clause(int j, feat_t f, bit lrn);
    lit_t l;
    for (int k = 0; k < NF; k++) begin l[2*k] = f[k]; l[2*k+1] = ~f[k]; end
    if (mask[j] == '0) return lrn;
    return (l & mask[j]) == mask[j];
  endfunction

  // expected sums, checked when they come out
  int  exp_sum [$];
  int  last_t  [$];
  int  cyc = 0;
  int  n_sums = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && sum_valid_o) begin
    int es, lt;
    es = exp_sum.pop_front();
    lt = last_t.pop_front();
    n_sums++;
    check(int'(sum_o) == es, $sformatf("class sum %0d expected %0d", sum_o, es));
    check(cyc - lt == 7, $sformatf("sum latency %0d clocks after the last patch", cyc - lt));
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // program include masks: sparse random literals, never both x and ~x
    for (int j = 0; j < M; j++) begin
      mask[j] = '0;
      if (j % 7 != 3) begin
        for (int k = 0; k < NF; k++) begin
          int r;
          r = $urandom_range(0, 9);
          if (r == 0) mask[j][2*k] = 1'b1;
          else if (r == 1) mask[j][2*k+1] = 1'b1;
        end
      end
      upd_en = 1; upd_clause = 6'(j); upd_inc = mask[j]; upd_dec = '0;
      @(negedge clk);
    end
    upd_en = 0;
    for (int j = 0; j < M; j++) check(include_o[j] == mask[j], "include actions written");
    // stream images
    for (int n = 0; n < 300; n++) begin
      logic [15:0] im;
      logic [M-1:0] orv;
      int v;
      learn = (n % 3 == 0);
      im = 16'($urandom);
      if (n % 5 == 0) im = 16'hFFFF;
      orv = '0;
      for (int p = 0; p < NPATCH; p++) begin
        patch_valid = 1; patch_first = (p == 0); patch_last = (p == NPATCH - 1);
        feat = ref_feat(im, p % 3, p / 3);
        tag_i = n[0];
        #1;
        for (int j = 0; j < M; j++) begin
          bit e;
          e = ref_clause(j, feat, learn);
          orv[j] = orv[j] | e;
          check(clause_o[j] == e, $sformatf("image %0d patch %0d clause %0d", n, p, j));
        end
        if (p == NPATCH - 1) begin
          v = 0;
          for (int j = 0; j < M; j++) if (orv[j]) v += (j % 2) ? 1 : -1;
          exp_sum.push_back(v);
          last_t.push_back(cyc);
        end
        @(negedge clk);
      end
      check(clause_reg_o == orv, "clause output register = OR over the patches");
      if (n % 4 == 0) begin
        patch_valid = 0;
        repeat (2) @(negedge clk);
      end
    end
    patch_valid = 0;
    repeat (10) @(negedge clk);
    check(n_sums == 300, $sformatf("%0d sums delivered", n_sums));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
