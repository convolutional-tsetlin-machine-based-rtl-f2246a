// tb_patch_gen: checks the window-sliding patch generator.
// Random images are loaded back to back (each load in the cycle of the
// previous image's last patch, as the accelerator streams them), with an
// occasional idle gap. Every patch's 8 features are compared with a
// reference computed directly from the image (window pixels plus the
// position codes 10/01/00), together with first/last/valid, the label and
// the 9-patch count per image.
`timescale 1ns/1ps
module tb_patch_gen;
  import ctm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, label = 0;
  logic [15:0] img = '0;
  logic valid_o, first_o, last_o, label_o;
  feat_t feat_o;

  patch_gen dut (.*);

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

  function automatic feat_t ref_feat(logic [15:0] im, int px, int py);
    logic [1:0] cx, cy;
    cx = (px == 0) ? 2'b10 : (px == 1) ? 2'b01 : 2'b00;
    cy = (py == 0) ? 2'b10 : (py == 1) ? 2'b01 : 2'b00;
    return {cx, cy, im[(py+1)*4 + px + 1], im[(py+1)*4 + px], im[py*4 + px + 1], im[py*4 + px]};
  endfunction

  initial begin
    logic [15:0] cur;
    logic        cur_lbl;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid_o, "idle after reset");
    // first image
    cur = 16'($urandom); cur_lbl = 1'($urandom);
    img = cur; label = cur_lbl; load = 1;
    @(negedge clk);
    load = 0;
    for (int n = 0; n < 200; n++) begin
      logic [15:0] nxt;
      logic        nxt_lbl;
      bit          gap;
      gap = ($urandom_range(0, 9) == 0);
      nxt = 16'($urandom); nxt_lbl = 1'($urandom);
      for (int p = 0; p < NPATCH; p++) begin
        check(valid_o, "valid during image");
        check(first_o == (p == 0), "first flag");
        check(last_o == (p == NPATCH - 1), "last flag");
        check(label_o == cur_lbl, "label carried");
        check(feat_o == ref_feat(cur, p % 3, p / 3),
              $sformatf("image %0d patch %0d: %b expected %b", n, p, feat_o, ref_feat(cur, p % 3, p / 3)));
        if (p == NPATCH - 1 && !gap) begin
          img = nxt; label = nxt_lbl; load = 1;
        end
        @(negedge clk);
        load = 0;
      end
      if (gap) begin
        check(!valid_o, "no patch without a new image");
        @(negedge clk);
        img = nxt; label = nxt_lbl; load = 1;
        @(negedge clk);
        load = 0;
      end
      cur = nxt; cur_lbl = nxt_lbl;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
