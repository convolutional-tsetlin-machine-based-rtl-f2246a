// tb_lfsr_bank: checks the bank of LFSRs.
// For every selectable length the sequence of LFSR 0 must return to its
// start after exactly 2^LEN - 1 steps and not before (maximal length). For
// 16 bits the first 200 states of LFSR 5 are compared with an independent
// model of x^16+x^15+x^13+x^4+1. After a seed load at 16 bits all 80 LFSRs
// must differ, the output must be left-aligned, and with step low the
// outputs must hold.
`timescale 1ns/1ps
module tb_lfsr_bank;
  import ctm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lfsr_len_e len_sel = LEN16;
  logic seed_load = 0, step = 0;
  rnd_t rnd [NLFSR];

  lfsr_bank dut (.clk, .rst_n, .len_sel, .seed_load, .step, .rnd_o(rnd));

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lens [10] = '{6, 7, 8, 9, 10, 12, 14, 16, 18, 24};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // periods for lengths up to 16
    for (int li = 0; li < 8; li++) begin
      rnd_t s0;
      int   p;
      len_sel = lfsr_len_e'(li);
      seed_load = 1; @(negedge clk); seed_load = 0;
      s0 = rnd[0];
      check(s0 != '0, "seeded state is not zero");
      check((s0 & ((24'h1 << (24 - lens[li])) - 1)) == '0, "output left-aligned");
      step = 1;
      p = 0;
      do begin
        @(negedge clk);
        p++;
      end while (rnd[0] != s0 && p < 70000);
      step = 0;
      check(p == (1 << lens[li]) - 1,
            $sformatf("length %0d: period %0d, expected %0d", lens[li], p, (1 << lens[li]) - 1));
    end
    // 16-bit reference model
    begin
      logic [15:0] m;
      len_sel = LEN16;
      seed_load = 1; @(negedge clk); seed_load = 0;
      m = rnd[5][23:8];
      step = 1;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        m = {m[14:0], m[15] ^ m[14] ^ m[12] ^ m[3]};
        check(rnd[5] == {m, 8'h00}, $sformatf("16-bit sequence step %0d", i));
      end
      step = 0;
    end
    // distinct seeds at 16 bits, and hold with step low
    begin
      int dup;
      rnd_t keep;
      seed_load = 1; @(negedge clk); seed_load = 0;
      dup = 0;
      for (int i = 0; i < NLFSR; i++)
        for (int j = i + 1; j < NLFSR; j++)
          if (rnd[i] == rnd[j]) dup++;
      check(dup == 0, $sformatf("%0d pairs of equal seeds", dup));
      keep = rnd[7];
      repeat (5) @(negedge clk);
      check(rnd[7] == keep, "holds without step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
