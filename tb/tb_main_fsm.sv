// tb_main_fsm: checks the sequencing of the main state machine.
// Inference sessions: loads must come every 9 clocks with RAM addresses
// 0..N-1 (the address for the next load already set), evaluation enabled,
// no clause updates, and done must follow the last load after the pipeline
// drain. Training sessions over several epochs: loads every 55 clocks,
// addresses wrapping at N per epoch, clause updates 0..39 in the 40 clocks
// ending with each slot (starting 15 clocks after the sample's first patch),
// and training enable throughout. A session with zero samples ends at once.
`timescale 1ns/1ps
module tb_main_fsm;
  import ctm_pkg::*;
  localparam int M = NCLAUSE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, mode_train = 0;
  logic [13:0] num_samples = '0;
  logic [15:0] num_epochs = '0;
  logic [12:0] ram_addr_o;
  logic load_o, train_o, eval_o, clear_o, upd_active_o, busy_o, done_o;
  logic [5:0] upd_clause_o;

  main_fsm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(bit train, int n, int epochs);
    int t, loads, last_load, upd_seen, done_t;
    int exp_addr;
    @(negedge clk);
    mode_train = train; num_samples = 14'(n); num_epochs = 16'(epochs);
    start = 1;
    #1 check(clear_o, "clear with start");
    @(negedge clk);
    start = 0;
    t = 0; loads = 0; last_load = -1; upd_seen = 0; done_t = -1; exp_addr = 0;
    while (done_t < 0 && t < 20000) begin
      t++;
      if (upd_active_o) begin
        int ph;
        ph = t - last_load - 1;          // clocks since the sample's first patch
        check(train, "updates only when training");
        check(ph >= NPATCH + ADD_STAGES && int'(upd_clause_o) == ph - NPATCH - ADD_STAGES,
              $sformatf("update of clause %0d at phase %0d", upd_clause_o, ph));
        upd_seen++;
      end
      if (load_o) begin
        if (last_load >= 0)
          check(t - last_load == (train ? TRAIN_CYCLES : NPATCH),
                $sformatf("load spacing %0d", t - last_load));
        check(int'(ram_addr_o) == exp_addr, $sformatf("load %0d address %0d expected %0d", loads, ram_addr_o, exp_addr));
        exp_addr = (exp_addr + 1) % n;
        last_load = t;
        loads++;
      end
      if (!done_o) check(train_o == train, "training enable");
      check(eval_o == !train, "evaluation enable");
      if (done_o) done_t = t;
      @(negedge clk);
    end
    check(loads == n * (train ? epochs : 1), $sformatf("%0d loads", loads));
    if (train) begin
      check(upd_seen == n * epochs * M, $sformatf("%0d clause updates", upd_seen));
      check(done_t - last_load == TRAIN_CYCLES + 1, $sformatf("training done %0d clocks after last load", done_t - last_load));
    end else begin
      check(done_t - last_load == NPATCH + ADD_STAGES + 3,
            $sformatf("inference done %0d clocks after last load", done_t - last_load));
    end
    @(negedge clk);
    check(!busy_o, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy_o, "idle after reset");
    session(1'b0, 25, 1);
    session(1'b1, 7, 3);
    session(1'b0, 1, 1);
    session(1'b1, 1, 2);
    // zero samples
    @(negedge clk);
    num_samples = '0; mode_train = 0; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    check(done_o || !busy_o, "empty session ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
