// tb_ctm_top: end-to-end test of the accelerator on the 2-D noisy XOR task,
// with every parameter of the design at its default.
//
// The testbench generates the dataset itself: 4x4 random Boolean images
// with one of six 2x2 patterns, equal numbers per class, in columns 1..2 of rows 0..1 (two diagonals
// for class 1, two horizontal and two vertical lines for class 0); 40 % of
// the training labels are inverted, the test labels are clean. It loads
// 2500 training and 8192 test samples, then:
//   1. runs inference with all automata at their initial state (every
//      clause empty, so every sum is 0 and class 0 is always predicted) and
//      checks the error count and the 9-clock spacing of the results;
//   2. trains for N_EPOCHS epochs and checks the 55-clock slot per sample;
//   3. runs inference on the test set, recomputes every prediction from the
//      automata's include actions with an independent clause model, checks
//      that the hardware's predictions and error count agree with it, and
//      checks that the test accuracy exceeds a minimum.
// It counts how often each mechanism occurred (Type Ia/Ib/II feedback,
// skipped clause updates, reservoir replacements, LFSR warm-up, argmax
// picking each class) and counts a failure for any that never did.
`timescale 1ns/1ps
module tb_ctm_top;
  import ctm_pkg::*;

  localparam int N_TRAIN  = 2500;
  localparam int N_TEST   = 8192;
  localparam int N_EPOCHS = 40;
  localparam real MIN_ACC = 0.95;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                start = 0, mode_train = 0, dataset_sel = 0;
  logic [13:0]         num_samples = '0;
  logic [15:0]         num_epochs = '0;
  lfsr_len_e           lfsr_len = LEN16;
  logic                lfsr_seed_load = 0, lfsr_run = 0, ta_init = 0;
  logic                ram_we = 0, ram_sel = 0;
  logic [12:0]         ram_waddr = '0;
  logic [SAMPLE_W-1:0] ram_wdata = '0;
  logic                busy, done, pred_valid, pred_class;
  logic [31:0]         err_count, eval_count;

  ctm_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (N_EPOCHS * N_TRAIN * 60 + 4 * N_TEST * 12 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- dataset ----------------
  logic [SAMPLE_W-1:0] train_set [N_TRAIN];
  logic [SAMPLE_W-1:0] test_set  [N_TEST];

  function automatic logic [SAMPLE_W-1:0] make_sample(bit noisy);
    logic [15:0] img;
    logic [3:0]  pat;   // {(2,1),(1,1),(2,0),(1,0)}
    int          kind;
    logic        lbl;
    img  = 16'($urandom);
    // equal class shares; within a class, equal shares of its sub-patterns
    lbl  = 1'($urandom_range(0, 1));
    kind = lbl ? $urandom_range(0, 1) : $urandom_range(2, 5);
    case (kind)
      0: pat = 4'b1001;  // diagonal
      1: pat = 4'b0110;  // anti-diagonal
      2: pat = 4'b0011;  // upper line
      3: pat = 4'b1100;  // lower line
      4: pat = 4'b0101;  // left column
      default: pat = 4'b1010; // right column
    endcase
    img[1] = pat[0]; img[2] = pat[1]; img[5] = pat[2]; img[6] = pat[3];
    if (noisy && $urandom_range(0, 99) < 40) lbl = ~lbl;
    return {lbl, img};
  endfunction

  // ---------------- independent reference of the inference ----------------
  function automatic logic [7:0] ref_feat(logic [15:0] img, int px, int py);
    logic [1:0] cx, cy;
    cx = (px == 0) ? 2'b10 : (px == 1) ? 2'b01 : 2'b00;
    cy = (py == 0) ? 2'b10 : (py == 1) ? 2'b01 : 2'b00;
    return {cx, cy, img[(py+1)*4 + px + 1], img[(py+1)*4 + px],
            img[py*4 + px + 1], img[py*4 + px]};
  endfunction

  function automatic int ref_sum(int c, logic [15:0] img);
    int v;
    v = 0;
    for (int j = 0; j < NCLAUSE; j++) begin
      logic [15:0] inc;
      logic        any;
      inc = dut.incl[c][j];
      any = 1'b0;
      if (inc != '0) begin
        for (int py = 0; py < 3; py++)
          for (int px = 0; px < 3; px++) begin
            logic [7:0]  f;
            logic [15:0] lit;
            f = ref_feat(img, px, py);
            for (int k = 0; k < 8; k++) begin
              lit[2*k] = f[k];
              lit[2*k+1] = ~f[k];
            end
            if ((lit & inc) == inc) any = 1'b1;
          end
      end
      if (any) v += (j % 2 == 1) ? 1 : -1;
    end
    return v;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_ia_inc = 0, n_ia_dec = 0, n_ib = 0, n_ii = 0, n_skip = 0, n_res_repl = 0;
  int n_lfsr_run = 0, n_pred1 = 0, n_pred0 = 0, n_empty_learn = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.upd_active) begin
      if (!dut.u_train_tgt.u) n_skip++;
      if (dut.u_train_tgt.upd_en_o && dut.u_train_tgt.type1 && dut.u_train_tgt.c
          && dut.u_train_tgt.upd_inc_o != '0) n_ia_inc++;
      if (dut.u_train_tgt.upd_en_o && dut.u_train_tgt.type1 && dut.u_train_tgt.c
          && dut.u_train_tgt.upd_dec_o != '0) n_ia_dec++;
      if (dut.u_train_neg.upd_en_o && dut.u_train_neg.type1 && !dut.u_train_neg.c
          && dut.u_train_neg.upd_dec_o != '0) n_ib++;
      if (dut.u_train_neg.upd_en_o && !dut.u_train_neg.type1
          && dut.u_train_neg.upd_inc_o != '0) n_ii++;
    end
    if (dut.train_en && dut.p_valid && !dut.p_first && dut.tgt_clause[1]
        && dut.u_train_tgt.g_res[1].u_res.take) n_res_repl++;
    if (dut.train_en && dut.p_valid && dut.incl[0][0] == '0 && dut.clause[0][0]) n_empty_learn++;
    if (lfsr_run) n_lfsr_run++;
    if (pred_valid) begin
      if (pred_class) n_pred1++; else n_pred0++;
    end
  end

  // spacing of the inference results
  longint last_pred = -1;
  int     gap_bad = 0, gap_n = 0;
  always @(posedge clk) if (pred_valid) begin
    if (last_pred >= 0) begin
      gap_n++;
      if (cycle - last_pred != NPATCH) gap_bad++;
    end
    last_pred <= cycle;
  end

  // hardware predictions of the final test, in order
  logic hw_pred [N_TEST];
  int   hw_n = 0;
  bit   collect = 0;
  always @(posedge clk) if (pred_valid && collect) begin
    if (hw_n < N_TEST) hw_pred[hw_n] = pred_class;
    hw_n++;
  end

  task automatic run_session(bit train, bit ds, int n, int epochs, output longint cycles);
    longint t0;
    @(negedge clk);
    mode_train = train; dataset_sel = ds; num_samples = 14'(n); num_epochs = 16'(epochs);
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    cycles = cycle - t0;
    @(negedge clk);
  endtask

  initial begin
    longint cyc;
    int     n1, ref_err, mism, warm, n_ok;
    real    acc;
    for (int i = 0; i < N_TRAIN; i++) train_set[i] = make_sample(1'b1);
    for (int i = 0; i < N_TEST; i++)  test_set[i]  = make_sample(1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // load the datasets
    for (int i = 0; i < N_TRAIN; i++) begin
      ram_we = 1; ram_sel = 0; ram_waddr = 13'(i); ram_wdata = train_set[i];
      @(negedge clk);
    end
    for (int i = 0; i < N_TEST; i++) begin
      ram_we = 1; ram_sel = 1; ram_waddr = 13'(i); ram_wdata = test_set[i];
      @(negedge clk);
    end
    ram_we = 0;

    // automata to state -1, LFSRs seeded and run for a while
    lfsr_len = LEN16;
    ta_init = 1; lfsr_seed_load = 1;
    @(negedge clk);
    ta_init = 0; lfsr_seed_load = 0;
    lfsr_run = 1;
    warm = $urandom_range(5, 60);
    repeat (warm) @(negedge clk);
    lfsr_run = 0;

    // 1. inference with empty clauses
    run_session(1'b0, 1'b1, N_TEST, 1, cyc);
    n1 = 0;
    for (int i = 0; i < N_TEST; i++) n1 += int'(test_set[i][16]);
    check(err_count == 32'(n1), $sformatf("empty model: errors %0d, expected %0d", err_count, n1));
    check(eval_count == 32'(N_TEST), "empty model: all samples evaluated");
    check(gap_n == N_TEST - 1 && gap_bad == 0,
          $sformatf("results every %0d clocks: %0d of %0d gaps wrong", NPATCH, gap_bad, gap_n));
    check(cyc <= longint'(NPATCH) * N_TEST + 20,
          $sformatf("inference took %0d clocks for %0d images", cyc, N_TEST));

    // 2. training
    run_session(1'b1, 1'b0, N_TRAIN, N_EPOCHS, cyc);
    $display("training: %0d clocks for %0d samples", cyc, N_TRAIN * N_EPOCHS);
    check(cyc >= longint'(TRAIN_CYCLES) * N_TRAIN * N_EPOCHS &&
          cyc <= longint'(TRAIN_CYCLES) * N_TRAIN * N_EPOCHS + 10,
          $sformatf("training took %0d clocks, expected %0d per sample", cyc, TRAIN_CYCLES));

    // 3. test inference, compared with the reference model
    collect = 1; hw_n = 0;
    run_session(1'b0, 1'b1, N_TEST, 1, cyc);
    collect = 0;
    check(hw_n == N_TEST, "all test results delivered");
    ref_err = 0; mism = 0;
    for (int i = 0; i < N_TEST; i++) begin
      int  v0, v1;
      bit  p;
      v0 = ref_sum(0, test_set[i][15:0]);
      v1 = ref_sum(1, test_set[i][15:0]);
      p  = (v1 > v0);
      if (p != test_set[i][16]) ref_err++;
      if (p != hw_pred[i]) mism++;
    end
    check(mism == 0, $sformatf("%0d predictions differ from the reference model", mism));
    check(err_count == 32'(ref_err), $sformatf("error count %0d, reference %0d", err_count, ref_err));
    n_ok = N_TEST - int'(err_count);
    acc  = real'(n_ok) / real'(N_TEST);
    $display("test accuracy after %0d epochs: %0.2f %%", N_EPOCHS, 100.0 * acc);
    check(acc >= MIN_ACC, "test accuracy too low");

    $display("mechanisms: IaInc=%0d IaDec=%0d Ib=%0d II=%0d skip=%0d resRepl=%0d lfsrRun=%0d pred0=%0d pred1=%0d emptyLearn=%0d",
             n_ia_inc, n_ia_dec, n_ib, n_ii, n_skip, n_res_repl, n_lfsr_run, n_pred0, n_pred1, n_empty_learn);
    check(n_ia_inc > 0, "Type Ia include feedback seen");
    check(n_ia_dec > 0, "Type Ia exclude feedback seen");
    check(n_ib > 0, "Type Ib feedback seen");
    check(n_ii > 0, "Type II feedback seen");
    check(n_skip > 0, "skipped clause update seen");
    check(n_res_repl > 0, "reservoir replacement seen");
    check(n_lfsr_run > 0, "LFSR warm-up seen");
    check(n_pred0 > 0 && n_pred1 > 0, "both classes predicted");
    check(n_empty_learn > 0, "empty clause output 1 while learning");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
