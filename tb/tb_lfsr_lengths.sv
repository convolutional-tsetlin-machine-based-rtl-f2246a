// tb_lfsr_lengths: the LFSR-length experiment on the 2-D noisy XOR task,
// shortened. With every parameter at its default, the accelerator is trained
// from scratch on the same generated dataset (2500 training samples with 40 %
// label noise, 8192 clean test samples) once for each of several LFSR
// lengths (8, 10, 16 and 24 bits), N_EPOCHS epochs each, and the test
// accuracy is printed per length. The full experiment runs 250 epochs and 100
// runs per length; here one short run per length is made. Checked: every
// session completes in the expected number of clocks, all test samples are
// evaluated, and the accuracy reaches at least MIN_ACC for 10, 16 and 24
// bits. The 8-bit result is only reported: with a period of 255 steps, a
// short 20-epoch run does not reliably reach MIN_ACC.
`timescale 1ns/1ps
module tb_lfsr_lengths;
  import ctm_pkg::*;

  localparam int N_TRAIN  = 2500;
  localparam int N_TEST   = 8192;
  localparam int N_EPOCHS = 20;
  localparam real MIN_ACC = 0.90;

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
    repeat (4 * (N_EPOCHS * N_TRAIN * 60 + N_TEST * 12) + 200000) @(posedge clk);
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

  lfsr_len_e lens [4] = '{LEN8, LEN10, LEN16, LEN24};
  int        bits [4] = '{8, 10, 16, 24};

  initial begin
    longint cyc;
    int     warm;
    real    acc;
    for (int i = 0; i < N_TRAIN; i++) train_set[i] = make_sample(1'b1);
    for (int i = 0; i < N_TEST; i++)  test_set[i]  = make_sample(1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N_TRAIN; i++) begin
      ram_we = 1; ram_sel = 0; ram_waddr = 13'(i); ram_wdata = train_set[i];
      @(negedge clk);
    end
    for (int i = 0; i < N_TEST; i++) begin
      ram_we = 1; ram_sel = 1; ram_waddr = 13'(i); ram_wdata = test_set[i];
      @(negedge clk);
    end
    ram_we = 0;
    for (int li = 0; li < 4; li++) begin
      lfsr_len = lens[li];
      ta_init = 1; lfsr_seed_load = 1;
      @(negedge clk);
      ta_init = 0; lfsr_seed_load = 0;
      lfsr_run = 1;
      warm = $urandom_range(5, 60);
      repeat (warm) @(negedge clk);
      lfsr_run = 0;
      run_session(1'b1, 1'b0, N_TRAIN, N_EPOCHS, cyc);
      check(cyc >= longint'(TRAIN_CYCLES) * N_TRAIN * N_EPOCHS &&
            cyc <= longint'(TRAIN_CYCLES) * N_TRAIN * N_EPOCHS + 10, "training slot of 55 clocks");
      run_session(1'b0, 1'b1, N_TEST, 1, cyc);
      check(eval_count == 32'(N_TEST), "all test samples evaluated");
      acc = real'(N_TEST - int'(err_count)) / real'(N_TEST);
      $display("LFSR %0d bits: test accuracy after %0d epochs %0.2f %%", bits[li], N_EPOCHS, 100.0 * acc);
      if (bits[li] >= 10) check(acc >= MIN_ACC, $sformatf("accuracy with %0d-bit LFSRs", bits[li]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
