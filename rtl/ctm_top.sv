// ctm_top: convolutional Tsetlin machine accelerator for two-class
// classification of 4x4 Boolean images with a 2x2 window, with on-chip
// training.
//
// Datapath: a dataset RAM (training or test set) feeds the patch generator,
// which delivers one 8-bit patch feature vector per clock (9 per image).
// Two class TMs (TM0, TM1), 40 clauses each, evaluate all clauses on every
// patch, OR the clause outputs over the image and sum the votes in a
// 6-stage adder tree. The class decision picks the larger sum and the
// evaluate block counts errors against the labels (inference: 9 clocks per
// image, streaming). For training, two training modules run in parallel:
// the Target Class module trains the TM of the sample's label with y = 1
// and the Negative Target Class module trains the other TM with y = 0. Each
// performs reservoir sampling of a patch per clause during the patch
// cycles and then updates one clause per clock (55 clocks per sample).
// The bank of 80 LFSRs supplies all random numbers. The training modules
// are clock-enabled only while training. The LFSR bank steps only in the
// clocks that consume random numbers (the 9 patch clocks and the 40
// clause-update clocks of a sample, 49 steps per sample) and while the host
// runs it for warm-up. This is this design's choice: stepping in all 55
// clocks of the slot made each clause's random numbers repeat after
// (2^L-1)/5 samples, since 5 divides both 55 and 2^L-1 for L = 8, 12, 16,
// 24, and short LFSRs then learned poorly.
//
// Host interface (plain signals, this design's choice): the host loads the
// datasets through the ram_* write port, programs mode, dataset, sample and
// epoch counts and LFSR length, pulses start and waits for done; err_count
// and eval_count give the result. ta_init puts all automata in state -1.
// Every prediction also appears on pred_valid/pred_class.
module ctm_top
  import ctm_pkg::*;
#(
  parameter int TRAIN_DEPTH = 2500,
  parameter int TEST_DEPTH  = 8192,
  parameter int EW          = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // session control
  input  logic                 start,
  input  logic                 mode_train,
  input  logic                 dataset_sel,   // 0: training set, 1: test set
  input  logic [13:0]          num_samples,
  input  logic [EW-1:0]        num_epochs,
  input  lfsr_len_e            lfsr_len,
  input  logic                 lfsr_seed_load,
  input  logic                 lfsr_run,
  input  logic                 ta_init,
  // dataset loading
  input  logic                 ram_we,
  input  logic                 ram_sel,
  input  logic [12:0]          ram_waddr,
  input  logic [SAMPLE_W-1:0]  ram_wdata,
  // status and results
  output logic                 busy,
  output logic                 done,
  output logic                 pred_valid,
  output logic                 pred_class,
  output logic [31:0]          err_count,
  output logic [31:0]          eval_count
);

  localparam int M   = NCLAUSE;
  localparam int AW  = 13;
  localparam int TAW = $clog2(TRAIN_DEPTH);
  localparam int SAW = $clog2(TEST_DEPTH);

  // ---------------- control ----------------
  logic [AW-1:0]        ram_addr;
  logic                 load, train_en, eval_en, clear;
  logic                 upd_active;
  logic [$clog2(M)-1:0] upd_clause;

  main_fsm #(.M(M), .AW(AW), .EW(EW)) u_fsm (
    .clk, .rst_n, .start, .mode_train,
    .num_samples (num_samples),
    .num_epochs  (num_epochs),
    .ram_addr_o  (ram_addr),
    .load_o      (load),
    .train_o     (train_en),
    .eval_o      (eval_en),
    .clear_o     (clear),
    .upd_active_o(upd_active),
    .upd_clause_o(upd_clause),
    .busy_o      (busy),
    .done_o      (done)
  );

  // ---------------- dataset RAMs ----------------
  logic [SAMPLE_W-1:0] train_rdata, test_rdata, sample;

  sample_ram #(.DEPTH(TRAIN_DEPTH), .W(SAMPLE_W)) u_train_ram (
    .clk, .we(ram_we && !ram_sel), .waddr(ram_waddr[TAW-1:0]), .wdata(ram_wdata),
    .raddr(ram_addr[TAW-1:0]), .rdata(train_rdata)
  );
  sample_ram #(.DEPTH(TEST_DEPTH), .W(SAMPLE_W)) u_test_ram (
    .clk, .we(ram_we && ram_sel), .waddr(ram_waddr[SAW-1:0]), .wdata(ram_wdata),
    .raddr(ram_addr[SAW-1:0]), .rdata(test_rdata)
  );
  assign sample = dataset_sel ? test_rdata : train_rdata;

  // ---------------- patch generation ----------------
  logic  p_valid, p_first, p_last, p_label;
  feat_t p_feat;

  patch_gen u_patch (
    .clk, .rst_n, .load,
    .img    (sample[IMG_BITS-1:0]),
    .label  (sample[IMG_BITS]),
    .valid_o(p_valid),
    .first_o(p_first),
    .last_o (p_last),
    .feat_o (p_feat),
    .label_o(p_label)
  );

  // ---------------- class TMs ----------------
  logic [M-1:0] clause   [NCLASS];
  lit_t         incl     [NCLASS][M];
  logic         s_valid  [NCLASS];
  logic         s_tag    [NCLASS];
  sum_t         sums     [NCLASS];
  logic         t_upd_en  [NCLASS];
  lit_t         t_upd_inc [NCLASS];
  lit_t         t_upd_dec [NCLASS];

  for (genvar c = 0; c < NCLASS; c++) begin : g_tm
    tm_class #(.M(M)) u_tm (
      .clk, .rst_n,
      .ta_init     (ta_init),
      .learn       (train_en),
      .patch_valid (p_valid),
      .patch_first (p_first),
      .patch_last  (p_last),
      .feat        (p_feat),
      .tag_i       (p_label),
      .upd_en      (t_upd_en[c]),
      .upd_clause  (upd_clause),
      .upd_inc     (t_upd_inc[c]),
      .upd_dec     (t_upd_dec[c]),
      .clause_o    (clause[c]),
      .clause_reg_o(),
      .include_o   (incl[c]),
      .sum_valid_o (s_valid[c]),
      .sum_tag_o   (s_tag[c]),
      .sum_o       (sums[c])
    );
  end

  // ---------------- LFSR bank ----------------
  rnd_t rnd [NLFSR];
  rnd_t rnd_tgt [M];
  rnd_t rnd_neg [M];

  lfsr_bank #(.N(NLFSR)) u_lfsr (
    .clk, .rst_n,
    .len_sel  (lfsr_len),
    .seed_load(lfsr_seed_load),
    .step     (lfsr_run || (train_en && (p_valid || upd_active))),
    .rnd_o    (rnd)
  );
  for (genvar j = 0; j < M; j++) begin : g_rnd
    assign rnd_tgt[j] = rnd[j];
    assign rnd_neg[j] = rnd[M + j];
  end

  // ---------------- training modules ----------------
  // Target Class = TM of the label, Negative Target Class = the other TM
  logic [M-1:0] tgt_clause, neg_clause;
  sum_t         tgt_sum, neg_sum;
  logic         tgt_sv, neg_sv;
  lit_t         tgt_incl [M];
  lit_t         neg_incl [M];
  logic         tgt_en, neg_en;
  lit_t         tgt_inc, tgt_dec, neg_inc, neg_dec;

  always_comb begin
    tgt_clause = clause[p_label];
    neg_clause = clause[!p_label];
    tgt_sum    = sums[p_label];
    neg_sum    = sums[!p_label];
    tgt_sv     = s_valid[p_label];
    neg_sv     = s_valid[!p_label];
    for (int j = 0; j < M; j++) begin
      tgt_incl[j] = incl[p_label][j];
      neg_incl[j] = incl[!p_label][j];
    end
  end

  train_module #(.TC(1'b1), .M(M)) u_train_tgt (
    .clk, .rst_n,
    .en         (train_en),
    .patch_valid(p_valid),
    .patch_first(p_first),
    .feat       (p_feat),
    .clause     (tgt_clause),
    .sum_valid  (tgt_sv),
    .sum        (tgt_sum),
    .include_i  (tgt_incl),
    .rnd        (rnd_tgt),
    .upd_active (upd_active),
    .upd_clause (upd_clause),
    .upd_en_o   (tgt_en),
    .upd_inc_o  (tgt_inc),
    .upd_dec_o  (tgt_dec),
    .c_o        ()
  );

  train_module #(.TC(1'b0), .M(M)) u_train_neg (
    .clk, .rst_n,
    .en         (train_en),
    .patch_valid(p_valid),
    .patch_first(p_first),
    .feat       (p_feat),
    .clause     (neg_clause),
    .sum_valid  (neg_sv),
    .sum        (neg_sum),
    .include_i  (neg_incl),
    .rnd        (rnd_neg),
    .upd_active (upd_active),
    .upd_clause (upd_clause),
    .upd_en_o   (neg_en),
    .upd_inc_o  (neg_inc),
    .upd_dec_o  (neg_dec),
    .c_o        ()
  );

  always_comb begin
    for (int c = 0; c < NCLASS; c++) begin
      if (1'(c) == p_label) begin
        t_upd_en[c]  = tgt_en;
        t_upd_inc[c] = tgt_inc;
        t_upd_dec[c] = tgt_dec;
      end else begin
        t_upd_en[c]  = neg_en;
        t_upd_inc[c] = neg_inc;
        t_upd_dec[c] = neg_dec;
      end
    end
  end

  // ---------------- class decision and evaluation ----------------
  logic [0:0] decided;

  class_decision #(.NC(NCLASS)) u_decide (
    .sums   (sums),
    .class_o(decided),
    .max_o  ()
  );

  assign pred_valid = s_valid[0] && eval_en;
  assign pred_class = decided[0];

  evaluate #(.CW(32)) u_eval (
    .clk, .rst_n,
    .clear  (clear),
    .en     (eval_en),
    .valid  (s_valid[0]),
    .pred   (decided[0]),
    .label  (s_tag[0]),
    .err_o  (err_count),
    .count_o(eval_count)
  );

endmodule
