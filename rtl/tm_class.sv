// tm_class: the Tsetlin machine of one class (TM0 or TM1).
//
// It holds NCLAUSE (40) TA teams and evaluates all clauses on the current
// patch in the same clock: clause j is the AND of the literals whose
// automata include them. An empty clause (nothing included) outputs 1 while
// learning and 0 during inference. The clause output register ORs the
// clause outputs over the B patches of an image (sequential OR, starting
// anew at patch 0), so that after the last patch it holds, per clause,
// whether any patch matched. In the cycle after the last patch this register
// is fed to the 6-stage adder tree with votes +1 for odd (positive
// polarity) and -1 for even clauses, giving the class sum v 7 cycles after
// the last patch. TA feedback arrives for one clause per clock on the upd_*
// inputs. The structure follows the source; the empty-clause output during
// inference and the sideband tag are this design's choices.
module tm_class
  import ctm_pkg::*;
#(
  parameter int M = NCLAUSE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ta_init,
  input  logic                  learn,
  // patch stream
  input  logic                  patch_valid,
  input  logic                  patch_first,
  input  logic                  patch_last,
  input  feat_t                 feat,
  input  logic                  tag_i,
  // TA feedback for one clause
  input  logic                  upd_en,
  input  logic [$clog2(M)-1:0]  upd_clause,
  input  lit_t                  upd_inc,
  input  lit_t                  upd_dec,
  // outputs
  output logic [M-1:0]          clause_o,      // clause outputs for the current patch
  output logic [M-1:0]          clause_reg_o,  // clause output register (OR over patches)
  output lit_t                  include_o [M], // TA actions, 1 = include
  output logic                  sum_valid_o,
  output logic                  sum_tag_o,
  output sum_t                  sum_o
);

  lit_t                 lits;
  logic [M-1:0]         creg;
  logic                 final_q;
  logic                 tag_q;
  logic signed [1:0]    votes [M];

  assign lits = to_literals(feat);

  for (genvar j = 0; j < M; j++) begin : g_clause
    lit_t inc_j;
    assign inc_j = include_o[j];

    ta_team u_team (
      .clk      (clk),
      .rst_n    (rst_n),
      .init     (ta_init),
      .en       (upd_en && upd_clause == j[$clog2(M)-1:0]),
      .inc      (upd_inc),
      .dec      (upd_dec),
      .include_o(include_o[j]),
      .state_o  ()
    );

    // Eq. (9): AND of included literals; empty clause -> learn
    assign clause_o[j] = (inc_j == '0) ? learn : &(lits | ~inc_j);

    // votes of the clause output register, Eq. (11)
    assign votes[j] = !creg[j] ? 2'sd0 : ((j % 2) == 1 ? 2'sd1 : -2'sd1);
  end

  // clause output register: sequential OR over the patches, Eq. (5)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      creg    <= '0;
      final_q <= 1'b0;
      tag_q   <= 1'b0;
    end else begin
      final_q <= patch_valid && patch_last;
      if (patch_valid) begin
        creg  <= patch_first ? clause_o : (creg | clause_o);
        tag_q <= tag_i;
      end
    end
  end

  assign clause_reg_o = creg;

  adder_tree #(.N_IN(M), .IN_W(2), .OUT_W(SUM_W)) u_sum (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(final_q),
    .tag_i  (tag_q),
    .in_i   (votes),
    .valid_o(sum_valid_o),
    .tag_o  (sum_tag_o),
    .sum_o  (sum_o)
  );

endmodule
