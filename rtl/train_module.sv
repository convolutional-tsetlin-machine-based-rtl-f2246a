// train_module: training of one class TM as Target Class (TC = 1) or as
// Negative Target Class (TC = 0).
//
// Phase 1, during the B patch cycles: one reservoir sampler per clause keeps
// a random patch among those for which the clause output 1, using LFSR j of
// this module for clause j.
// Phase 2: once the class sum v of the trained TM is known (sum_valid), the
// clamped value is registered; then upd_active steps upd_clause through all
// M clauses, one per clock. For clause j the module draws
//   u = 1 with probability (T - clamp(v))/2T   (TC = 1, Eq. 12)
//                       or (T + clamp(v))/2T   (TC = 0, Eq. 13)
// from LFSR 0, and per literal k the signals g_k = rnd < (s-1)/s and
// h_k = rnd < 1/s from LFSR k+1. With c_j = (N_j != 0), the literals l_k of
// the stored patch, the TA actions a_k and f = (j odd), a clause with
// f == TC gets Type I feedback (Ia: +1 if c&g&l, -1 if c&h&~a&~l; Ib: -1 if
// ~c&h) and the others Type II (+1 if c&~a&~l), all 16 automata in one clock
// (Algorithm 4). The comparisons are done as rnd*2T < (T -/+ v)*2^24 and
// rnd*39 < {29,10}*2^24, i.e. multiplications by constants (s = 3.9).
// The outputs drive the TA teams combinationally in the same cycle.
// Feedback rules follow the source; the random-number wiring is this
// design's choice.
module train_module
  import ctm_pkg::*;
#(
  parameter bit TC = 1'b1,
  parameter int M  = NCLAUSE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,            // training clock enable
  // patch stream and clause outputs of the trained TM
  input  logic                 patch_valid,
  input  logic                 patch_first,
  input  feat_t                feat,
  input  logic [M-1:0]         clause,
  // class sum of the trained TM
  input  logic                 sum_valid,
  input  sum_t                 sum,
  // TA actions of the trained TM
  input  lit_t                 include_i [M],
  // random numbers (this module's share of the LFSR bank)
  input  rnd_t                 rnd [M],
  // clause update sequencing
  input  logic                 upd_active,
  input  logic [$clog2(M)-1:0] upd_clause,
  // feedback to the TA teams
  output logic                 upd_en_o,
  output lit_t                 upd_inc_o,
  output lit_t                 upd_dec_o,
  // observation
  output logic [M-1:0]         c_o
);

  localparam int NW = $clog2(NPATCH + 1);
  localparam int PW = RND_W + 8;

  logic [NW-1:0] n_cnt [M];
  feat_t         preg  [M];
  sum_t          v_clamped;

  for (genvar j = 0; j < M; j++) begin : g_res
    reservoir u_res (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (en),
      .patch_valid(patch_valid),
      .patch_first(patch_first),
      .clause     (clause[j]),
      .feat       (feat),
      .rnd        (rnd[j]),
      .n_o        (n_cnt[j]),
      .patch_o    (preg[j])
    );
    assign c_o[j] = (n_cnt[j] != '0);
  end

  // clamp(v) to [-T, T], registered when the sum arrives
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_clamped <= '0;
    else if (en && sum_valid) begin
      if (sum > sum_t'(T_HYP))       v_clamped <= sum_t'(T_HYP);
      else if (sum < sum_t'(-T_HYP)) v_clamped <= sum_t'(-T_HYP);
      else                           v_clamped <= sum;
    end
  end

  // clause update decision u (Eq. 12 / 13)
  logic [PW-1:0] u_lhs, u_rhs;
  logic          u;
  always_comb begin
    u_lhs = PW'(rnd[0]) * PW'(2 * T_HYP);
    if (TC) u_rhs = PW'(T_HYP - int'(v_clamped)) << RND_W;
    else    u_rhs = PW'(T_HYP + int'(v_clamped)) << RND_W;
    u = u_lhs < u_rhs;
  end

  // per-literal stochastic signals g_k and h_k (Table 4)
  lit_t g, h;
  for (genvar k = 0; k < NLIT; k++) begin : g_gh
    logic [PW-1:0] prod;
    assign prod = PW'(rnd[k+1]) * PW'(S_NUM);
    assign g[k] = prod < (PW'(S_NUM - S_DEN) << RND_W);
    assign h[k] = prod < (PW'(S_DEN) << RND_W);
  end

  // Algorithm 4 for the selected clause
  logic  c, f, type1;
  lit_t  l, a;
  always_comb begin
    c     = c_o[upd_clause];
    f     = upd_clause[0];
    type1 = (f == TC);
    l     = to_literals(preg[upd_clause]);
    a     = include_i[upd_clause];
    upd_inc_o = '0;
    upd_dec_o = '0;
    if (type1) begin
      if (c) begin
        upd_inc_o = g & l;                 // Type Ia
        upd_dec_o = h & ~a & ~l;           // Type Ia
      end else begin
        upd_dec_o = h;                     // Type Ib
      end
    end else if (c) begin
      upd_inc_o = ~a & ~l;                 // Type II
    end
    upd_en_o = en && upd_active && u;
  end

endmodule
