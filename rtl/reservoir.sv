// reservoir: reservoir sampling (Vitter's algorithm R, reservoir of one) of
// the patches that made one clause output 1 during the convolution.
//
// At patch 0 of an image the count N and the patch register are restarted.
// For every patch on which the clause outputs 1, N is incremented and a
// random integer r in [1, N] is drawn; when r = 1 the patch replaces the
// stored one. After B patches each matching patch has been kept with
// probability 1/N. The draw r = floor(rnd * N) + 1 with rnd a 24-bit
// fraction is done with a look-up table of the thresholds ceil(2^24 / N),
// N = 1..B: r = 1 exactly when rnd is below the threshold for N. One patch
// per clock, results stable from the cycle after the last patch until the
// next image. 'en' is the register clock enable (training only). The
// algorithm follows the source; the threshold table form of the
// multiplication is this design's choice.
module reservoir
  import ctm_pkg::*;
#(
  parameter int B = NPATCH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   patch_valid,
  input  logic                   patch_first,
  input  logic                   clause,
  input  feat_t                  feat,
  input  rnd_t                   rnd,
  output logic [$clog2(B+1)-1:0] n_o,
  output feat_t                  patch_o
);

  localparam int NW = $clog2(B + 1);

  // threshold look-up table: rnd < ceil(2^RND_W / n)  <=>  floor(rnd*n) == 0
  function automatic logic [RND_W:0] thr(int n);
    longint unsigned full;
    full = longint'(1) << RND_W;
    return (RND_W+1)'((full + longint'(n) - 1) / longint'(n));
  endfunction

  logic [RND_W:0] thr_lut [B+1];
  for (genvar n = 0; n <= B; n++) begin : g_lut
    assign thr_lut[n] = (n == 0) ? '0 : thr(n);
  end

  logic [NW-1:0] n_q;
  feat_t         p_q;
  logic [NW-1:0] n_next;
  logic          take;

  always_comb begin
    n_next = patch_first ? NW'(1) : n_q + NW'(1);
    take   = {1'b0, rnd} < thr_lut[n_next];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0;
      p_q <= '0;
    end else if (en && patch_valid) begin
      if (clause) begin
        n_q <= n_next;
        if (take) p_q <= feat;
      end else if (patch_first) begin
        n_q <= '0;
        p_q <= '0;
      end
    end
  end

  assign n_o     = n_q;
  assign patch_o = p_q;

endmodule
