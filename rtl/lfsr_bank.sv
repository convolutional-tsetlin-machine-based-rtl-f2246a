// lfsr_bank: the bank of random number generators used during training.
//
// NLFSR (80) instances of lfsr share one length selection. Each has its own
// seed, derived from its index by a fixed multiplicative hash, so that
// simultaneous random decisions are not correlated (with 6-bit LFSRs there
// are only 63 distinct non-zero states, so some seeds repeat, as in the
// source). Outputs 0..NCLAUSE-1 serve the Target Class training module and
// NCLAUSE..2*NCLAUSE-1 the Negative Target Class module. 'step' is the
// register clock enable: the host may run the bank for a while before
// training to move it away from the reset state; during training the top
// enables it only in clocks that use random numbers, and it is stopped
// during inference. Seeds are loaded at reset and on seed_load.
module lfsr_bank
  import ctm_pkg::*;
#(
  parameter int N = NLFSR
) (
  input  logic      clk,
  input  logic      rst_n,
  input  lfsr_len_e len_sel,
  input  logic      seed_load,
  input  logic      step,
  output rnd_t      rnd_o [N]
);

  // Seed of LFSR i: a Weyl-sequence hash of the index (own choice)
  function automatic logic [RND_W-1:0] seed_of(int unsigned i);
    logic [31:0] h;
    h = (i + 1) * 32'h9E3779B1;
    h = h ^ (h >> 13);
    return h[RND_W-1:0];
  endfunction

  logic loading;
  logic first_q;

  // Load the seeds once after reset, or when the host asks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_q <= 1'b1;
    else        first_q <= 1'b0;
  end
  assign loading = seed_load | first_q;

  for (genvar i = 0; i < N; i++) begin : g_lfsr
    lfsr u_lfsr (
      .clk      (clk),
      .rst_n    (rst_n),
      .len_sel  (len_sel),
      .seed     (seed_of(i)),
      .seed_load(loading),
      .step     (step),
      .rnd_o    (rnd_o[i])
    );
  end

endmodule
