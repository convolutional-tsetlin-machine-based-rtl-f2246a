// lfsr: one maximal-length Fibonacci LFSR whose length is chosen at run time.
//
// The state lives in a 24-bit register; only the low LEN bits are used, LEN
// being one of 6, 7, 8, 9, 10, 12, 14, 16, 18 or 24 (ctm_pkg::lfsr_len_e).
// Each enabled clock the state shifts left by one and the XOR of the tap bits
// of a maximal-length polynomial enters at bit 0, so the sequence period is
// 2^LEN - 1. seed_load writes the seed (masked to LEN bits, forced non-zero).
// rnd_o is the state left-aligned in 24 bits, i.e. a fraction in [0,1) with
// LEN significant bits, so that thresholds can be compared independently of
// the selected length. Registered output, no latency beyond the register.
// The set of lengths follows the source; the tap sets are the standard
// maximal-length ones and the fraction format is this design's choice.
module lfsr
  import ctm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  lfsr_len_e        len_sel,
  input  logic [RND_W-1:0] seed,
  input  logic             seed_load,
  input  logic             step,
  output rnd_t             rnd_o
);

  logic [23:0] state;
  logic [23:0] mask;
  logic [23:0] taps;
  logic        fb;
  int unsigned len;

  always_comb begin
    unique case (len_sel)
      LEN6:    begin len = 6;  taps = 24'h000030; end // x^6+x^5+1
      LEN7:    begin len = 7;  taps = 24'h000060; end // x^7+x^6+1
      LEN8:    begin len = 8;  taps = 24'h0000B8; end // x^8+x^6+x^5+x^4+1
      LEN9:    begin len = 9;  taps = 24'h000110; end // x^9+x^5+1
      LEN10:   begin len = 10; taps = 24'h000240; end // x^10+x^7+1
      LEN12:   begin len = 12; taps = 24'h000829; end // x^12+x^6+x^4+x+1
      LEN14:   begin len = 14; taps = 24'h002015; end // x^14+x^5+x^3+x+1
      LEN16:   begin len = 16; taps = 24'h00D008; end // x^16+x^15+x^13+x^4+1
      LEN18:   begin len = 18; taps = 24'h020400; end // x^18+x^11+1
      LEN24:   begin len = 24; taps = 24'hE10000; end // x^24+x^23+x^22+x^17+1
      default: begin len = 16; taps = 24'h00D008; end
    endcase
    mask = 24'hFFFFFF >> (24 - len);
    fb   = ^(state & taps);
    rnd_o = state << (24 - len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= 24'h000001;
    end else if (seed_load) begin
      state <= ((seed & mask) == '0) ? 24'h000001 : (seed & mask);
    end else if (step) begin
      state <= {state[22:0], fb} & mask;
    end
  end

endmodule
