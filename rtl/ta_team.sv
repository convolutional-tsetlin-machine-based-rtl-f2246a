// ta_team: the team of Tsetlin automata that forms one clause.
//
// Each of the NLIT (16) automata is an 8-bit two's complement up/down
// counter with 256 states, -128..+127. A state of 0 or above means the
// automaton includes its literal, so include_o is the inverted sign bit.
// inc moves a state up (towards include), dec moves it down (towards
// exclude); all automata of the team update in the same clock when 'en' is
// high. A counter saturates at its end states. 'init' (and reset) puts every
// automaton in state -1, the exclude state next to the boundary, so that all
// clauses start empty. The counters and their start state follow the source;
// saturation and priority of inc over dec are this design's choices (the
// feedback logic never asserts both for one automaton).
module ta_team
  import ctm_pkg::*;
#(
  parameter int NTA = NLIT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           en,
  input  logic [NTA-1:0] inc,
  input  logic [NTA-1:0] dec,
  output logic [NTA-1:0] include_o,
  output ta_t            state_o [NTA]
);

  localparam ta_t TA_MAX  = ta_t'(2**(TA_BITS-1) - 1);
  localparam ta_t TA_MIN  = ta_t'(-(2**(TA_BITS-1)));
  localparam ta_t TA_INIT = ta_t'(-1);

  ta_t st [NTA];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTA; k++) st[k] <= TA_INIT;
    end else if (init) begin
      for (int k = 0; k < NTA; k++) st[k] <= TA_INIT;
    end else if (en) begin
      for (int k = 0; k < NTA; k++) begin
        if (inc[k] && st[k] != TA_MAX)      st[k] <= st[k] + ta_t'(1);
        else if (dec[k] && st[k] != TA_MIN) st[k] <= st[k] - ta_t'(1);
      end
    end
  end

  for (genvar k = 0; k < NTA; k++) begin : g_out
    assign include_o[k] = ~st[k][TA_BITS-1];
    assign state_o[k]   = st[k];
  end

endmodule
