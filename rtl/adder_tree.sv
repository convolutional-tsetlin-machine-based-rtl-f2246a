// adder_tree: pipelined binary adder tree that sums N_IN signed values.
//
// Level l (1..LEVELS, LEVELS = ceil(log2 N_IN)) adds pairs of the values of
// level l-1 and registers the results; an odd value at the end of a level
// passes on unchanged. For 40 clause votes this gives 6 register stages, so
// the sum of the inputs presented in cycle t is on sum_o in cycle t+6.
// valid and a one-bit tag travel with the data. Inputs are signed so that
// integer clause weights could be used; the accelerator feeds +1/-1/0 votes.
// The tree with its 6 stages follows the source; the valid/tag side band is
// this design's addition.
module adder_tree #(
  parameter int N_IN  = 40,
  parameter int IN_W  = 2,
  parameter int OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_i,
  input  logic                    tag_i,
  input  logic signed [IN_W-1:0]  in_i [N_IN],
  output logic                    valid_o,
  output logic                    tag_o,
  output logic signed [OUT_W-1:0] sum_o
);

  localparam int LEVELS = (N_IN > 1) ? $clog2(N_IN) : 1;

  // number of values at level l
  function automatic int count_at(int l);
    int c;
    c = N_IN;
    for (int i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  logic signed [OUT_W-1:0] lvl [LEVELS+1][N_IN];
  logic                    vld [LEVELS+1];
  logic                    tag [LEVELS+1];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    assign lvl[0][i] = OUT_W'(in_i[i]);
  end
  assign vld[0] = valid_i;
  assign tag[0] = tag_i;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int NPREV = count_at(l - 1);
    localparam int NCUR  = count_at(l);
    for (genvar i = 0; i < NCUR; i++) begin : g_node
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) lvl[l][i] <= '0;
        else if (2*i + 1 < NPREV) lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
        else                      lvl[l][i] <= lvl[l-1][2*i];
      end
    end
    for (genvar i = NCUR; i < N_IN; i++) begin : g_unused
      assign lvl[l][i] = '0;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[l] <= 1'b0;
        tag[l] <= 1'b0;
      end else begin
        vld[l] <= vld[l-1];
        tag[l] <= tag[l-1];
      end
    end
  end

  assign sum_o   = lvl[LEVELS][0];
  assign valid_o = vld[LEVELS];
  assign tag_o   = tag[LEVELS];

endmodule
