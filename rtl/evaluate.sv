// evaluate: compares each predicted class with the label of its sample and
// counts the misclassifications of an inference session.
//
// On every cycle with valid and en high the sample counter increments and,
// when pred differs from label, so does the error counter. clear (issued at
// the start of a session) zeroes both. The host reads err_o after the
// session. Counter widths are this design's choice.
module evaluate #(
  parameter int CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          valid,
  input  logic          pred,
  input  logic          label,
  output logic [CW-1:0] err_o,
  output logic [CW-1:0] count_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_o   <= '0;
      count_o <= '0;
    end else if (clear) begin
      err_o   <= '0;
      count_o <= '0;
    end else if (en && valid) begin
      count_o <= count_o + CW'(1);
      if (pred != label) err_o <= err_o + CW'(1);
    end
  end

endmodule
