// class_decision: argmax over the class sums of the NCLASS Tsetlin machines.
//
// Combinational: class_o is the index of the largest sum; on a tie the
// lowest index wins, so for two classes class 1 is chosen only when
// v(1) > v(0). Written as a general argmax so that more classes can be added.
// Argmax follows the source; the tie rule is this design's choice.
module class_decision
  import ctm_pkg::*;
#(
  parameter int NC = NCLASS
) (
  input  sum_t                                  sums [NC],
  output logic [(NC > 1 ? $clog2(NC) : 1)-1:0]  class_o,
  output sum_t                                  max_o
);

  localparam int CW = (NC > 1) ? $clog2(NC) : 1;

  always_comb begin
    class_o = '0;
    max_o   = sums[0];
    for (int i = 1; i < NC; i++) begin
      if (sums[i] > max_o) begin
        max_o   = sums[i];
        class_o = CW'(i);
      end
    end
  end

endmodule
