// psar_comparator: magnitude comparator that flags a predictive step.
//
// AgtB is high when A is equal to or greater than B. In the control unit A is the
// bit count Dif_CNT proposed for this cycle and B is tied to the constant 3, so
// AgtB says "resolve a run of three or more equal bits at once". Both the >=
// relation and the constant 3 are the source design's; the width is a parameter
// (default 4 bits, as in the source). Purely combinational.
module psar_comparator #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         agtb
);

  always_comb agtb = (a >= b);

endmodule
