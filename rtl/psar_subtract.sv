// psar_subtract: computes the next bit index of the conversion.
//
// a_b = a - b, with a the current bit index Q and b the number of bits Dif_CNT
// resolved in this cycle; a_b is the index that receives the next trial bit.
// neg_flag is high when b exceeds a, i.e. the subtraction would borrow; the
// controller then does not take a predictive step. a_b wraps modulo 2**W in that
// case and must not be used. The operation and the flag follow the source design;
// the wrap-around value on a borrow is this design's own. Purely combinational.
module psar_subtract #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] a_b,
  output logic         neg_flag
);

  logic [W:0] diff;

  always_comb begin
    diff     = {1'b0, a} - {1'b0, b};
    a_b      = diff[W-1:0];
    neg_flag = diff[W];
  end

endmodule
