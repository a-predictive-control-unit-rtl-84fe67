// psar_filler: builds the register word for a predictive step.
//
// A predictive step resolves the bits from index_cnt (the current trial position
// Q) down to i_min + 1 in one cycle, all equal to the comparison result di, and
// places the next trial bit '1' at i_min. Bits above index_cnt and below i_min
// are copied from the current register word pb (below i_min they are zero during
// a conversion). The result filler_out is loaded into the register only when the
// controller asserts load_filler. The ports and the idea of filling the run with
// di come from the source design; setting the trial bit at i_min in the same
// word is how this design completes the step. Purely combinational; i_min must
// not exceed index_cnt.
module psar_filler #(
  parameter int unsigned N = 10,
  parameter int unsigned W = 4
) (
  input  logic         di,
  input  logic [W-1:0] index_cnt,
  input  logic [W-1:0] i_min,
  input  logic [N-1:0] pb,
  output logic [N-1:0] filler_out
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (i == 32'(i_min))
        filler_out[i] = 1'b1;
      else if (i > 32'(i_min) && i <= 32'(index_cnt))
        filler_out[i] = di;
      else
        filler_out[i] = pb[i];
    end
  end

endmodule
