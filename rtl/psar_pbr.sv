// psar_pbr: the Predictive Bit Register, the successive-approximation register.
//
// pb holds the partial result and drives the DAC, so every change of pb moves the
// reference voltage for the next comparison. On a rising clock edge, in priority
// order:
//   set_msb                  pb <= 10'b10_0000_0000 (MSB trial bit only)
//   enb_pb and load_filler   pb <= filler (a predictive step, several bits at once)
//   enb_pb                   pb[index_cnt] <= din, and, unless index_cnt is 0,
//                            pb[index_cnt-1] <= 1 (the next trial bit)
// An active-low rst clears pb asynchronously. Ports and the set/load/convert
// functions follow the source design. The priority order, the asynchronous clear
// and setting the next trial bit inside this register are this design's own.
module psar_pbr #(
  parameter int unsigned N = 10,
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] index_cnt,
  input  logic [N-1:0] filler,
  input  logic         din,
  input  logic         set_msb,
  input  logic         enb_pb,
  input  logic         load_filler,
  output logic [N-1:0] pb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb <= '0;
    end else if (set_msb) begin
      pb <= {1'b1, {(N-1){1'b0}}};
    end else if (enb_pb) begin
      if (load_filler) begin
        pb <= filler;
      end else begin
        pb[index_cnt] <= din;
        if (index_cnt != '0) pb[index_cnt - 1'b1] <= 1'b1;
      end
    end
  end

endmodule
